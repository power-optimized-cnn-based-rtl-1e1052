// tb_ring_counter_cg: self-checking test of the clock-gated ring counter.
//
// Resets the ring, injects the 1 with init and then advances it for several
// laps with random one-cycle holds (adv low). A reference model keeps the
// pointer position and checks after every edge that the ring is one-hot at
// that position and that blk_sel names its block. Before every edge it checks
// the gating: a block's clock must run exactly when the ring advances and the
// 1 is inside the block, is about to enter it from the previous block, or
// has just left it for the next block; every other block must be idle. It
// also checks that the pointer advances once per enabled cycle (rate 1).
module tb_ring_counter_cg;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned SEG   = 8;
  localparam int unsigned NBLK  = DEPTH / SEG;

  logic             clk = 1'b0;
  logic             rst_n, init, adv;
  logic [DEPTH-1:0] ring;
  logic [NBLK-1:0]  blk_sel, blk_clk_en;

  int checks = 0, failures = 0;
  int pos;            // model pointer, -1 before init
  bit just_arrived;   // pointer moved at the last edge
  int gated_off = 0, block_cycles = 0, holds = 0, laps = 0;

  ring_counter_cg #(.DEPTH(DEPTH), .SEG(SEG)) dut (
    .clk, .rst_n, .init, .adv, .ring, .blk_sel, .blk_clk_en
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NBLK-1:0] exp_en(input bit a, input bit i);
    logic [NBLK-1:0] e = '0;
    for (int k = 0; k < NBLK; k++) begin
      bit in_blk, entering, leaving;
      in_blk   = (pos >= 0) && (pos / SEG == k);
      entering = (k == 0) ? (i || pos == DEPTH - 1) : (pos == k * SEG - 1);
      leaving  = just_arrived && (pos == ((k + 1) % NBLK) * SEG);
      e[k] = a && (in_blk || entering || leaving);
    end
    return e;
  endfunction

  task automatic check_state();
    logic [DEPTH-1:0] er = (pos < 0) ? '0 : (DEPTH'(1) << pos);
    logic [NBLK-1:0]  es = (pos < 0) ? '0 : (NBLK'(1) << (pos / SEG));
    checks++;
    if (ring !== er || blk_sel !== es) begin
      failures++;
      $display("FAIL ring=%h exp %h blk_sel=%b exp %b", ring, er, blk_sel, es);
    end
  endtask

  // One clock: apply inputs after the falling edge, check the gating, take
  // the rising edge, update the model, check the state.
  task automatic step(input bit i, input bit a);
    logic [NBLK-1:0] ee;
    @(negedge clk);
    init = i;
    adv  = a;
    #1;
    ee = exp_en(a, i);
    checks++;
    if (blk_clk_en !== ee) begin
      failures++;
      $display("FAIL pos=%0d blk_clk_en=%b exp %b", pos, blk_clk_en, ee);
    end
    for (int k = 0; k < NBLK; k++) begin
      block_cycles++;
      if (!blk_clk_en[k]) gated_off++;
    end
    @(posedge clk);
    if (a) begin
      if (pos >= 0) begin
        pos = (pos + 1) % DEPTH;
        if (pos == 0) laps++;
        just_arrived = 1'b1;
      end else if (i) begin
        pos = 0;
        just_arrived = 1'b0;
      end
    end else begin
      just_arrived = 1'b0;
      holds++;
    end
    #1;
    check_state();
  endtask

  initial begin
    int moves;
    pos = -1;
    just_arrived = 1'b0;
    rst_n = 1'b1;
    #1;
    rst_n = 1'b0;
    init  = 1'b0;
    adv   = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check_state();
    @(negedge clk);
    rst_n = 1'b1;
    step(1'b0, 1'b1);          // running without a token: nothing happens
    step(1'b1, 1'b1);          // inject
    moves = 0;
    for (int n = 0; n < 6 * DEPTH; n++) begin
      bit a;
      a = ($urandom_range(0, 4) != 0);
      step(1'b0, a);
      if (a) moves++;
    end
    checks++;
    if (laps != moves / DEPTH) begin
      failures++;
      $display("FAIL laps=%0d moves=%0d", laps, moves);
    end
    // At most two of NBLK blocks clocked per cycle: most block-cycles gated.
    checks++;
    if (gated_off * 4 < block_cycles * 2) begin
      failures++;
      $display("FAIL too few gated block-cycles %0d of %0d", gated_off, block_cycles);
    end
    if (holds == 0 || laps < 3) begin
      failures++;
      $display("FAIL holds=%0d laps=%0d", holds, laps);
    end
    $display("laps=%0d holds=%0d gated block-cycles=%0d of %0d", laps, holds,
             gated_off, block_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
