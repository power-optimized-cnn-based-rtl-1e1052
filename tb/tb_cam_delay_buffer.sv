// tb_cam_delay_buffer: end-to-end test of the clock-gated CAM / delay buffer
// at its default size (32 words of 8 bits, ring counter in blocks of 8).
//
// Phase 1 (directed): after reset and init, writes 32 distinct words with
// 8'b1000_0011 in word 2 and searches for it: hit, address 2 and the word
// itself must come back one cycle later. Phase 2 (random): a long mix of
// write cycles and search cycles with data from a small value set, so that
// words repeat. A model keeps the pointer, the words and the history of
// writes and checks after every edge: the one-hot pointer, the delayed
// output (the word written exactly DEPTH writes earlier), the match lines,
// and hit/address/word of every search one cycle after it. Before every edge
// it checks that at most two blocks of the ring counter are clocked, none in
// search mode, and that only the block of words holding the pointer is
// clocked in write mode. It counts the design's mechanisms (init, writes, delayed
// read-outs, pointer wrap-around, block hand-overs, gated-off blocks,
// searches that hit, miss or match several words, pointer holds during a
// search) and fails any that never happened.
module tb_cam_delay_buffer;
  localparam int unsigned WIDTH  = cam_pkg::CAM_WIDTH;
  localparam int unsigned DEPTH  = cam_pkg::CAM_DEPTH;
  localparam int unsigned SEG    = cam_pkg::CAM_SEG;
  localparam int unsigned ADDR_W = cam_pkg::CAM_ADDR_W;
  localparam int unsigned NBLK   = DEPTH / SEG;

  logic              clk = 1'b0;
  logic              rst_n, init, sel;
  logic [WIDTH-1:0]  ip, dop, muop;
  logic              hit;
  logic [ADDR_W-1:0] addre;
  logic [DEPTH-1:0]  ringop, match_lines;
  logic [NBLK-1:0]   blk_clk_en, mem_clk_en;

  cam_delay_buffer dut (
    .clk, .rst_n, .init, .sel, .ip, .dop, .hit, .addre, .muop, .ringop,
    .blk_clk_en, .mem_clk_en, .match_lines
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // model
  int               ptr;
  logic [WIDTH-1:0] m_mem [DEPTH];
  logic [DEPTH-1:0] m_valid;
  logic [WIDTH-1:0] hist [$];
  logic [WIDTH-1:0] e_dop, e_muop;
  logic             e_hit;
  logic [ADDR_W-1:0] e_addr;
  // mechanism counters
  int c_init = 0, c_write = 0, c_delay = 0, c_wrap = 0, c_handover = 0;
  int c_gated = 0, c_hit = 0, c_miss = 0, c_multi = 0, c_hold = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (ptr=%0d)", what, ptr);
    end
  endtask

  // One clock cycle in write mode (s = 0) or search mode (s = 1).
  task automatic cycle(input bit s, input logic [WIDTH-1:0] d);
    logic [DEPTH-1:0] eml;
    int cnt, nen;
    @(negedge clk);
    sel = s;
    ip  = d;
    init = 1'b0;
    #1;
    nen = $countones(blk_clk_en);
    chk(s ? (nen == 0) : (nen >= 1 && nen <= 2), "block clock enables");
    if (nen == 2) c_handover++;
    chk(mem_clk_en === (s ? '0 : NBLK'(1) << (ptr / SEG)), "word array clock enables");
    c_gated += NBLK - nen;
    eml = '0;
    cnt = 0;
    for (int i = 0; i < DEPTH; i++) begin
      eml[i] = m_valid[i] && (m_mem[i] == d);
      if (eml[i]) cnt++;
    end
    chk(match_lines === eml, "match lines");
    @(posedge clk);
    if (!s) begin
      e_dop = m_mem[ptr];
      if (hist.size() >= DEPTH) begin
        chk(e_dop === hist[hist.size() - DEPTH], "model delay");
        c_delay++;
      end
      m_mem[ptr]   = d;
      m_valid[ptr] = 1'b1;
      hist.push_back(d);
      ptr = (ptr + 1) % DEPTH;
      if (ptr == 0) c_wrap++;
      c_write++;
    end else begin
      e_hit = (cnt > 0);
      e_addr = '0;
      e_muop = '0;
      for (int i = 0; i < DEPTH; i++)
        if (eml[i]) begin e_addr = ADDR_W'(i); e_muop = m_mem[i]; break; end
      if (cnt == 0) c_miss++; else c_hit++;
      if (cnt > 1) c_multi++;
      c_hold++;
    end
    #1;
    chk(ringop === (DEPTH'(1) << ptr), "ring pointer");
    chk(dop === e_dop, "delayed output");
    chk(hit === e_hit && addre === e_addr && muop === e_muop, "search result");
  endtask

  initial begin
    rst_n = 1'b1;
    #1;
    rst_n = 1'b0;
    init  = 1'b0;
    sel   = 1'b0;
    ip    = '0;
    m_valid = '0;
    for (int i = 0; i < DEPTH; i++) m_mem[i] = '0;
    e_dop = '0; e_muop = '0; e_hit = 1'b0; e_addr = '0;
    repeat (2) @(posedge clk);
    #1;
    chk(ringop === '0 && dop === '0 && hit === 1'b0, "reset state");
    @(negedge clk);
    rst_n = 1'b1;
    // Inject the ring counter's 1.
    @(negedge clk);
    init = 1'b1;
    sel  = 1'b0;
    @(posedge clk);
    #1;
    c_init++;
    ptr = 0;
    chk(ringop === DEPTH'(1), "pointer after init");

    // Phase 1: distinct words, 8'b1000_0011 at word 2.
    for (int i = 0; i < DEPTH; i++)
      cycle(1'b0, (i == 2) ? 8'b1000_0011 : WIDTH'(8'h40 + i));
    cycle(1'b1, 8'b1000_0011);
    chk(hit && addre == ADDR_W'(2) && muop == 8'b1000_0011, "directed search");

    // Phase 2: random traffic.
    for (int n = 0; n < 3000; n++) begin
      bit s;
      logic [WIDTH-1:0] d;
      s = ($urandom_range(0, 3) == 0);
      d = ($urandom_range(0, 1) == 0) ? WIDTH'($urandom_range(0, 12) * 19)
                                      : WIDTH'($urandom);
      cycle(s, d);
    end

    chk(c_init > 0, "init used");
    chk(c_write > 0, "writes");
    chk(c_delay > 0, "delayed read-outs");
    chk(c_wrap > 1, "pointer wrap-around");
    chk(c_handover > 0, "block hand-overs");
    chk(c_gated > 0, "gated blocks");
    chk(c_hit > 0, "search hits");
    chk(c_miss > 0, "search misses");
    chk(c_multi > 0, "multiple matches");
    chk(c_hold > 0, "pointer holds");
    $display("init=%0d writes=%0d delayed=%0d wraps=%0d handovers=%0d gated=%0d",
             c_init, c_write, c_delay, c_wrap, c_handover, c_gated);
    $display("search hit=%0d miss=%0d multiple=%0d holds=%0d",
             c_hit, c_miss, c_multi, c_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
