// tb_output_buffer: self-checking test of the gated read-out multiplexer.
//
// Fills the word inputs with random values, then selects random words with a
// one-hot pointer and its block select, with the read request on or off. It
// checks that the registered output holds the pointed word one edge later
// and keeps its value when no read is requested.
module tb_output_buffer;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned SEG   = 8;
  localparam int unsigned NBLK  = DEPTH / SEG;

  logic             clk = 1'b0;
  logic             rst_n, re;
  logic [DEPTH-1:0] ring;
  logic [NBLK-1:0]  blk_sel;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] dout;

  logic [WIDTH-1:0] expd;
  int checks = 0, failures = 0;

  output_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH), .SEG(SEG)) dut (
    .clk, .rst_n, .re, .ring, .blk_sel, .mem, .dout
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b1;
    #1;
    rst_n = 1'b0;
    re    = 1'b0;
    ring  = '0;
    blk_sel = '0;
    for (int i = 0; i < DEPTH; i++) mem[i] = WIDTH'($urandom);
    repeat (2) @(posedge clk);
    #1;
    expd = '0;
    checks++;
    if (dout !== expd) begin
      failures++;
      $display("FAIL dout after reset=%h", dout);
    end
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int w;
      @(negedge clk);
      if (n % 50 == 0)
        for (int i = 0; i < DEPTH; i++) mem[i] = WIDTH'($urandom);
      w       = $urandom_range(0, DEPTH - 1);
      ring    = DEPTH'(1) << w;
      blk_sel = NBLK'(1) << (w / SEG);
      re      = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (re) expd = mem[w];
      #1;
      checks++;
      if (dout !== expd) begin
        failures++;
        $display("FAIL word %0d re=%0b dout=%h exp %h", w, re, dout, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
