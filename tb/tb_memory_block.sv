// tb_memory_block: self-checking test of the word array.
//
// Resets the array, then performs random writes: a random one-hot word
// select, the selected block's bus carrying the word and every other block's
// bus carrying unrelated values, and the write request on or off. A model
// array checks all words and valid bits after every edge, so a write to the
// wrong word, from the wrong bus or without a request is caught. Before
// every edge it checks that only the block holding the written word has its
// clock enabled, and no block when there is no write.
module tb_memory_block;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned SEG   = 8;
  localparam int unsigned NBLK  = DEPTH / SEG;

  logic             clk = 1'b0;
  logic             rst_n, we;
  logic [DEPTH-1:0] ring;
  logic [WIDTH-1:0] blk_bus [NBLK];
  logic [WIDTH-1:0] mem     [DEPTH];
  logic [DEPTH-1:0] valid;
  logic [NBLK-1:0]  blk_clk_en;

  logic [WIDTH-1:0] m_mem [DEPTH];
  logic [DEPTH-1:0] m_valid;
  int checks = 0, failures = 0;

  memory_block #(.WIDTH(WIDTH), .DEPTH(DEPTH), .SEG(SEG)) dut (
    .clk, .rst_n, .we, .ring, .blk_bus, .mem, .valid, .blk_clk_en
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (valid !== m_valid) begin
      failures++;
      $display("FAIL valid=%h exp %h", valid, m_valid);
    end
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (m_valid[i] && mem[i] !== m_mem[i]) begin
        failures++;
        $display("FAIL mem[%0d]=%h exp %h", i, mem[i], m_mem[i]);
      end
    end
  endtask

  initial begin
    rst_n = 1'b1;
    #1;
    rst_n = 1'b0;
    we    = 1'b0;
    ring  = '0;
    for (int k = 0; k < NBLK; k++) blk_bus[k] = '0;
    m_valid = '0;
    repeat (2) @(posedge clk);
    #1;
    compare();
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      int w;
      @(negedge clk);
      w    = $urandom_range(0, DEPTH - 1);
      ring = DEPTH'(1) << w;
      we   = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < NBLK; k++) blk_bus[k] = WIDTH'($urandom);
      #1;
      checks++;
      if (blk_clk_en !== (we ? NBLK'(1) << (w / SEG) : '0)) begin
        failures++;
        $display("FAIL blk_clk_en=%b for word %0d we=%0b", blk_clk_en, w, we);
      end
      @(posedge clk);
      if (we) begin
        m_mem[w]   = blk_bus[w / SEG];
        m_valid[w] = 1'b1;
      end
      #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
