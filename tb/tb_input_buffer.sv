// tb_input_buffer: self-checking test of the gated input demultiplexer.
//
// Drives random data with every block selected in turn, with the write
// request on and off, and checks that the word appears only on the selected
// block's bus and that every other bus (and all buses with no write) stays
// at zero.
module tb_input_buffer;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned NBLK  = 4;

  logic             we;
  logic [NBLK-1:0]  blk_sel;
  logic [WIDTH-1:0] din;
  logic [WIDTH-1:0] blk_bus [NBLK];

  int checks = 0, failures = 0;

  input_buffer #(.WIDTH(WIDTH), .NBLK(NBLK)) dut (.we, .blk_sel, .din, .blk_bus);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      int b;
      b       = $urandom_range(0, NBLK - 1);
      we      = ($urandom_range(0, 3) != 0);
      blk_sel = NBLK'(1) << b;
      din     = WIDTH'($urandom_range(1, 255));
      #1;
      for (int k = 0; k < NBLK; k++) begin
        logic [WIDTH-1:0] e;
        e = (we && k == b) ? din : '0;
        checks++;
        if (blk_bus[k] !== e) begin
          failures++;
          $display("FAIL we=%0b blk=%0d bus[%0d]=%h exp %h", we, b, k, blk_bus[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
