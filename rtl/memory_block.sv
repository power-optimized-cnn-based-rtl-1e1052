// memory_block: the stored words of the CAM / delay buffer.
//
// DEPTH words of WIDTH bits, each with a valid bit, grouped like the ring
// counter into blocks of SEG words. At a rising clock edge with we high, the
// word whose ring-counter bit is 1 takes the value on its block's local bus
// (word i belongs to block i/SEG) and becomes valid. Every word and its valid
// bit are visible at the outputs, for the parallel compare and for the
// read-out multiplexer.
//
// The clock of each block of words is gated as well: a block's clock runs
// only at an edge where it holds the written word, so one block of the array
// sees a clock edge per write instead of all of them. This carries the
// clock-gating of the ring counter over to the clock distribution of the
// words; the block size, the gate and the register array are this design's
// choices, as are the valid bits and the reset that clears them, so that an
// empty word can never report a match.
//
// Interface: clk, rst_n (asynchronous, clears the valid bits and the words),
// we, ring[DEPTH-1:0] (one-hot word select), blk_bus[NBLK], mem[DEPTH],
// valid[DEPTH-1:0], blk_clk_en[NBLK-1:0] (blocks of words clocked at the
// coming edge, for observation). Timing: a written word is visible after the
// edge.
module memory_block #(
  parameter int unsigned WIDTH = cam_pkg::CAM_WIDTH,
  parameter int unsigned DEPTH = cam_pkg::CAM_DEPTH,
  parameter int unsigned SEG   = cam_pkg::CAM_SEG,
  localparam int unsigned NBLK = DEPTH / SEG
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [DEPTH-1:0] ring,
  input  logic [WIDTH-1:0] blk_bus [NBLK],
  output logic [WIDTH-1:0] mem     [DEPTH],
  output logic [DEPTH-1:0] valid,
  output logic [NBLK-1:0]  blk_clk_en
);
  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    logic             gclk;
    logic [WIDTH-1:0] words [SEG];
    logic [SEG-1:0]   wvalid;

    assign blk_clk_en[k] = we && (|ring[k*SEG +: SEG]);

    clock_gate u_gate (
      .clk  (clk),
      .en   (blk_clk_en[k]),
      .gclk (gclk)
    );

    always_ff @(posedge gclk or negedge rst_n) begin
      if (!rst_n) begin
        wvalid <= '0;
        for (int j = 0; j < SEG; j++) words[j] <= '0;
      end else begin
        for (int j = 0; j < SEG; j++) begin
          if (ring[k*SEG + j]) begin
            words[j]  <= blk_bus[k];
            wvalid[j] <= 1'b1;
          end
        end
      end
    end

    for (genvar j = 0; j < SEG; j++) begin : g_word
      assign mem[k*SEG + j] = words[j];
    end
    assign valid[k*SEG +: SEG] = wvalid;
  end
endmodule
