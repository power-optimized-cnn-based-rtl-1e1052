// input_buffer: gated demultiplexer on the write data path.
//
// The input word is steered onto the local data bus of one ring-counter
// block only: the block that holds the write pointer, and only while a write
// is requested. The buses of all other blocks are held at zero, so a new
// input word toggles the wires of one block instead of the whole array.
// Within the block, the ring-counter bit picks the word (memory_block).
// Gating the input driver follows the described design; the AND form of the
// gate and the zero idle value are this design's choices.
//
// Interface: we (write this cycle), blk_sel[NBLK-1:0] (one-hot block of the
// write pointer), din[WIDTH-1:0], blk_bus[NBLK] (one word-wide bus per
// block). Purely combinational.
module input_buffer #(
  parameter int unsigned WIDTH = cam_pkg::CAM_WIDTH,
  parameter int unsigned NBLK  = cam_pkg::CAM_DEPTH / cam_pkg::CAM_SEG
) (
  input  logic             we,
  input  logic [NBLK-1:0]  blk_sel,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] blk_bus [NBLK]
);
  always_comb begin
    for (int k = 0; k < NBLK; k++) begin
      blk_bus[k] = (we && blk_sel[k]) ? din : '0;
    end
  end
endmodule
