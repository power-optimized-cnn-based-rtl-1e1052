// output_buffer: gated multiplexer on the read-out data path.
//
// Reads the word that the ring counter points at. The selection is done in
// two levels: inside each block the ring-counter bits pick one of its SEG
// words, and only the block that holds the pointer drives its result onto the
// output bus; the other blocks' results are forced to zero. The value read at
// an edge is the word about to be overwritten, i.e. the one written DEPTH
// writes earlier, and it is registered into dout, so the buffer delays its
// input by DEPTH write cycles. The gated two-level mux follows the described
// design; the AND-OR form and the output register are this design's choices.
//
// Interface: clk, rst_n, re (read at this edge), ring[DEPTH-1:0],
// blk_sel[NBLK-1:0], mem[DEPTH], dout[WIDTH-1:0] (registered, one cycle after
// the edge at which it was read).
module output_buffer #(
  parameter int unsigned WIDTH = cam_pkg::CAM_WIDTH,
  parameter int unsigned DEPTH = cam_pkg::CAM_DEPTH,
  parameter int unsigned SEG   = cam_pkg::CAM_SEG,
  localparam int unsigned NBLK = DEPTH / SEG
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             re,
  input  logic [DEPTH-1:0] ring,
  input  logic [NBLK-1:0]  blk_sel,
  input  logic [WIDTH-1:0] mem [DEPTH],
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] blk_out [NBLK];
  logic [WIDTH-1:0] rd;

  always_comb begin
    rd = '0;
    for (int k = 0; k < NBLK; k++) begin
      blk_out[k] = '0;
      for (int j = 0; j < SEG; j++) begin
        blk_out[k] |= mem[k*SEG + j] & {WIDTH{ring[k*SEG + j]}};
      end
      rd |= blk_out[k] & {WIDTH{blk_sel[k]}};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  dout <= '0;
    else if (re) dout <= rd;
  end
endmodule
