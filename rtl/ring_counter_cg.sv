// ring_counter_cg: one-hot ring counter with per-block clock gating.
//
// DEPTH D flip-flops form a ring in which a single 1 circulates; bit i of
// ring is the select line of memory word i, so words are written and read in
// order 0, 1, ..., DEPTH-1, 0, ... The flip-flops are grouped into DEPTH/SEG
// blocks (ring_segment). Each block's clock is gated and runs only while the
// 1 is about to enter, is inside, or has just left that block, so at most two
// blocks are clocked on any edge instead of all DEPTH flip-flops.
//
// After the asynchronous reset the ring is all zeros. A one-cycle pulse on
// init (with adv high) is merged into the input of the first flip-flop of
// block 0, together with the feedback from the last flip-flop, and starts the
// 1 in bit 0. The ring moves one place at every rising clock edge with adv
// high and holds otherwise. The ring structure, the blocks of eight, the R-S
// flip-flops and the initialise input follow the described circuit; the adv
// input, the reset and the block-enable outputs are this design's.
//
// Interface: clk, rst_n, init, adv, ring[DEPTH-1:0] (one-hot pointer),
// blk_sel[NBLK-1:0] (block holding the 1), blk_clk_en[NBLK-1:0] (blocks whose
// clock runs at the coming edge).
module ring_counter_cg #(
  parameter int unsigned DEPTH = cam_pkg::CAM_DEPTH,
  parameter int unsigned SEG   = cam_pkg::CAM_SEG,
  localparam int unsigned NBLK = DEPTH / SEG
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic             adv,
  output logic [DEPTH-1:0] ring,
  output logic [NBLK-1:0]  blk_sel,
  output logic [NBLK-1:0]  blk_clk_en
);
  logic [NBLK-1:0] d_first;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    if (k == 0) begin : g_first
      assign d_first[k] = init | ring[DEPTH-1];
    end else begin : g_next
      assign d_first[k] = ring[k*SEG-1];
    end

    ring_segment #(.SEG(SEG)) u_seg (
      .clk      (clk),
      .rst_n    (rst_n),
      .adv      (adv),
      .d_in     (d_first[k]),
      .rst_next (ring[((k+1)%NBLK)*SEG]),
      .q        (ring[k*SEG +: SEG]),
      .clk_en   (blk_clk_en[k])
    );

    assign blk_sel[k] = |ring[k*SEG +: SEG];
  end

  initial begin
    assert (SEG >= 2 && DEPTH % SEG == 0)
      else $error("DEPTH must be a multiple of SEG and SEG at least 2");
  end
  // Once started, the ring holds exactly one 1.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ring));
endmodule
