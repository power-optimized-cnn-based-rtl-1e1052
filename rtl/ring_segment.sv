// ring_segment: one block of the clock-gated ring counter.
//
// SEG D flip-flops in a shift chain, all clocked by one gated clock, plus an
// R-S flip-flop on the free-running clock that remembers that the circulating
// 1 is inside this block. The R-S flip-flop is set at the clock edge at which
// the first flip-flop's input (d_in) is 1, and reset at the edge after the 1
// has reached the first flip-flop of the next block (rst_next). The block's
// clock runs while the advance enable is high and either d_in or the R-S
// flip-flop is 1: the first term lets the edge through that captures the
// incoming 1, the second keeps the block clocked while the 1 travels through
// it and for the edge that hands it on. So a block is clocked for SEG+1 edges
// per pass of the 1 and stays idle the rest of the time.
//
// The grouping, the R-S flip-flop, its set and reset sources and the clock
// gate follow the described scheme; how the gate combines its inputs, the
// advance enable and the asynchronous reset are this design's choices.
//
// Interface: clk, rst_n (asynchronous, active low, clears all), adv (the ring
// advances at this edge), d_in (output of the previous block's last stage,
// with the initialise term already merged in), rst_next (output of the next
// block's first stage), q (the SEG stages, q[0] first), clk_en (this block's
// clock enable, for observation).
module ring_segment #(
  parameter int unsigned SEG = cam_pkg::CAM_SEG
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           adv,
  input  logic           d_in,
  input  logic           rst_next,
  output logic [SEG-1:0] q,
  output logic           clk_en
);
  logic rs_q;
  logic gclk;

  // R-S flip-flop: set has priority, which only matters for a one-block ring.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        rs_q <= 1'b0;
    else if (d_in)     rs_q <= 1'b1;
    else if (rst_next) rs_q <= 1'b0;
  end

  assign clk_en = adv & (d_in | rs_q);

  clock_gate u_gate (
    .clk  (clk),
    .en   (clk_en),
    .gclk (gclk)
  );

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= {q[SEG-2:0], d_in};
  end
endmodule
