// cam_delay_buffer: clock-gated, ring-counter-addressed CAM / delay buffer.
//
// A buffer of DEPTH words of WIDTH bits whose words are always written in
// order, so it needs no address decoder: a one-hot ring counter selects the
// word, and its flip-flops are clock-gated in blocks of eight so that only
// the block holding the pointer toggles. The data paths into and out of the
// memory are a gated demultiplexer and a gated multiplexer that likewise only
// drive the active block. The stored words can also be searched by content.
//
//   sel = 0 (write mode): at each rising edge the word at the pointer is read
//     out to dop and overwritten with ip, then the pointer moves on. dop
//     therefore shows the input of DEPTH write cycles earlier (a delay buffer
//     of length DEPTH). ringop shows the pointer.
//   sel = 1 (search mode): the pointer holds and nothing is written; at each
//     rising edge ip is compared with all valid words, and one cycle later
//     hit says whether any matched, addre gives the lowest matching address
//     and muop the matched word. match_lines shows the per-word compare
//     results combinationally.
//   blk_clk_en and mem_clk_en show which blocks of the ring counter and of
//   the word array get a clock edge at the coming rising edge.
//
// Start-up: assert rst_n low (asynchronous), then pulse init high for one
// clock with sel = 0; the pointer then sits on word 0 and the first write
// goes there at the next edge. The structure (input buffer, memory block,
// output buffer, ring counter block) and the port names clk, init, sel, ip,
// muop, ringop and addre follow the described design and its simulation; the
// meaning given to sel, the hit and dop ports, the valid bits and the reset
// are this design's choices.
module cam_delay_buffer #(
  parameter int unsigned WIDTH  = cam_pkg::CAM_WIDTH,
  parameter int unsigned DEPTH  = cam_pkg::CAM_DEPTH,
  parameter int unsigned SEG    = cam_pkg::CAM_SEG,
  parameter int unsigned ADDR_W = cam_pkg::CAM_ADDR_W,
  localparam int unsigned NBLK  = DEPTH / SEG
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              sel,
  input  logic [WIDTH-1:0]  ip,
  output logic [WIDTH-1:0]  dop,
  output logic              hit,
  output logic [ADDR_W-1:0] addre,
  output logic [WIDTH-1:0]  muop,
  output logic [DEPTH-1:0]  ringop,
  output logic [NBLK-1:0]   blk_clk_en,
  output logic [NBLK-1:0]   mem_clk_en,
  output logic [DEPTH-1:0]  match_lines
);
  logic             write_mode;
  logic [NBLK-1:0]  blk_sel;
  logic [WIDTH-1:0] blk_bus [NBLK];
  logic [WIDTH-1:0] mem     [DEPTH];
  logic [DEPTH-1:0] valid;

  assign write_mode = !sel;

  ring_counter_cg #(.DEPTH(DEPTH), .SEG(SEG)) u_ring (
    .clk        (clk),
    .rst_n      (rst_n),
    .init       (init),
    .adv        (write_mode),
    .ring       (ringop),
    .blk_sel    (blk_sel),
    .blk_clk_en (blk_clk_en)
  );

  input_buffer #(.WIDTH(WIDTH), .NBLK(NBLK)) u_in (
    .we      (write_mode),
    .blk_sel (blk_sel),
    .din     (ip),
    .blk_bus (blk_bus)
  );

  memory_block #(.WIDTH(WIDTH), .DEPTH(DEPTH), .SEG(SEG)) u_mem (
    .clk        (clk),
    .rst_n      (rst_n),
    .we         (write_mode),
    .ring       (ringop),
    .blk_bus    (blk_bus),
    .mem        (mem),
    .valid      (valid),
    .blk_clk_en (mem_clk_en)
  );

  output_buffer #(.WIDTH(WIDTH), .DEPTH(DEPTH), .SEG(SEG)) u_out (
    .clk     (clk),
    .rst_n   (rst_n),
    .re      (write_mode),
    .ring    (ringop),
    .blk_sel (blk_sel),
    .mem     (mem),
    .dout    (dop)
  );

  cam_match #(.WIDTH(WIDTH), .DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_match (
    .clk         (clk),
    .rst_n       (rst_n),
    .search      (sel),
    .key         (ip),
    .mem         (mem),
    .valid       (valid),
    .match_lines (match_lines),
    .hit         (hit),
    .addr        (addre),
    .data        (muop)
  );
endmodule
