// cam_pkg: sizes shared by the clock-gated ring-counter CAM / delay buffer.
//
// CAM_WIDTH (8) is the word length b; the 8-bit data ports of the reference
// simulation set it. CAM_DEPTH (32) is the buffer length N, the length of the
// 32-bit one-hot ring counter in that simulation. CAM_SEG (8) is the number of
// ring-counter flip-flops that share one gated clock ("each eight DFFs in the
// ring counter are grouped into one block"). CAM_ADDR_W (8) is the width of
// the match-address output port, as in the reference simulation; only its
// low $clog2(CAM_DEPTH) bits are ever non-zero.
package cam_pkg;
  parameter int unsigned CAM_WIDTH  = 8;
  parameter int unsigned CAM_DEPTH  = 32;
  parameter int unsigned CAM_SEG    = 8;
  parameter int unsigned CAM_ADDR_W = 8;
endpackage
