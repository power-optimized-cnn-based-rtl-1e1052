// cam_match: parallel search of all stored words.
//
// The search word drives the search lines of every word; each word compares
// all its bits with them and forms its match line, which is high when the
// word is valid and equal to the search word. The match lines are encoded to
// the lowest matching address; the hit flag says whether any word matched,
// and the matched word is read out through the match lines. Results are
// registered at the rising edge with search high and hold otherwise, so they
// appear one cycle after the search word. The per-word compare and match
// lines follow the described CAM; lowest-address priority, the registered
// outputs and the read-out of the matched word are this design's choices.
//
// Interface: clk, rst_n, search, key[WIDTH-1:0] (search lines), mem[DEPTH],
// valid[DEPTH-1:0], match_lines[DEPTH-1:0] (combinational), hit, addr
// [ADDR_W-1:0], data[WIDTH-1:0] (registered).
module cam_match #(
  parameter int unsigned WIDTH  = cam_pkg::CAM_WIDTH,
  parameter int unsigned DEPTH  = cam_pkg::CAM_DEPTH,
  parameter int unsigned ADDR_W = cam_pkg::CAM_ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              search,
  input  logic [WIDTH-1:0]  key,
  input  logic [WIDTH-1:0]  mem [DEPTH],
  input  logic [DEPTH-1:0]  valid,
  output logic [DEPTH-1:0]  match_lines,
  output logic              hit,
  output logic [ADDR_W-1:0] addr,
  output logic [WIDTH-1:0]  data
);
  logic              any_c;
  logic [ADDR_W-1:0] addr_c;
  logic [WIDTH-1:0]  data_c;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      match_lines[i] = valid[i] && (mem[i] == key);
    end
  end

  // Lowest matching address wins: scan from the top down.
  always_comb begin
    any_c  = 1'b0;
    addr_c = '0;
    data_c = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (match_lines[i]) begin
        any_c  = 1'b1;
        addr_c = ADDR_W'(i);
        data_c = mem[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit  <= 1'b0;
      addr <= '0;
      data <= '0;
    end else if (search) begin
      hit  <= any_c;
      addr <= addr_c;
      data <= data_c;
    end
  end

  initial begin
    assert (2**ADDR_W >= DEPTH) else $error("ADDR_W too narrow for DEPTH");
  end
endmodule
