// tb_cam_match: self-checking test of the parallel compare and encoder.
//
// Loads random words drawn from a small value set, so that several words
// often hold the same value, with random valid bits, and searches random
// keys from the same set. It checks every match line at once against a
// model, then checks one edge later that hit, the lowest matching address
// and the matched word are registered, and that they hold while search is
// low. It counts searches that hit, that missed and that matched more than
// one word, and fails if any of the three never occurred.
module tb_cam_match;
  localparam int unsigned WIDTH  = 8;
  localparam int unsigned DEPTH  = 32;
  localparam int unsigned ADDR_W = 8;

  logic              clk = 1'b0;
  logic              rst_n, search;
  logic [WIDTH-1:0]  key;
  logic [WIDTH-1:0]  mem [DEPTH];
  logic [DEPTH-1:0]  valid;
  logic [DEPTH-1:0]  match_lines;
  logic              hit;
  logic [ADDR_W-1:0] addr;
  logic [WIDTH-1:0]  data;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_multi = 0;
  logic              e_hit;
  logic [ADDR_W-1:0] e_addr;
  logic [WIDTH-1:0]  e_data;

  cam_match #(.WIDTH(WIDTH), .DEPTH(DEPTH), .ADDR_W(ADDR_W)) dut (
    .clk, .rst_n, .search, .key, .mem, .valid, .match_lines, .hit, .addr, .data
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n  = 1'b1;
    #1;
    rst_n  = 1'b0;
    search = 1'b0;
    key    = '0;
    valid  = '0;
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    e_hit = 1'b0; e_addr = '0; e_data = '0;
    for (int n = 0; n < 400; n++) begin
      logic [DEPTH-1:0] eml;
      int cnt;
      @(negedge clk);
      if (n % 20 == 0) begin
        for (int i = 0; i < DEPTH; i++) mem[i] = WIDTH'($urandom_range(0, 40) * 5);
        valid = DEPTH'($urandom);
      end
      key    = WIDTH'($urandom_range(0, 45) * 5);
      search = ($urandom_range(0, 4) != 0);
      #1;
      eml = '0;
      cnt = 0;
      for (int i = 0; i < DEPTH; i++) begin
        eml[i] = valid[i] && (mem[i] == key);
        if (eml[i]) cnt++;
      end
      checks++;
      if (match_lines !== eml) begin
        failures++;
        $display("FAIL match_lines=%h exp %h", match_lines, eml);
      end
      @(posedge clk);
      if (search) begin
        e_hit = (cnt > 0);
        e_addr = '0; e_data = '0;
        for (int i = 0; i < DEPTH; i++)
          if (eml[i]) begin e_addr = ADDR_W'(i); e_data = mem[i]; break; end
        if (cnt == 0) n_miss++; else n_hit++;
        if (cnt > 1) n_multi++;
      end
      #1;
      checks++;
      if (hit !== e_hit || addr !== e_addr || data !== e_data) begin
        failures++;
        $display("FAIL hit=%0b addr=%0d data=%h exp %0b %0d %h", hit, addr, data,
                 e_hit, e_addr, e_data);
      end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_multi == 0) begin
      failures++;
      $display("FAIL coverage hit=%0d miss=%0d multi=%0d", n_hit, n_miss, n_multi);
    end
    $display("searches: hit=%0d miss=%0d multiple=%0d", n_hit, n_miss, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
