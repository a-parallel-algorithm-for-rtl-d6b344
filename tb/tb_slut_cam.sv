// tb_slut_cam: a 15-entry CAM (D = 4) is filled with distinct templates,
// then searched for stored and unknown templates. A stored one must return
// its address with hit one clock later; an unknown one, or an idle search,
// address 0 without hit. Reset must empty the table.
module tb_slut_cam;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  localparam int D = 4;
  logic         clk = 0, rst_n = 0;
  logic [18:0]  key;
  logic         key_valid;
  logic [D-1:0] match_addr;
  logic         hit;
  logic         wr_en;
  logic [D-1:0] wr_addr;
  logic [18:0]  wr_t;

  slut_cam #(.D(D)) u_dut (.clk, .rst_n, .key, .key_valid, .match_addr, .hit, .wr_en, .wr_addr, .wr_t);

  always #5 clk = ~clk;

  logic [18:0] stored [1:15];

  task automatic search(input logic [18:0] k, input logic kv, input int exp_addr);
    @(negedge clk);
    key = k; key_valid = kv;
    @(posedge clk); #1;
    checks++;
    if (int'(match_addr) != exp_addr || hit != (exp_addr != 0)) begin
      failures++;
      $display("FAIL key=%h addr=%0d hit=%b exp=%0d", k, match_addr, hit, exp_addr);
    end
    if (exp_addr != 0) n_hit++; else n_miss++;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = '0; key_valid = 0; wr_en = 0; wr_addr = '0; wr_t = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int a = 1; a <= 15; a++) stored[a] = 19'(a * 19'h2345 + 19'h111);
    // address 0 is ignored
    @(negedge clk); wr_en = 1; wr_addr = '0; wr_t = 19'h0abcd;
    for (int a = 1; a <= 15; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = D'(a); wr_t = stored[a];
    end
    @(negedge clk); wr_en = 0;
    search(19'h0abcd, 1, 0);
    for (int a = 15; a >= 1; a--) search(stored[a], 1, a);
    for (int a = 1; a <= 15; a++) search(stored[a], 0, 0);
    for (int i = 0; i < 200; i++) begin
      automatic int a = $urandom_range(1, 15);
      search(stored[a], 1, a);
      search(stored[a] ^ 19'h40000, 1, 0);
    end
    rst_n <= 0;
    @(posedge clk); @(negedge clk); rst_n <= 1;
    search(stored[3], 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
