// tb_slut: loads a 31-entry sLUT (D = 5) plus a fallback grey value, then
// streams one search per clock (stored templates, unknown templates and
// idle slots) and checks grey value and hit two clocks after each search.
module tb_slut;
  import pih_pkg::*;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  localparam int D = 5;
  localparam grey_t FALLBACK = 8'd128;
  logic         clk = 0, rst_n = 0;
  logic [18:0]  g;
  logic         g_valid;
  grey_t        grey;
  logic         hit;
  logic         ld_en;
  logic [D-1:0] ld_addr;
  logic [18:0]  ld_t;
  grey_t        ld_grey;

  slut #(.D(D)) u_dut (.clk, .rst_n, .g, .g_valid, .grey, .hit, .ld_en, .ld_addr, .ld_t, .ld_grey);

  always #5 clk = ~clk;

  logic [18:0] tmpl [1:31];
  grey_t       val  [1:31];
  int          cyc = 0;          // rising edges seen so far
  grey_t       exp_grey [int];   // expected value, by the edge it appears at
  logic        exp_hit  [int];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare two clocks after each search
  always @(posedge clk) begin
    cyc++;
    #1;
    if (exp_grey.exists(cyc)) begin
      checks++;
      if (grey != exp_grey[cyc] || hit != exp_hit[cyc]) begin
        failures++;
        $display("FAIL grey=%0d hit=%b exp %0d %b", grey, hit, exp_grey[cyc], exp_hit[cyc]);
      end
    end
  end

  initial begin
    g = '0; g_valid = 0; ld_en = 0; ld_addr = '0; ld_t = '0; ld_grey = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int a = 1; a <= 31; a++) begin
      tmpl[a] = 19'($urandom) | 19'h40000;   // top bit set: distinct from misses below
      val[a]  = grey_t'($urandom);
    end
    @(negedge clk); ld_en = 1; ld_addr = '0; ld_t = '0; ld_grey = FALLBACK;
    for (int a = 1; a <= 31; a++) begin
      @(negedge clk); ld_en = 1; ld_addr = D'(a); ld_t = tmpl[a]; ld_grey = val[a];
    end
    @(negedge clk); ld_en = 0;
    for (int i = 0; i < 2000; i++) begin
      automatic int r = $urandom_range(0, 9);
      if (r < 6) begin
        automatic int a = $urandom_range(1, 31);
        g = tmpl[a]; g_valid = 1;
        exp_grey[cyc+2] = val[a]; exp_hit[cyc+2] = 1; n_hit++;
      end else if (r < 8) begin
        g = 19'($urandom) & 19'h3ffff; g_valid = 1;
        exp_grey[cyc+2] = FALLBACK; exp_hit[cyc+2] = 0; n_miss++;
      end else begin
        g = tmpl[1]; g_valid = 0;
        exp_grey[cyc+2] = FALLBACK; exp_hit[cyc+2] = 0;
      end
      @(negedge clk);
    end
    g_valid = 0;
    repeat (3) @(negedge clk);
    if (n_hit == 0 || n_miss == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
