// tb_cpld1_dispatch: random templates, some idle cycles; the registered
// outputs one clock later must hold, for every sLUT, the highest-numbered
// template whose reference slut number selects it. Also counts how often
// templates collide (and so are dropped).
module tb_cpld1_dispatch;
  import pih_pkg::*;
  int checks = 0, failures = 0, n_drop = 0, n_idle = 0;

  logic        clk = 0, rst_n = 0;
  logic [18:0] m;
  logic        in_valid;
  logic [18:0] in_t [NUM_LANES];
  logic        out_valid;
  logic [18:0] g_t   [NUM_SLUTS];
  tag_t        g_tag [NUM_SLUTS];

  cpld1_dispatch u_dut (.clk, .rst_n, .m, .in_valid, .in_t, .out_valid, .g_t, .g_tag);

  always #5 clk = ~clk;

  function automatic slut_t ref_slut(input logic [18:0] tt, input logic [18:0] mm);
    int cnt = $countones(tt ^ mm);
    if (tt < mm) cnt = (8 - (cnt % 8)) % 8;
    return slut_t'(cnt);
  endfunction

  logic [18:0] exp_t   [NUM_SLUTS];
  tag_t        exp_tag [NUM_SLUTS];
  logic        exp_valid;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = 19'($urandom);
    in_valid = 0;
    for (int i = 0; i < NUM_LANES; i++) in_t[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 9) != 0);
      for (int i = 0; i < NUM_LANES; i++) in_t[i] = 19'($urandom);
      // reference
      exp_valid = in_valid;
      for (int k = 0; k < NUM_SLUTS; k++) begin exp_t[k] = '0; exp_tag[k] = TAG_NONE; end
      if (in_valid) begin
        automatic int used = 0;
        for (int i = 0; i < NUM_LANES; i++) begin
          automatic slut_t s = ref_slut(in_t[i], m);
          exp_t[s] = in_t[i];
          exp_tag[s] = lane_tag(i);
        end
        for (int k = 0; k < NUM_SLUTS; k++) if (exp_tag[k] != TAG_NONE) used++;
        n_drop += NUM_LANES - used;
      end else n_idle++;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != exp_valid) begin failures++; $display("FAIL valid"); end
      for (int k = 0; k < NUM_SLUTS; k++) begin
        checks++;
        if (g_tag[k] != exp_tag[k] || (exp_tag[k] != TAG_NONE && g_t[k] != exp_t[k])) begin
          failures++;
          $display("FAIL n=%0d slut %0d tag %0d exp %0d", n, k, g_tag[k], exp_tag[k]);
        end
      end
    end
    if (n_drop == 0 || n_idle == 0) failures++;
    $display("dropped templates: %0d", n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
