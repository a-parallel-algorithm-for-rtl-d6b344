// tb_cpld2_compensation: builds legal sLUT outputs from random slut numbers
// of four templates (highest number wins each sLUT) and random grey values,
// and checks G1..G4 one clock later for both neighbour rules: CHAIN = 1
// (copy the neighbour's final value) and CHAIN = 0 (copy the neighbour's own
// looked-up value, 0 if it was dropped too).
module tb_cpld2_compensation;
  import pih_pkg::*;
  int checks = 0, failures = 0, n_drop = 0, n_run = 0;

  logic  clk = 0, rst_n = 0;
  logic  in_valid;
  tag_t  tags [NUM_SLUTS];
  grey_t c    [NUM_SLUTS];
  logic  ov1, ov0;
  grey_t g1 [NUM_LANES];
  grey_t g0 [NUM_LANES];
  logic [NUM_LANES-1:0] d1, d0;

  cpld2_compensation                  u_chain (.clk, .rst_n, .in_valid, .tags, .c, .out_valid(ov1), .grey(g1), .dropped(d1));
  cpld2_compensation #(.CHAIN(1'b0)) u_lit   (.clk, .rst_n, .in_valid, .tags, .c, .out_valid(ov0), .grey(g0), .dropped(d0));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    for (int k = 0; k < NUM_SLUTS; k++) begin tags[k] = TAG_NONE; c[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 4000; n++) begin
      int    sl [NUM_LANES];
      grey_t own [NUM_LANES];
      logic  fnd [NUM_LANES];
      grey_t e1 [NUM_LANES];
      grey_t e0 [NUM_LANES];
      @(negedge clk);
      in_valid = 1;
      for (int k = 0; k < NUM_SLUTS; k++) begin tags[k] = TAG_NONE; c[k] = grey_t'($urandom); end
      // few distinct slut numbers so that collisions are common
      for (int i = 0; i < NUM_LANES; i++) begin
        sl[i] = $urandom_range(0, 4);
        tags[sl[i]] = lane_tag(i);
      end
      for (int i = 0; i < NUM_LANES; i++) begin
        fnd[i] = (tags[sl[i]] == lane_tag(i));
        own[i] = fnd[i] ? c[sl[i]] : 8'd0;
        if (!fnd[i]) n_drop++;
      end
      if (!fnd[0] && !fnd[1]) n_run++;
      e1[3] = own[3]; e0[3] = own[3];
      for (int i = 2; i >= 0; i--) begin
        e1[i] = fnd[i] ? own[i] : e1[i+1];
        e0[i] = fnd[i] ? own[i] : own[i+1];
      end
      @(posedge clk); #1;
      checks += 2;
      if (!ov1 || !ov0) begin failures++; $display("FAIL valid"); end
      for (int i = 0; i < NUM_LANES; i++) begin
        checks += 3;
        if (g1[i] != e1[i]) begin failures++; $display("FAIL chain lane %0d got %0d exp %0d", i, g1[i], e1[i]); end
        if (g0[i] != e0[i]) begin failures++; $display("FAIL literal lane %0d got %0d exp %0d", i, g0[i], e0[i]); end
        if (d1[i] != !fnd[i]) begin failures++; $display("FAIL dropped flag lane %0d", i); end
      end
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (ov1 || d1 != '0) failures++;
    if (n_drop == 0 || n_run == 0) failures++;
    $display("dropped %0d, runs of two or more %0d", n_drop, n_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
