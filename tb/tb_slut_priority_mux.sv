// tb_slut_priority_mux: random sets of present and absent lanes; the output
// must be the highest-numbered present lane, or empty when none is present.
module tb_slut_priority_mux;
  import pih_pkg::*;
  int checks = 0, failures = 0, n_conflict = 0;

  logic [18:0] it [NUM_LANES];
  tag_t        ig [NUM_LANES];
  logic [18:0] gt;
  tag_t        gg;

  slut_priority_mux u_dut (.in_t(it), .in_tag(ig), .g_t(gt), .g_tag(gg));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [3:0] present;
      int win, cnt;
      present = 4'(n % 16);
      win = -1; cnt = 0;
      for (int i = 0; i < NUM_LANES; i++) begin
        if (present[i]) begin
          it[i] = 19'($urandom); ig[i] = lane_tag(i); win = i; cnt++;
        end else begin
          it[i] = '0; ig[i] = TAG_NONE;
        end
      end
      if (cnt > 1) n_conflict++;
      #1;
      checks++;
      if (win < 0) begin
        if (gt != '0 || gg != TAG_NONE) begin failures++; $display("FAIL empty"); end
      end else if (gt != it[win] || gg != lane_tag(win)) begin
        failures++; $display("FAIL present=%b got tag %0d", present, gg);
      end
    end
    if (n_conflict == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
