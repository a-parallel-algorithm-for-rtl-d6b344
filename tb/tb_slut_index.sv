// tb_slut_index: checks the slut number against a reference written from
// the definition: ones of (t xor m), negated modulo 8 when t < m.
module tb_slut_index;
  import pih_pkg::*;
  int checks = 0, failures = 0, n_neg = 0;

  logic [18:0] t, m;
  slut_t       s;

  slut_index u_dut (.t(t), .m(m), .slut(s));

  function automatic slut_t ref_slut(input logic [18:0] tt, input logic [18:0] mm);
    int cnt = $countones(tt ^ mm);
    if (tt < mm) cnt = (8 - (cnt % 8)) % 8;
    return slut_t'(cnt);
  endfunction

  task automatic apply(input logic [18:0] tt, input logic [18:0] mm);
    t = tt; m = mm;
    #1;
    checks++;
    if (tt < mm) n_neg++;
    if (s != ref_slut(tt, mm)) begin
      failures++;
      $display("FAIL t=%h m=%h slut=%0d exp=%0d", tt, mm, s, ref_slut(tt, mm));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(19'h0, 19'h0);
    apply(19'h7ffff, 19'h0);
    apply(19'h0, 19'h7ffff);
    apply(19'h00001, 19'h00003);   // t < m, one differing bit -> 7
    for (int i = 0; i < 20000; i++) apply(19'($urandom), 19'($urandom));
    if (n_neg == 0) begin failures++; $display("FAIL negation path never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
