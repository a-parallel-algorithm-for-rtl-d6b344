// tb_csa_tree: checks the carry-save adder tree against a plain ones count
// for the three template sizes 16, 19 and 21: every single-bit and all-ones
// pattern plus 20000 random vectors each.
module tb_csa_tree;
  int checks = 0, failures = 0;

  logic [15:0] b16;  logic [4:0] c16;
  logic [18:0] b19;  logic [4:0] c19;
  logic [20:0] b21;  logic [4:0] c21;

  csa_tree #(.P(16)) u16 (.bits(b16), .count(c16));
  csa_tree            u19 (.bits(b19), .count(c19));
  csa_tree #(.P(21)) u21 (.bits(b21), .count(c21));

  task automatic apply(input logic [20:0] v);
    b16 = v[15:0]; b19 = v[18:0]; b21 = v;
    #1;
    checks += 3;
    if (c16 != 5'($countones(v[15:0]))) begin failures++; $display("FAIL p16 %h -> %0d", v[15:0], c16); end
    if (c19 != 5'($countones(v[18:0]))) begin failures++; $display("FAIL p19 %h -> %0d", v[18:0], c19); end
    if (c21 != 5'($countones(v)))       begin failures++; $display("FAIL p21 %h -> %0d", v, c21); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0);
    apply('1);
    for (int i = 0; i < 21; i++) apply(21'(1) << i);
    for (int i = 0; i < 21; i++) apply(~(21'(1) << i));
    for (int i = 0; i < 20000; i++) apply(21'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
