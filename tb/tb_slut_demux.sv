// tb_slut_demux: drives random templates, numbers and slut values and checks
// that exactly the selected output carries them and all others are empty.
module tb_slut_demux;
  import pih_pkg::*;
  int checks = 0, failures = 0;

  logic [18:0] t;
  tag_t        tag;
  slut_t       sl;
  logic [18:0] ot [NUM_SLUTS];
  tag_t        og [NUM_SLUTS];

  slut_demux u_dut (.t(t), .tag(tag), .slut(sl), .out_t(ot), .out_tag(og));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      t   = 19'($urandom);
      tag = tag_t'(1 + $urandom_range(0, 3));
      sl  = slut_t'($urandom);
      #1;
      for (int k = 0; k < NUM_SLUTS; k++) begin
        checks++;
        if (k == int'(sl)) begin
          if (ot[k] != t || og[k] != tag) begin failures++; $display("FAIL sel k=%0d", k); end
        end else begin
          if (ot[k] != '0 || og[k] != TAG_NONE) begin failures++; $display("FAIL other k=%0d", k); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
