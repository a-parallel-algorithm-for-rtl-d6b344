// tb_contone_rom: fills a 64-word table (D = 6) with a known pattern, reads
// it back in random order and checks the value arrives one clock after the
// address.
module tb_contone_rom;
  import pih_pkg::*;
  int checks = 0, failures = 0;

  localparam int D = 6;
  logic         clk = 0;
  logic [D-1:0] rd_addr, wr_addr;
  grey_t        rd_data, wr_data;
  logic         wr_en;

  contone_rom #(.D(D)) u_dut (.clk, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;

  function automatic grey_t pattern(input int a);
    return grey_t'(a * 37 + 11);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = D'(a); wr_data = pattern(a);
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 500; i++) begin
      automatic int a = $urandom_range(0, 63);
      @(negedge clk); rd_addr = D'(a);
      @(posedge clk); #1;
      checks++;
      if (rd_data != pattern(a)) begin failures++; $display("FAIL addr %0d got %0d", a, rd_data); end
      rd_addr = D'(a + 1);     // changes after the edge must not show yet
      #2;
      checks++;
      if (rd_data != pattern(a)) begin failures++; $display("FAIL read not registered"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
