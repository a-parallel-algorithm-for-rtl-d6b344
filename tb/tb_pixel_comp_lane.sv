// tb_pixel_comp_lane: random placements of template numbers on the eight
// sLUT outputs (each number at most once); the circuit for number 010 must
// report whether 010 is present and the grey value beside it.
module tb_pixel_comp_lane;
  import pih_pkg::*;
  int checks = 0, failures = 0, n_found = 0, n_missing = 0;

  tag_t  tags [NUM_SLUTS];
  grey_t c    [NUM_SLUTS];
  logic  found;
  grey_t grey;

  pixel_comp_lane #(.LANE_TAG(3'b010)) u_dut (.tags, .c, .found, .grey);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int pos [NUM_LANES];
      automatic int where = -1;
      for (int k = 0; k < NUM_SLUTS; k++) begin tags[k] = TAG_NONE; c[k] = grey_t'($urandom); end
      for (int i = 0; i < NUM_LANES; i++) begin
        pos[i] = $urandom_range(0, 8);       // 8 = not present
        if (pos[i] < 8 && tags[pos[i]] == TAG_NONE) tags[pos[i]] = lane_tag(i);
      end
      for (int k = 0; k < NUM_SLUTS; k++) if (tags[k] == 3'b010) where = k;
      #1;
      checks++;
      if (where >= 0) begin
        n_found++;
        if (!found || grey != c[where]) begin failures++; $display("FAIL present at %0d", where); end
      end else begin
        n_missing++;
        if (found) begin failures++; $display("FAIL absent but found"); end
      end
    end
    if (n_found == 0 || n_missing == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
