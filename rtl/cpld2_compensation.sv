// cpld2_compensation: the pixel compensation half of the engine (the second
// programmable device of the published implementation).
//
// Four compensation circuits look up, for t1..t4, which sLUT returned that
// template's grey value. A template that lost its sLUT to a higher-numbered
// one (it was dropped) takes the grey value of its right-hand neighbour
// instead: t1 from t2, t2 from t3, t3 from t4. t4 is never dropped. The
// results leave as G1..G4, in template order, with a flag per lane telling
// which were compensated.
//
// With CHAIN = 1 a dropped template takes the neighbour's final value, so a
// run of dropped templates all copy the first kept one to their right and
// every output is a looked-up grey value. With CHAIN = 0 it takes the
// neighbour's own looked-up value only, which is 0 when the neighbour was
// dropped too, as in the published equations taken literally.
//
// Interface: in_valid, tags[8] (template numbers sent to the sLUTs) and
// c[8] (sLUT outputs) in; out_valid, grey[4] and dropped[4] out, registered,
// one clock after the input. The neighbour rule follows the published
// design; the registered output and the CHAIN option are this design's.
module cpld2_compensation
  import pih_pkg::*;
#(
  parameter bit CHAIN = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  tag_t  tags    [NUM_SLUTS],
  input  grey_t c       [NUM_SLUTS],
  output logic  out_valid,
  output grey_t grey    [NUM_LANES],
  output logic  [NUM_LANES-1:0] dropped
);

  logic  found  [NUM_LANES];
  grey_t own    [NUM_LANES];
  grey_t result [NUM_LANES];

  for (genvar i = 0; i < NUM_LANES; i++) begin : g_lane
    pixel_comp_lane #(.LANE_TAG(tag_t'(i + 1))) u_lane (
      .tags  (tags),
      .c     (c),
      .found (found[i]),
      .grey  (own[i])
    );
  end

  always_comb begin
    result[NUM_LANES-1] = own[NUM_LANES-1];
    for (int i = NUM_LANES - 2; i >= 0; i--) begin
      if (found[i])   result[i] = own[i];
      else if (CHAIN) result[i] = result[i+1];
      else            result[i] = own[i+1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      dropped   <= '0;
      for (int unsigned i = 0; i < NUM_LANES; i++) grey[i] <= '0;
    end else begin
      out_valid <= in_valid;
      for (int unsigned i = 0; i < NUM_LANES; i++) begin
        grey[i]    <= result[i];
        dropped[i] <= in_valid && !found[i];
      end
    end
  end

  a_t4_found: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> found[NUM_LANES-1]);

endmodule
