// pixel_comp_lane: finds the grey value of one template among the eight
// sLUT outputs.
//
// Every sLUT output c1..c8 comes with the template number that was sent to
// that sLUT. This circuit decodes, for each sLUT, whether its number equals
// LANE_TAG, ORs the grey values of the matching sLUTs (at most one matches)
// and reports whether any did. found low means the template was dropped by
// the priority multiplexers and needs a value from a neighbour.
//
// Interface: tags[8] and c[8] in; found and grey out. Combinational.
// This is one of the four decode-and-OR circuits of the published
// compensation logic.
module pixel_comp_lane
  import pih_pkg::*;
#(
  parameter tag_t LANE_TAG = 3'b001
) (
  input  tag_t  tags [NUM_SLUTS],
  input  grey_t c    [NUM_SLUTS],
  output logic  found,
  output grey_t grey
);

  logic [NUM_SLUTS-1:0] sel;

  always_comb begin
    grey = '0;
    for (int unsigned k = 0; k < NUM_SLUTS; k++) begin
      sel[k] = (tags[k] == LANE_TAG);
      grey   = grey | (sel[k] ? c[k] : '0);
    end
    found = |sel;
  end

endmodule
