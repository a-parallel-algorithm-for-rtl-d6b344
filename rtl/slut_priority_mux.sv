// slut_priority_mux: chooses which template reaches one sLUT.
//
// The four demultiplexers each offer this sLUT either a numbered template
// or nothing (number 000). When several templates want the same sLUT, the
// one with the highest template number wins: lane 4 (t4) before t3, t3
// before t2, t2 before t1. The losers are dropped here and get their grey
// value later from a neighbour. When no lane offers a template, the output
// is template 0 with number 000.
//
// Interface: in_t[4]/in_tag[4] (lanes t1..t4, i.e. the A, B, C and D
// demultiplexer outputs for this sLUT) in; g_t/g_tag out. Combinational.
// The priority order follows the published algorithm.
module slut_priority_mux
  import pih_pkg::*;
#(
  parameter int unsigned P = 19
) (
  input  logic [P-1:0] in_t   [NUM_LANES],
  input  tag_t         in_tag [NUM_LANES],
  output logic [P-1:0] g_t,
  output tag_t         g_tag
);

  always_comb begin
    g_t   = '0;
    g_tag = TAG_NONE;
    // lowest lane first, so a higher lane that is present overrides it
    for (int unsigned i = 0; i < NUM_LANES; i++) begin
      if (in_tag[i] != TAG_NONE) begin
        g_t   = in_t[i];
        g_tag = in_tag[i];
      end
    end
  end

endmodule
