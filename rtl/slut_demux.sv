// slut_demux: 1-to-8 demultiplexer for one numbered template.
//
// The template and its template number (001..100) appear on the output
// whose index equals the template's slut number; every other output carries
// template 0 and number 000, which downstream logic reads as "empty".
//
// Interface: t (P bits), tag (3 bits), slut (3 bits) in; out_t[8] and
// out_tag[8] out. Combinational. This is the AND-gate demultiplexer of the
// published algorithm; splitting the numbered template into a template field
// and a number field is this design's choice.
module slut_demux
  import pih_pkg::*;
#(
  parameter int unsigned P = 19
) (
  input  logic [P-1:0] t,
  input  tag_t         tag,
  input  slut_t        slut,
  output logic [P-1:0] out_t   [NUM_SLUTS],
  output tag_t         out_tag [NUM_SLUTS]
);

  always_comb begin
    for (int unsigned k = 0; k < NUM_SLUTS; k++) begin
      if (slut == slut_t'(k)) begin
        out_t[k]   = t;
        out_tag[k] = tag;
      end else begin
        out_t[k]   = '0;
        out_tag[k] = TAG_NONE;
      end
    end
  end

endmodule
