// slut_index: picks the smaller look-up table (sLUT) for one template.
//
// The template t is XORed bit by bit with the constant m (the mean of all
// templates of the full table, worked out once by the host that builds the
// tables). The ones of the result are counted by a carry-save adder tree,
// giving s with a 0 added above its top bit. When t < m, compared as
// unsigned binary numbers, s is replaced by its two's complement. The three
// least significant bits of the result are the slut number 0..7. The same
// function must be used when the tables are built, so that every template
// is stored in the sLUT this unit names.
//
// Interface: t and m (P bits each) in, slut (3 bits) out. Combinational.
// The steps follow the published algorithm; treating bit 0 as the least
// significant bit of t and m in the comparison is this design's choice.
module slut_index
  import pih_pkg::*;
#(
  parameter int unsigned P = 19
) (
  input  logic [P-1:0] t,
  input  logic [P-1:0] m,
  output slut_t        slut
);

  localparam int unsigned SW = $clog2(P + 1);

  logic [P-1:0]  v;
  logic [SW-1:0] s;
  logic [SW:0]   s_ext;     // s with the extra 0 on top
  logic [SW:0]   s_signed;

  assign v = t ^ m;

  csa_tree #(.P(P)) u_csa_tree (
    .bits  (v),
    .count (s)
  );

  always_comb begin
    s_ext    = {1'b0, s};
    s_signed = (t < m) ? (~s_ext + 1'b1) : s_ext;
    slut     = s_signed[SLUT_W-1:0];
  end

endmodule
