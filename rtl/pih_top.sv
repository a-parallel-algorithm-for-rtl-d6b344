// pih_top: parallel look-up-table inverse halftoning engine.
//
// Inverse halftoning turns a two-level (halftone) image back into a grey
// image. The look-up-table method does it by taking, for each pixel, a
// template of neighbouring halftone pixels (P bits; 19 for the "19pels"
// template) and reading the pixel's grey value from a table indexed by that
// template. This engine handles four templates per clock. The single table
// is split into eight smaller tables (sLUTs), each a CAM plus a ROM, and a
// cheap hash (the slut number) tells which sLUT holds a given template. When
// two or more of the four templates hash to the same sLUT only the highest
// numbered one is looked up; each dropped template copies the grey value of
// its right-hand neighbour.
//
// Structure: cpld1_dispatch (hash, number, demultiplex, prioritise) ->
// eight slut instances (CAM then ROM) -> cpld2_compensation. The template
// numbers sent to the sLUTs travel beside them in a two-stage delay line so
// that they reach the compensation logic together with the grey values.
//
// Interface:
//   m            hash constant (mean template), from the table builder
//   in_valid     four templates on in_t[0..3] (t1..t4, left to right)
//   ld_*         table load: ld_slut selects the sLUT, ld_addr the entry
//                (1..2^D-1 for a template; 0 writes only the fallback grey)
//   out_valid    grey[0..3] are the grey values G1..G4 of t1..t4;
//                dropped[i] says lane i was compensated from a neighbour
// Timing: four templates in and four grey values out every clock; results
// appear four clocks after their templates. Tables are loaded before
// processing starts; loading while templates flow is not supported.
// Reset: rst_n active low, synchronous; it empties every CAM.
// The block structure, widths (19-bit templates, 8-bit grey, eight sLUTs of
// 2^D - 1 entries) follow the published design; D = 11 (2047 entries per
// sLUT, for tables of about 2K entries), the pipeline registers and the
// load port are this design's choices.
module pih_top
  import pih_pkg::*;
#(
  parameter int unsigned P     = 19,
  parameter int unsigned D     = 11,
  parameter bit          CHAIN = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [P-1:0] m,
  // four templates per clock
  input  logic         in_valid,
  input  logic [P-1:0] in_t    [NUM_LANES],
  // table load
  input  logic         ld_en,
  input  slut_t        ld_slut,
  input  logic [D-1:0] ld_addr,
  input  logic [P-1:0] ld_t,
  input  grey_t        ld_grey,
  // four grey values per clock
  output logic         out_valid,
  output grey_t        grey    [NUM_LANES],
  output logic [NUM_LANES-1:0] dropped,
  output logic [NUM_SLUTS-1:0] slut_hit
);

  logic         g_valid;
  logic [P-1:0] g_t   [NUM_SLUTS];
  tag_t         g_tag [NUM_SLUTS];

  cpld1_dispatch #(.P(P)) u_cpld1 (
    .clk       (clk),
    .rst_n     (rst_n),
    .m         (m),
    .in_valid  (in_valid),
    .in_t      (in_t),
    .out_valid (g_valid),
    .g_t       (g_t),
    .g_tag     (g_tag)
  );

  grey_t c [NUM_SLUTS];

  for (genvar k = 0; k < NUM_SLUTS; k++) begin : g_slut
    slut #(.P(P), .D(D)) u_slut (
      .clk     (clk),
      .rst_n   (rst_n),
      .g       (g_t[k]),
      .g_valid (g_tag[k] != TAG_NONE),
      .grey    (c[k]),
      .hit     (slut_hit[k]),
      .ld_en   (ld_en && ld_slut == slut_t'(k)),
      .ld_addr (ld_addr),
      .ld_t    (ld_t),
      .ld_grey (ld_grey)
    );
  end

  // template numbers and valid, delayed by the sLUT latency (two clocks)
  tag_t tag_d1   [NUM_SLUTS];
  tag_t tag_d2   [NUM_SLUTS];
  logic valid_d1, valid_d2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_d1 <= 1'b0;
      valid_d2 <= 1'b0;
      for (int unsigned k = 0; k < NUM_SLUTS; k++) begin
        tag_d1[k] <= TAG_NONE;
        tag_d2[k] <= TAG_NONE;
      end
    end else begin
      valid_d1 <= g_valid;
      valid_d2 <= valid_d1;
      tag_d1   <= g_tag;
      tag_d2   <= tag_d1;
    end
  end

  cpld2_compensation #(.CHAIN(CHAIN)) u_cpld2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (valid_d2),
    .tags      (tag_d2),
    .c         (c),
    .out_valid (out_valid),
    .grey      (grey),
    .dropped   (dropped)
  );

  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    ld_en |-> !in_valid);

endmodule
