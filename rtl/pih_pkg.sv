// pih_pkg: constants and types shared by the parallel look-up-table inverse
// halftoning engine.
//
// Four halftone templates are handled per clock ("lanes" t1..t4). Each one is
// sent to one of eight smaller look-up tables (sLUTs) chosen by a 3-bit slut
// number. A template travels with a 3-bit template number: 001 for t1, 010
// for t2, 011 for t3 and 100 for t4; 000 marks an sLUT port that carries no
// template in this cycle. Grey (contone) values are 8 bits wide (256 levels).
// The lane count, sLUT count, tag codes and grey width follow the published
// algorithm; the type names are this design's own.
package pih_pkg;

  localparam int unsigned NUM_LANES = 4;   // templates fetched in parallel
  localparam int unsigned NUM_SLUTS = 8;   // smaller look-up tables
  localparam int unsigned SLUT_W    = 3;   // width of a slut number
  localparam int unsigned TAG_W     = 3;   // width of a template number
  localparam int unsigned GREY_W    = 8;   // contone value width

  typedef logic [SLUT_W-1:0] slut_t;
  typedef logic [TAG_W-1:0]  tag_t;
  typedef logic [GREY_W-1:0] grey_t;

  localparam tag_t TAG_NONE = 3'b000;

  // Template number of lane 0..3 (t1..t4): 001, 010, 011, 100.
  function automatic tag_t lane_tag(input int unsigned lane);
    return tag_t'(lane + 1);
  endfunction

endpackage
