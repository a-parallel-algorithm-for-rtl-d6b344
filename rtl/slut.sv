// slut: one smaller look-up table, a CAM followed by a ROM.
//
// A template g (P bits, without its template number) enters the CAM, which
// returns the address where the template is stored; that address reads the
// template's grey value from the ROM. A template that is not stored, or an
// empty port (g_valid low), reads ROM word 0, the fallback value.
//
// Interface: g and g_valid in; grey and hit out two clocks later (one clock
// in the CAM, one in the ROM). Load port: ld_en writes template ld_t into
// CAM entry ld_addr and ld_grey into ROM word ld_addr; with ld_addr 0 only
// the ROM's fallback word is written. The CAM/ROM pair follows the
// published design; the two-clock timing and load port are this design's.
module slut
  import pih_pkg::*;
#(
  parameter int unsigned P = 19,
  parameter int unsigned D = 11
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [P-1:0] g,
  input  logic         g_valid,
  output grey_t        grey,
  output logic         hit,
  input  logic         ld_en,
  input  logic [D-1:0] ld_addr,
  input  logic [P-1:0] ld_t,
  input  grey_t        ld_grey
);

  logic [D-1:0] rom_addr;
  logic         cam_hit;

  slut_cam #(.P(P), .D(D)) u_cam (
    .clk        (clk),
    .rst_n      (rst_n),
    .key        (g),
    .key_valid  (g_valid),
    .match_addr (rom_addr),
    .hit        (cam_hit),
    .wr_en      (ld_en),
    .wr_addr    (ld_addr),
    .wr_t       (ld_t)
  );

  contone_rom #(.D(D)) u_rom (
    .clk     (clk),
    .rd_addr (rom_addr),
    .rd_data (grey),
    .wr_en   (ld_en),
    .wr_addr (ld_addr),
    .wr_data (ld_grey)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) hit <= 1'b0;
    else        hit <= cam_hit;
  end

endmodule
