// contone_rom: grey-value store of one smaller look-up table.
//
// Word a holds the 8-bit grey (contone) value of the template the CAM keeps
// at address a; word 0 holds the value used when the CAM finds no match.
// The table is written once by the host through the load port and is only
// read while images are processed, which is why it is called a ROM although
// it is built as a RAM.
//
// Interface: rd_addr in, rd_data out one clock later (synchronous read).
// wr_en/wr_addr/wr_data write a word. 2^D words of 8 bits. The role of the
// memory follows the published design; the synchronous read and the load
// port are this design's choices.
module contone_rom
  import pih_pkg::*;
#(
  parameter int unsigned D = 11
) (
  input  logic         clk,
  input  logic [D-1:0] rd_addr,
  output grey_t        rd_data,
  input  logic         wr_en,
  input  logic [D-1:0] wr_addr,
  input  grey_t        wr_data
);

  grey_t mem [2 ** D];

  always_ff @(posedge clk) begin
    if (wr_en)
      mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
