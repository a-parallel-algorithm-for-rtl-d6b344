// slut_cam: content addressable memory of one smaller look-up table.
//
// The CAM holds the templates assigned to its sLUT. Given a template it
// returns the address at which that template is stored; the address selects
// the template's grey value in the companion contone_rom. The address is D
// bits wide and 2^D - 1 entries are usable: address 0 is never a stored
// entry and is returned when the template is not in the table (or when no
// template is offered), so ROM word 0 can hold a fallback grey value.
//
// Search: key and key_valid in; match_addr and hit are registered, one clock
// after the key. If a template was stored twice the lowest address wins.
// Load: wr_en writes wr_t into entry wr_addr and marks it valid (wr_addr 0
// is ignored); the host fills the table before images are processed.
// Reset (rst_n low, synchronous) empties the table.
// The CAM-then-ROM organisation and the 2^D - 1 entry count follow the
// published design; the reserved miss address, the load port and the
// registered search result are this design's choices.
module slut_cam #(
  parameter int unsigned P = 19,
  parameter int unsigned D = 11
) (
  input  logic         clk,
  input  logic         rst_n,
  // search
  input  logic [P-1:0] key,
  input  logic         key_valid,
  output logic [D-1:0] match_addr,
  output logic         hit,
  // load
  input  logic         wr_en,
  input  logic [D-1:0] wr_addr,
  input  logic [P-1:0] wr_t
);

  localparam int unsigned DEPTH = 2 ** D;

  logic [P-1:0]     entry [DEPTH];
  logic [DEPTH-1:0] entry_valid;
  logic [D-1:0]     found_addr;

  always_ff @(posedge clk) begin
    if (wr_en && wr_addr != '0)
      entry[wr_addr] <= wr_t;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)
      entry_valid <= '0;
    else if (wr_en && wr_addr != '0)
      entry_valid[wr_addr] <= 1'b1;
  end

  // parallel compare of every entry; the lowest matching address wins
  always_comb begin
    found_addr = '0;
    for (int unsigned a = DEPTH - 1; a >= 1; a--) begin
      if (entry_valid[a] && entry[a] == key)
        found_addr = D'(a);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      match_addr <= '0;
      hit        <= 1'b0;
    end else begin
      match_addr <= key_valid ? found_addr : '0;
      hit        <= key_valid && (found_addr != '0);
    end
  end

endmodule
