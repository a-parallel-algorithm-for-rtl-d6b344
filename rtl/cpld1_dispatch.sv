// cpld1_dispatch: the dispatch half of the engine (the first of the two
// programmable devices of the published implementation).
//
// Each clock with in_valid set it takes four templates t1..t4 that were
// fetched side by side from the halftone image. For each it computes the
// slut number (slut_index), attaches the template number 001..100, and a
// 1-to-8 demultiplexer sends it towards its sLUT. Eight priority
// multiplexers, one per sLUT, let through the highest-numbered template that
// asked for that sLUT and drop the others. The eight winners g1..g8 (template
// plus number, number 000 for an unused sLUT) are registered and go to the
// eight CAMs; their numbers also go to the compensation half.
//
// Interface: clk, rst_n (active-low, synchronous), m (P bits, constant
// while running), in_valid and in_t[4]; out_valid, g_t[8] and g_tag[8].
// Timing: one clock from input to registered output, one set of four
// templates accepted every clock. The datapath follows the published
// algorithm; the output register and the valid signal are this design's.
module cpld1_dispatch
  import pih_pkg::*;
#(
  parameter int unsigned P = 19
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [P-1:0] m,
  input  logic         in_valid,
  input  logic [P-1:0] in_t    [NUM_LANES],
  output logic         out_valid,
  output logic [P-1:0] g_t     [NUM_SLUTS],
  output tag_t         g_tag   [NUM_SLUTS]
);

  slut_t        lane_slut [NUM_LANES];
  logic [P-1:0] dmx_t     [NUM_LANES][NUM_SLUTS];
  tag_t         dmx_tag   [NUM_LANES][NUM_SLUTS];
  logic [P-1:0] mux_in_t  [NUM_SLUTS][NUM_LANES];
  tag_t         mux_in_tag[NUM_SLUTS][NUM_LANES];
  logic [P-1:0] mux_t     [NUM_SLUTS];
  tag_t         mux_tag   [NUM_SLUTS];

  for (genvar i = 0; i < NUM_LANES; i++) begin : g_lane
    slut_index #(.P(P)) u_slut_index (
      .t    (in_t[i]),
      .m    (m),
      .slut (lane_slut[i])
    );

    slut_demux #(.P(P)) u_demux (
      .t       (in_t[i]),
      .tag     (in_valid ? lane_tag(i) : TAG_NONE),
      .slut    (lane_slut[i]),
      .out_t   (dmx_t[i]),
      .out_tag (dmx_tag[i])
    );
  end

  for (genvar k = 0; k < NUM_SLUTS; k++) begin : g_slut
    for (genvar i = 0; i < NUM_LANES; i++) begin : g_in
      assign mux_in_t[k][i]   = dmx_t[i][k];
      assign mux_in_tag[k][i] = dmx_tag[i][k];
    end

    slut_priority_mux #(.P(P)) u_mux (
      .in_t   (mux_in_t[k]),
      .in_tag (mux_in_tag[k]),
      .g_t    (mux_t[k]),
      .g_tag  (mux_tag[k])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int unsigned k = 0; k < NUM_SLUTS; k++) begin
        g_t[k]   <= '0;
        g_tag[k] <= TAG_NONE;
      end
    end else begin
      out_valid <= in_valid;
      for (int unsigned k = 0; k < NUM_SLUTS; k++) begin
        g_t[k]   <= mux_t[k];
        g_tag[k] <= mux_tag[k];
      end
    end
  end

  // t4 has the highest number, so it is never dropped: exactly one sLUT
  // port carries it, and no template number is ever sent to two sLUTs.
  function automatic int unsigned tag_uses(input tag_t tg, input tag_t tags [NUM_SLUTS]);
    int unsigned n = 0;
    for (int unsigned k = 0; k < NUM_SLUTS; k++)
      if (tags[k] == tg) n++;
    return n;
  endfunction

  a_t4_kept: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> tag_uses(lane_tag(NUM_LANES-1), g_tag) == 1);

  a_no_duplicate: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> (tag_uses(lane_tag(0), g_tag) <= 1 && tag_uses(lane_tag(1), g_tag) <= 1 &&
                   tag_uses(lane_tag(2), g_tag) <= 1));

endmodule
