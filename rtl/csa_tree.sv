// csa_tree: counts the ones in a P-bit vector with a tree of carry-save
// adders.
//
// Every cell is a 3:2 counter (full adder) with a sum output of the same
// weight and a carry output of twice the weight. The tree works level by
// level: at each level every column of equal weight is cut into groups of
// three bits and each group feeds one cell; leftover bits wait for the next
// level. Once all lighter columns are down to one bit, a column holding two
// bits uses a cell whose third input is tied to 0, so the last carries
// ripple through zero-input cells at the bottom of the tree. This repeats
// until each weight holds a single bit, which is the binary count. For
// P = 16, 19 and 21 (the 16pels, 19pels and Rect templates) the tree has 15,
// 16 and 18 cells and 7, 6 and 7 levels; the cell counts equal those of the
// published trees. The published cell-to-cell wiring is not copied: any
// wiring of 3:2 counters that keeps the weights straight gives the same sum.
//
// Interface: bits (P) in, count ($clog2(P+1) bits) out. Purely combinational.
module csa_tree #(
  parameter int unsigned P = 19
) (
  input  logic [P-1:0]             bits,
  output logic [$clog2(P+1)-1:0]   count
);

  localparam int unsigned SW   = $clog2(P + 1);  // width of the count
  localparam int unsigned NLEV = 2 * SW;         // more levels than ever needed
  localparam int unsigned NGRP = P / 3 + 2;      // steps to walk one column

  always_comb begin
    logic [P-1:0] cur [SW];
    logic [P-1:0] nxt [SW];
    int unsigned  n   [SW];
    int unsigned  nn  [SW];
    int unsigned  k;
    logic         a, b, c;
    logic         low_done;

    a = 1'b0;
    b = 1'b0;
    c = 1'b0;
    k = 0;
    low_done = 1'b1;
    count = '0;
    for (int unsigned w = 0; w < SW; w++) begin
      cur[w] = '0;
      n[w]   = 0;
    end
    cur[0] = bits;
    n[0]   = P;

    for (int unsigned lev = 0; lev < NLEV; lev++) begin
      for (int unsigned w = 0; w < SW; w++) begin
        nxt[w] = '0;
        nn[w]  = 0;
      end
      low_done = 1'b1;             // all lighter columns down to one bit
      for (int unsigned w = 0; w < SW; w++) begin
        k = 0;
        for (int unsigned j = 0; j < NGRP; j++) begin
          if (k + 3 <= n[w] || (k + 2 == n[w] && low_done)) begin
            // one carry-save cell: three bits of weight w (the third one 0
            // when only two are left) -> sum of weight w, carry of weight w+1
            a = cur[w][k];
            b = cur[w][k+1];
            c = (k + 3 <= n[w]) ? cur[w][k+2] : 1'b0;
            nxt[w][nn[w]] = a ^ b ^ c;
            nn[w] = nn[w] + 1;
            if (w + 1 < SW) begin
              nxt[w+1][nn[w+1]] = (a & b) | (a & c) | (b & c);
              nn[w+1] = nn[w+1] + 1;
            end
            k = (k + 3 <= n[w]) ? k + 3 : k + 2;
          end else if (k < n[w]) begin
            // a bit that does not fill a cell waits for the next level
            nxt[w][nn[w]] = cur[w][k];
            nn[w] = nn[w] + 1;
            k = k + 1;
          end
        end
        if (n[w] > 1) low_done = 1'b0;
      end
      for (int unsigned w = 0; w < SW; w++) begin
        cur[w] = nxt[w];
        n[w]   = nn[w];
      end
    end

    for (int unsigned w = 0; w < SW; w++)
      count[w] = (n[w] != 0) ? cur[w][0] : 1'b0;
  end

endmodule
