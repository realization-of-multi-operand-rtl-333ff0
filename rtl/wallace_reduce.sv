// wallace_reduce: reduced-complexity ("modified") Wallace reduction of a
// partial-product matrix to two rows.
//
// Input: 2N columns of top-justified bits as produced by pp_matrix (column c has
// weight 2^c, slot k is its k-th bit, unused slots are 0). The matrix starts
// with r0 = N rows. Each stage groups the rows in threes. In every column,
// each group of three bits goes to a 3:2 compressor (fa_3to2): the sum stays in
// the column and the carry moves to the next column. Groups of one or two bits
// pass on unchanged, so half adders, which do not reduce the bit count, are not
// used by default. A stage that starts with r rows aims at
//   r' = 2*floor(r/3) + (r mod 3)              (mac_pkg::next_rows).
// Only where a column would still exceed r' (because carries from the column
// below land on top of its pass-through bits) are two pass-through bits given
// to a half adder; columns are visited from least significant up, since a half
// adder's carry raises the next column. Stages repeat until two rows remain.
// For N = 64 this takes 10 stages (64,43,29,20,14,10,7,5,4,3,2 rows) and the
// half adders all fall in the 10th stage; for N = 10 it takes 5 stages with 4
// half adders in the last one.
//
// The whole schedule (per stage and column: height, full adders, half adders)
// is worked out at elaboration by a constant function; the generate loops then
// place the cells. Within a column of the next stage the bits are ordered:
// full-adder sums, half-adder sums, pass-through bits, full-adder carries from
// the column below, half-adder carries from the column below. Carries out of
// column 2N-1 are dropped: the product is below 2^(2N) so they are always 0.
// The height rule and the grouping in threes follow the design description;
// the half-adder placement order (lowest column first) is this design's own.
//
// Output: row0 and row1, whose sum modulo 2^(2N) is the sum of all input bits
// by weight. Purely combinational.
module wallace_reduce #(
  parameter int unsigned N = mac_pkg::OPERAND_W
) (
  input  logic [2*N-1:0][N-1:0] cols,
  output logic [2*N-1:0]        row0,
  output logic [2*N-1:0]        row1
);

  localparam int unsigned W       = 2 * N;
  localparam int unsigned NSTAGES = mac_pkg::num_stages(N);

  // Per stage (0 .. NSTAGES) and column: a 16-bit count.
  typedef logic [NSTAGES:0][W-1:0][15:0] table_t;

  // Builds the schedule. what = 0: column heights at the input of each stage
  // (entry NSTAGES is the final two-row shape); 1: full adders; 2: half adders.
  function automatic table_t schedule(input int what);
    table_t ht, ft, hat;
    logic [W-1:0][15:0] h, f, ha, pt, n;
    int unsigned r, tgt, cin;
    for (int s = 0; s <= int'(NSTAGES); s++) begin
      ht[s]  = '0;
      ft[s]  = '0;
      hat[s] = '0;
    end
    for (int c = 0; c < int'(W); c++)
      h[c] = (c < int'(N)) ? 16'(c + 1) : 16'(int'(W) - 1 - c);
    for (int s = 0; s < int'(NSTAGES); s++) begin
      ht[s] = h;
      r = 0;
      for (int c = 0; c < int'(W); c++)
        if (int'(h[c]) > int'(r)) r = int'(h[c]);
      tgt = mac_pkg::next_rows(r);
      for (int c = 0; c < int'(W); c++) begin
        // No cells in the top column: its carries would leave the product.
        f[c]  = (c == int'(W) - 1) ? 16'd0 : h[c] / 3;
        pt[c] = h[c] - 16'd3 * f[c];
        ha[c] = '0;
        cin   = (c > 0) ? int'(f[c-1]) + int'(ha[c-1]) : 0;
        n[c]  = 16'(int'(f[c]) + int'(pt[c]) + int'(cin));
        while (int'(n[c]) > int'(tgt) && pt[c] >= 2 && c != int'(W) - 1) begin
          pt[c] = pt[c] - 16'd2;
          ha[c] = ha[c] + 16'd1;
          n[c]  = n[c] - 16'd1;
        end
      end
      ft[s]  = f;
      hat[s] = ha;
      h      = n;
    end
    ht[NSTAGES] = h;
    case (what)
      0:       return ht;
      1:       return ft;
      default: return hat;
    endcase
  endfunction

  localparam table_t HT  = schedule(0);
  localparam table_t FT  = schedule(1);
  localparam table_t HAT = schedule(2);

  // Each stage block holds its input matrix (cur) and its output matrix (nxt);
  // the output of the last stage holds the two rows.
  for (genvar s = 0; s < int'(NSTAGES); s++) begin : g_stage
    logic [W-1:0][N-1:0] cur;
    logic [W-1:0][N-1:0] nxt;

    if (s == 0) begin : g_first
      assign cur = cols;
    end else begin : g_later
      assign cur = g_stage[s-1].nxt;
    end

    for (genvar c = 0; c < int'(W); c++) begin : g_col
      localparam int F   = int'(FT[s][c]);
      localparam int HA  = int'(HAT[s][c]);
      localparam int P   = int'(HT[s][c]) - 3 * F - 2 * HA;
      localparam int NH  = int'(HT[s+1][c]);
      // Slot in column c+1 of nxt where this column's carries start: after
      // that column's own sums and pass-through bits.
      localparam int C1  = (c + 1) % int'(W);
      localparam int CB  = int'(HT[s][C1]) - 2 * int'(FT[s][C1]) - int'(HAT[s][C1]);

      for (genvar k = 0; k < F; k++) begin : g_fa
        fa_3to2 u_fa (
          .a    (cur[c][3*k]),
          .b    (cur[c][3*k+1]),
          .ci   (cur[c][3*k+2]),
          .carry(nxt[C1][CB + k]),
          .sum  (nxt[c][k])
        );
      end

      for (genvar k = 0; k < HA; k++) begin : g_ha
        half_adder u_ha (
          .x    (cur[c][3*F + 2*k]),
          .y    (cur[c][3*F + 2*k + 1]),
          .carry(nxt[C1][CB + F + k]),
          .sum  (nxt[c][F + k])
        );
      end

      for (genvar k = 0; k < P; k++) begin : g_pass
        assign nxt[c][F + HA + k] = cur[c][3*F + 2*HA + k];
      end

      // Slots above the new height are 0.
      for (genvar k = NH; k < int'(N); k++) begin : g_zero
        assign nxt[c][k] = 1'b0;
      end
    end
  end

  always_comb begin
    for (int c = 0; c < int'(W); c++) begin
      row0[c] = g_stage[NSTAGES-1].nxt[c][0];
      row1[c] = g_stage[NSTAGES-1].nxt[c][1];
    end
  end

  // The schedule must end with at most two bits in every column.
  for (genvar c = 0; c < int'(W); c++) begin : g_check
    if (HT[NSTAGES][c] > 2) begin : g_bad
      $error("wallace_reduce: column %0d left with %0d bits", c, HT[NSTAGES][c]);
    end
  end

endmodule
