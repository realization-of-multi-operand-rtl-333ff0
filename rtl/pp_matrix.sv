// pp_matrix: partial-product generation for an N x N unsigned multiplier,
// rearranged into the "inverted pyramid" the Wallace reduction works on.
//
// Bit a[i] & b[j] has weight 2^(i+j). Instead of keeping the N shifted rows, the
// bits are regrouped by column: column c (0 .. 2N-1) holds the
// min(c+1, 2N-1-c) bits of weight 2^c, packed into slots 0, 1, ... with no gaps
// (ordered by increasing i). Slots at and above a column's height are driven 0,
// and column 2N-1 is empty. Seen with slot 0 at the top, the columns form an
// inverted pyramid: tallest (N bits) in column N-1, one bit at each end.
// AND-array partial products (no recoding), as the design uses. Combinational.
module pp_matrix #(
  parameter int unsigned N = mac_pkg::OPERAND_W
) (
  input  logic [N-1:0]           a,
  input  logic [N-1:0]           b,
  output logic [2*N-1:0][N-1:0]  cols
);

  for (genvar c = 0; c < 2 * int'(N); c++) begin : g_col
    // Rows that reach column c: i = LO .. HI, with b index c - i.
    localparam int LO = (c >= int'(N)) ? c - int'(N) + 1 : 0;
    localparam int HI = (c < int'(N)) ? c : int'(N) - 1;
    for (genvar k = 0; k < int'(N); k++) begin : g_slot
      if (LO + k <= HI) begin : g_bit
        assign cols[c][k] = a[LO + k] & b[c - LO - k];
      end else begin : g_empty
        assign cols[c][k] = 1'b0;
      end
    end
  end

endmodule
