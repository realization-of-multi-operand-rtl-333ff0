// final_cpa: the carry-propagate adder of the multiplier's last phase. It adds
// the two rows left by the Wallace reduction into the product:
// s = (x + y) mod 2^W. Only the function is fixed by the design; it is written
// as a word-level addition so that synthesis chooses the carry structure
// (ripple, carry-select, prefix) for the target. Purely combinational.
module final_cpa #(
  parameter int unsigned W = 2 * mac_pkg::OPERAND_W
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);

  always_comb s = x + y;

endmodule
