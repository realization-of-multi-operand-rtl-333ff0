// mac_adder: the accumulation adder of the MAC. It adds the W-bit product to
// the (W+1)-bit accumulator value fed back from the register and returns the
// (W+1)-bit sum, the extra bit holding the carry out of the 128-bit product
// width: sum = (prod + acc) mod 2^(W+1). Although this adder is often called a
// carry-save adder, a single non-redundant result of two operands requires full
// carry propagation, so it is written as a word-level carry-propagate addition
// and the carry structure is left to synthesis. Purely combinational.
module mac_adder #(
  parameter int unsigned W = 2 * mac_pkg::OPERAND_W
) (
  input  logic [W-1:0] prod,
  input  logic [W:0]   acc,
  output logic [W:0]   sum
);

  always_comb sum = {1'b0, prod} + acc;

endmodule
