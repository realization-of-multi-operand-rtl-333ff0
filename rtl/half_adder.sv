// half_adder: two bits of equal weight in, sum (same weight) and carry (twice
// the weight) out: sum + 2*carry = x + y.
// The reduction tree uses it only where a column would otherwise stay taller
// than the target height of its stage; elsewhere bit pairs pass on unchanged.
// Purely combinational.
module half_adder (
  input  logic x,
  input  logic y,
  output logic carry,
  output logic sum
);

  always_comb begin
    sum   = x ^ y;
    carry = x & y;
  end

endmodule
