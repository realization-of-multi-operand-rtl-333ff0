// fa_3to2: 3:2 compressor (full adder), the basic cell of the Wallace reduction.
//
// Three bits of equal weight (a, b, ci) are compressed into a sum bit of the same
// weight and a carry bit of twice the weight: sum + 2*carry = a + b + ci.
// The cell is written in multiplexer form rather than as an XOR tree: the
// half-sum a^b is formed once and used as the select of two 2:1 multiplexers.
// sum picks ci or its complement, carry picks ci (when a != b) or a (when a == b).
// The select is ready before ci, which is what makes this form fast when ci is
// the late input. Pin names follow the usual A, B, Ci, Carry, Sum of a 3:2 block;
// the multiplexer form is the design's; the exact gate mapping is left to synthesis.
// Purely combinational.
module fa_3to2 (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic carry,
  output logic sum
);

  logic sel;  // half-sum a ^ b, the multiplexer select

  always_comb begin
    sel   = a ^ b;
    sum   = sel ? ~ci : ci;
    carry = sel ? ci  : a;
  end

endmodule
