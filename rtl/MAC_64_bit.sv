// MAC_64_bit: 64 x 64 unsigned multiply-accumulate unit. It computes the running
// sum F = sum_i a_i * b_i of the operand pairs applied on successive clock cycles.
//
// Datapath: mod_wallace_mult (reduced-complexity Wallace multiplier, 128-bit
// product) -> mac_adder (128-bit product + 129-bit accumulator, 129-bit sum) ->
// acc_reg (129-bit PIPO register), whose output is fed back to the adder and
// brought out. Multiplier and adder form one combinational path, so each clock
// edge performs one complete multiply-accumulate:
//   rst = 1 at a rising edge:  acc <= 0
//   otherwise:                 acc <= (acc + a*b) mod 2^129
// p is bits 127:0 of the accumulator and p_carry its bit 128. a and b must be
// stable for the setup time before the edge; the new sum is visible right after
// that edge (one cycle of latency, one operation per cycle).
// Structure, widths and pin names follow the design description; the
// synchronous active-high reset, unsigned operands, the separate p_carry pin and
// the wrap at 2^129 are this design's choices.
module MAC_64_bit #(
  parameter int unsigned N = mac_pkg::OPERAND_W
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p,
  output logic           p_carry
);

  logic [2*N-1:0] prod;
  logic [2*N:0]   acc_d, acc_q;

  mod_wallace_mult #(.N(N)) u_mult (
    .a   (a),
    .b   (b),
    .prod(prod)
  );

  mac_adder #(.W(2 * N)) u_add (
    .prod(prod),
    .acc (acc_q),
    .sum (acc_d)
  );

  acc_reg #(.W(2 * N + 1)) u_acc (
    .clk(clk),
    .rst(rst),
    .d  (acc_d),
    .q  (acc_q)
  );

  assign p       = acc_q[2*N-1:0];
  assign p_carry = acc_q[2*N];

endmodule
