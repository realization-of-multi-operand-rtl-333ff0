// mod_wallace_mult: N x N unsigned multiplier built as a reduced-complexity
// ("modified") Wallace tree, prod = a * b (2N bits).
//
// Three phases: pp_matrix forms the N*N AND partial products and packs each
// column into the inverted-pyramid shape; wallace_reduce compresses the columns
// to two rows in stages of 3:2 compressors (half adders only where the stage's
// height target needs them; 10 stages for N = 64); final_cpa adds the two rows.
// The three phases follow the design description; there is no register inside,
// so the product is valid combinationally, within the same clock cycle.
module mod_wallace_mult #(
  parameter int unsigned N = mac_pkg::OPERAND_W
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] prod
);

  logic [2*N-1:0][N-1:0] cols;
  logic [2*N-1:0]        row0, row1;

  pp_matrix #(.N(N)) u_pp (
    .a   (a),
    .b   (b),
    .cols(cols)
  );

  wallace_reduce #(.N(N)) u_reduce (
    .cols(cols),
    .row0(row0),
    .row1(row1)
  );

  final_cpa #(.W(2 * N)) u_cpa (
    .x(row0),
    .y(row1),
    .s(prod)
  );

endmodule
