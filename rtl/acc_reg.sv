// acc_reg: W-bit parallel-in parallel-out (PIPO) accumulator register.
// All bits load in parallel on every rising clock edge (q <= d) and are
// available in parallel at q. rst is synchronous and active high and clears
// the register on the next rising edge; there is no load enable. The PIPO
// organisation follows the design description; reset polarity and timing are
// this design's choice.
module acc_reg #(
  parameter int unsigned W = 2 * mac_pkg::OPERAND_W + 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end

endmodule
