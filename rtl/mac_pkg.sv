// mac_pkg: constants and helper functions shared by the MAC datapath.
//
// OPERAND_W is the operand width of the multiply-accumulate unit (64 bits, the
// size the design is built for). next_rows() is the row-count rule of the
// reduced-complexity Wallace reduction: a matrix of r rows, grouped in threes,
// leaves 2*floor(r/3) + (r mod 3) rows after one stage of full adders. The
// reduction tree uses it as the target height of each stage, and testbenches
// use it to predict the number of stages.
package mac_pkg;

  localparam int unsigned OPERAND_W = 64;

  // Rows left after one reduction stage that starts with r rows.
  function automatic int unsigned next_rows(input int unsigned r);
    return 2 * (r / 3) + (r % 3);
  endfunction

  // Number of reduction stages needed to bring r rows down to two.
  function automatic int unsigned num_stages(input int unsigned r);
    int unsigned s;
    int unsigned h;
    s = 0;
    h = r;
    while (h > 2) begin
      h = next_rows(h);
      s++;
    end
    return s;
  endfunction

endpackage
