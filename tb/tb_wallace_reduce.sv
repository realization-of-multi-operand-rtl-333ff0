// tb_wallace_reduce: self-check of the reduction tree at N = 64 and N = 10.
// Each column is filled with random bits up to its pyramid height
// min(c+1, 2N-1-c) (slots above it stay 0); the reference is the weighted
// count of ones, sum_c popcount(column c) * 2^c, modulo 2^(2N). The two output
// rows must add up to it. The all-ones matrix (the largest product) and the
// empty matrix are included. The number of stages the tree uses is also
// checked against the row-count rule: 10 for N = 64, 5 for N = 10.
module tb_wallace_reduce;
  localparam int N  = 64;
  localparam int NS = 10;
  logic [2*N-1:0][N-1:0]   cols;
  logic [2*N-1:0]          row0, row1;
  logic [2*NS-1:0][NS-1:0] cols_s;
  logic [2*NS-1:0]         row0_s, row1_s;
  int checks = 0, failures = 0;

  wallace_reduce #(.N(N))  dut   (.cols(cols),   .row0(row0),   .row1(row1));
  wallace_reduce #(.N(NS)) dut_s (.cols(cols_s), .row0(row0_s), .row1(row1_s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int height(int n, int c);
    return (c < n) ? c + 1 : 2 * n - 1 - c;
  endfunction

  task automatic fill(int mode);  // 0 random, 1 all ones, 2 empty
    cols = '0;
    cols_s = '0;
    for (int c = 0; c < 2 * N; c++)
      for (int k = 0; k < height(N, c); k++)
        cols[c][k] = (mode == 0) ? 1'($urandom) : (mode == 1);
    for (int c = 0; c < 2 * NS; c++)
      for (int k = 0; k < height(NS, c); k++)
        cols_s[c][k] = (mode == 0) ? 1'($urandom) : (mode == 1);
  endtask

  task automatic check_once();
    logic [2*N-1:0]  ref_l;
    logic [2*NS-1:0] ref_s;
    #1;
    ref_l = '0;
    ref_s = '0;
    for (int c = 0; c < 2 * N; c++)  ref_l += (2*N)'($countones(cols[c])) << c;
    for (int c = 0; c < 2 * NS; c++) ref_s += (2*NS)'($countones(cols_s[c])) << c;
    checks++;
    if (row0 + row1 !== ref_l) begin
      failures++;
      $display("FAIL N=64: rows %h + %h, expected %h", row0, row1, ref_l);
    end
    checks++;
    if (row0_s + row1_s !== ref_s) begin
      failures++;
      $display("FAIL N=10: rows %h + %h, expected %h", row0_s, row1_s, ref_s);
    end
  endtask

  initial begin
    checks++;
    if (mac_pkg::num_stages(64) != 10 || mac_pkg::num_stages(10) != 5) begin
      failures++;
      $display("FAIL stage count %0d %0d", mac_pkg::num_stages(64), mac_pkg::num_stages(10));
    end
    fill(1); check_once();
    fill(2); check_once();
    for (int t = 0; t < 300; t++) begin
      fill(0);
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
