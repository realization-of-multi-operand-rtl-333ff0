// tb_pp_matrix: self-check of the partial-product matrix at N = 64.
// For random and corner operands every slot of every column is compared with
// the expected bit: column c, slot k holds a[i] & b[c-i] for the k-th valid i
// counted from the lowest, and slots at or above the column height
// min(c+1, 2N-1-c) are 0. The weighted sum of all bits must equal a*b.
module tb_pp_matrix;
  localparam int N = 64;
  logic [N-1:0]          a, b;
  logic [2*N-1:0][N-1:0] cols;
  int checks = 0, failures = 0;

  pp_matrix #(.N(N)) dut (.a(a), .b(b), .cols(cols));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_once();
    logic [2*N-1:0] total;
    int bad;
    int k;
    logic exp_bit;
    #1;
    total = '0;
    bad = 0;
    for (int c = 0; c < 2 * N; c++) begin
      k = 0;
      for (int i = 0; i < N; i++) begin
        if (c - i >= 0 && c - i < N) begin
          exp_bit = a[i] & b[c-i];
          if (cols[c][k] !== exp_bit) bad++;
          k++;
        end
      end
      for (int j = k; j < N; j++) if (cols[c][j] !== 1'b0) bad++;
      total += (2*N)'($countones(cols[c])) << c;
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL slots a=%h b=%h: %0d wrong bits", a, b, bad);
    end
    checks++;
    if (total !== (2*N)'(a) * (2*N)'(b)) begin
      failures++;
      $display("FAIL weight a=%h b=%h sum=%h", a, b, total);
    end
  endtask

  initial begin
    a = '0; b = '0; check_once();
    a = '1; b = '1; check_once();
    a = '1; b = 64'd1; check_once();
    for (int t = 0; t < 200; t++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
