// tb_mod_wallace_mult: self-check of the modified Wallace multiplier at
// N = 64 (the design size) and N = 10. Corner operands (0, 1, all ones,
// single bits) and random operands are compared with a*b computed by the
// simulator at full 128-bit width; the N = 10 instance is checked exhaustively
// over a random subset of its operand pairs.
module tb_mod_wallace_mult;
  localparam int N  = 64;
  localparam int NS = 10;
  logic [N-1:0]    a, b;
  logic [2*N-1:0]  prod;
  logic [NS-1:0]   as, bs;
  logic [2*NS-1:0] prods;
  int checks = 0, failures = 0;

  mod_wallace_mult #(.N(N))  dut   (.a(a),  .b(b),  .prod(prod));
  mod_wallace_mult #(.N(NS)) dut_s (.a(as), .b(bs), .prod(prods));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_once();
    #1;
    checks++;
    if (prod !== (2*N)'(a) * (2*N)'(b)) begin
      failures++;
      $display("FAIL %h * %h = %h", a, b, prod);
    end
    checks++;
    if (prods !== (2*NS)'(as) * (2*NS)'(bs)) begin
      failures++;
      $display("FAIL N=10 %0d * %0d = %0d", as, bs, prods);
    end
  endtask

  initial begin
    a = '0; b = '1; as = '0; bs = '1; check_once();
    a = '1; b = '1; as = '1; bs = '1; check_once();
    a = 64'd1; b = '1; as = 10'd1; bs = '1; check_once();
    for (int i = 0; i < N; i += 7) begin
      a = 64'd1 << i; b = 64'd1 << (N - 1 - i);
      as = 10'($urandom); bs = 10'($urandom);
      check_once();
    end
    for (int t = 0; t < 1000; t++) begin
      a  = {$urandom, $urandom};
      b  = {$urandom, $urandom};
      as = 10'($urandom);
      bs = 10'($urandom);
      if (t % 4 == 0) a[63:32] = '1;  // long carry chains
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
