// tb_mac_adder: self-check of the 128 + 129 -> 129-bit accumulation adder.
// Random operands, a carry into bit 128 and the wrap past 2^129 are checked
// against a reference built from 32-bit limbs with explicit carries.
module tb_mac_adder;
  localparam int W = 128;
  logic [W-1:0] prod;
  logic [W:0]   acc, sum;
  int checks = 0, failures = 0;

  mac_adder #(.W(W)) dut (.prod(prod), .acc(acc), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W:0] ref_add(logic [W-1:0] p, logic [W:0] q);
    logic [W:0]  r;
    logic [32:0] t;
    logic        c;
    c = 1'b0;
    for (int l = 0; l < W / 32; l++) begin
      t = 33'(p[32*l +: 32]) + 33'(q[32*l +: 32]) + 33'(c);
      r[32*l +: 32] = t[31:0];
      c = t[32];
    end
    r[W] = q[W] ^ c;
    return r;
  endfunction

  task automatic check_once();
    #1;
    checks++;
    if (sum !== ref_add(prod, acc)) begin
      failures++;
      $display("FAIL %h + %h = %h", prod, acc, sum);
    end
  endtask

  initial begin
    prod = '1; acc = 129'd1; check_once();   // carry into bit 128
    prod = '1; acc = '1;     check_once();   // wrap past 2^129
    for (int t = 0; t < 500; t++) begin
      prod = {$urandom, $urandom, $urandom, $urandom};
      acc  = {1'($urandom), $urandom, $urandom, $urandom, $urandom};
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
