// tb_final_cpa: self-check of the 128-bit carry-propagate adder with random
// operands, a full-length carry chain (all ones + 1) and the wrap past 2^128.
// The reference is built from four 32-bit limbs with explicit carries.
module tb_final_cpa;
  localparam int W = 128;
  logic [W-1:0] x, y, s;
  int checks = 0, failures = 0;

  final_cpa #(.W(W)) dut (.x(x), .y(y), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] limb_add(logic [W-1:0] p, logic [W-1:0] q);
    logic [W-1:0] r;
    logic [32:0]  t;
    logic         c;
    c = 1'b0;
    for (int l = 0; l < W / 32; l++) begin
      t = 33'(p[32*l +: 32]) + 33'(q[32*l +: 32]) + 33'(c);
      r[32*l +: 32] = t[31:0];
      c = t[32];
    end
    return r;
  endfunction

  task automatic check_once();
    #1;
    checks++;
    if (s !== limb_add(x, y)) begin
      failures++;
      $display("FAIL %h + %h = %h", x, y, s);
    end
  endtask

  initial begin
    x = '1; y = 128'd1; check_once();
    x = '1; y = '1;     check_once();
    x = '0; y = '0;     check_once();
    for (int t = 0; t < 500; t++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom, $urandom};
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
