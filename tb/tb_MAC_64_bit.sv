// tb_MAC_64_bit: end-to-end self-check of the 64-bit MAC at its default size.
// A reference model keeps its own 129-bit running sum of a*b (the 128-bit
// product is taken by the simulator from the operands, independently of the
// multiplier). Every cycle the test checks that p/p_carry still hold the old
// sum just before the rising edge and the new sum just after it, i.e. one
// multiply-accumulate per clock with one cycle of latency. Phases:
//   1. reset, then a short run of small operands starting with 12 * 5 = 60;
//   2. random 64-bit operands;
//   3. all-ones operands, which push the sum past 2^128 (carry bit 128 set)
//      and past 2^129 (wrap-around);
//   4. a reset in the middle of a run with non-zero operands.
// Each mechanism (reset clear, accumulation, carry into bit 128, wrap at
// 2^129) is counted and a failure is recorded for any that never occurred.
module tb_MAC_64_bit;
  localparam int N = 64;
  logic           clk = 1'b0;
  logic           rst;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  logic           p_carry;
  int checks = 0, failures = 0;
  int n_reset = 0, n_accum = 0, n_carry128 = 0, n_wrap = 0, n_cycles = 0;
  logic [2*N:0] model;

  MAC_64_bit dut (.clk(clk), .rst(rst), .a(a), .b(b), .p(p), .p_carry(p_carry));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Applies a, b, rst for one clock and checks the result around the edge.
  task automatic step(logic [N-1:0] av, logic [N-1:0] bv, logic rv);
    logic [2*N:0] nxt;
    logic [2*N:0] prod;
    a = av;
    b = bv;
    rst = rv;
    prod = (2*N+1)'((2*N)'(av) * (2*N)'(bv));
    nxt = rv ? '0 : model + prod;
    #3;  // 1 time unit before the rising edge: old sum still visible
    checks++;
    if ({p_carry, p} !== model) begin
      failures++;
      $display("FAIL before edge: %h expected %h", {p_carry, p}, model);
    end
    @(posedge clk);
    #1;
    n_cycles++;
    if (rv) n_reset++;
    else if (prod != 0) n_accum++;
    if (!rv && !model[2*N] && nxt[2*N]) n_carry128++;
    if (!rv && nxt < model) n_wrap++;
    model = nxt;
    checks++;
    if ({p_carry, p} !== model) begin
      failures++;
      $display("FAIL after edge: a=%h b=%h rst=%b -> %h expected %h",
               av, bv, rv, {p_carry, p}, model);
    end
    #1;  // leave the step 4 time units before the next falling edge
  endtask

  initial begin
    model = '0;
    a = '0; b = '0; rst = 1'b1;
    // Align to just after a falling edge so every step has the same timing.
    @(posedge clk); @(posedge clk); @(negedge clk); #1;
    // 1. reset and small operands
    step(64'd0, 64'd0, 1'b1);
    step(64'd12, 64'd5, 1'b0);
    checks++;
    if (p != 128'd60) begin failures++; $display("FAIL first product p=%0d", p); end
    for (int t = 0; t < 12; t++) step(64'($urandom_range(15)), 64'($urandom_range(15)), 1'b0);
    // 2. random operands
    for (int t = 0; t < 300; t++) step({$urandom, $urandom}, {$urandom, $urandom}, 1'b0);
    // 3. largest operands: crosses 2^128 and 2^129
    step(64'd0, 64'd0, 1'b1);
    for (int t = 0; t < 6; t++) step('1, '1, 1'b0);
    // 4. reset during a run
    step({$urandom, $urandom}, {$urandom, $urandom}, 1'b1);
    for (int t = 0; t < 5; t++) step({$urandom, $urandom}, {$urandom, $urandom}, 1'b0);
    step({$urandom, $urandom}, {$urandom, $urandom}, 1'b1);

    $display("cycles=%0d resets=%0d accumulations=%0d carry128=%0d wraps=%0d",
             n_cycles, n_reset, n_accum, n_carry128, n_wrap);
    checks++; if (n_reset    == 0) begin failures++; $display("FAIL no reset seen"); end
    checks++; if (n_accum    == 0) begin failures++; $display("FAIL no accumulation seen"); end
    checks++; if (n_carry128 == 0) begin failures++; $display("FAIL no carry into bit 128"); end
    checks++; if (n_wrap     == 0) begin failures++; $display("FAIL no wrap at 2^129"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
