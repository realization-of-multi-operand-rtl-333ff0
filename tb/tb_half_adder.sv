// tb_half_adder: exhaustive self-check of the half adder: for the four input
// pairs, sum + 2*carry must equal x + y. A watchdog ends the run if it stalls.
module tb_half_adder;
  logic x, y, carry, sum;
  int checks = 0, failures = 0;

  half_adder dut (.x(x), .y(y), .carry(carry), .sum(sum));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      checks++;
      if ({carry, sum} != 2'(int'(x) + int'(y))) begin
        failures++;
        $display("FAIL x=%b y=%b -> carry=%b sum=%b", x, y, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
