// tb_fa_3to2: exhaustive self-check of the 3:2 compressor. All eight input
// combinations are applied and sum + 2*carry is compared with the count of
// ones at the inputs. A watchdog ends the run if it stalls.
module tb_fa_3to2;
  logic a, b, ci, carry, sum;
  int checks = 0, failures = 0;

  fa_3to2 dut (.a(a), .b(b), .ci(ci), .carry(carry), .sum(sum));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} != 2'($countones(3'(v)))) begin
        failures++;
        $display("FAIL a=%b b=%b ci=%b -> carry=%b sum=%b", a, b, ci, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
