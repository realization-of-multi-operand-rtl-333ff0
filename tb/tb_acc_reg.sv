// tb_acc_reg: self-check of the 129-bit PIPO register. Random words are loaded
// on successive rising edges and must appear at q right after each edge; a
// synchronous reset must clear q on the edge where rst is high, and only then.
module tb_acc_reg;
  localparam int W = 129;
  logic         clk = 1'b0;
  logic         rst;
  logic [W-1:0] d, q;
  int checks = 0, failures = 0;

  acc_reg #(.W(W)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expq;
    rst = 1'b1;
    d = {1'b1, {4{$urandom}}};
    @(posedge clk); #1;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      d = {1'($urandom), $urandom, $urandom, $urandom, $urandom};
      rst = (t % 37 == 36);
      expq = rst ? '0 : d;
      @(posedge clk); #1;
      d = ~d;  // changes after the edge must not reach q
      #2;
      checks++;
      if (q !== expq) begin
        failures++;
        $display("FAIL t=%0d q=%h expected %h", t, q, expq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
