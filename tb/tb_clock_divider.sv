// tb_clock_divider: counts board clocks between output edges for the
// default divide-by-16 and checks the output is a square wave (8 input
// clocks high, 8 low) from reset onwards, and that reset stops it.
module tb_clock_divider;
  logic clk = 0, rst = 0, out;
  int checks = 0, failures = 0;

  clock_divider dut (.clk_in(clk), .rst(rst), .clk_out(out));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    logic level;
    #1 rst = 1;   // a rising edge, so the asynchronous reset takes effect
    repeat (3) @(negedge clk);
    checks++; if (out !== 0) begin failures++; $display("FAIL out during reset"); end
    rst = 0;
    level = 0;
    for (int h = 0; h < 40; h++) begin
      n = 0;
      while (out == level && n < 100) begin
        @(negedge clk);
        n++;
      end
      checks++;
      if (n != 8) begin
        failures++;
        $display("FAIL half period %0d: %0d input clocks, expected 8", h, n);
      end
      level = out;
    end
    rst = 1;
    repeat (20) @(negedge clk);
    checks++; if (out !== 0) begin failures++; $display("FAIL reset does not stop the output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
