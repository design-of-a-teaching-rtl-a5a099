// tb_reset_counter: with a short period (20 clocks), checks that rst_n
// is low for the first two clocks, high from the third until the
// period ends, and that this pattern repeats every period. Then a
// power-on reset pulse in the middle of a period must restart the
// pattern from the beginning.
module tb_reset_counter;
  logic clk = 0, rst = 0, rst_n;
  int checks = 0, failures = 0;

  reset_counter #(.PERIOD(20)) dut (.clk(clk), .rst(rst), .rst_n(rst_n));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1;   // a rising edge, so the asynchronous reset takes effect
    #1 rst = 0;
    for (int cyc = 0; cyc < 100; cyc++) begin
      logic exp_v;
      exp_v = (cyc % 20) >= 2;
      checks++;
      if (rst_n !== exp_v) begin
        failures++;
        $display("FAIL cycle %0d rst_n=%0d expected %0d", cyc, rst_n, exp_v);
      end
      @(posedge clk);
      #1;
    end
    // asynchronous restart in the middle of a period (count is 100 % 20 = 0 here, advance to 7)
    repeat (7) @(posedge clk);
    #1;
    rst = 1;
    #1;
    checks++;
    if (rst_n !== 1'b0) begin failures++; $display("FAIL rst_n high during rst"); end
    rst = 0;
    for (int cyc = 0; cyc < 30; cyc++) begin
      logic exp_v;
      exp_v = (cyc % 20) >= 2;
      checks++;
      if (rst_n !== exp_v) begin
        failures++;
        $display("FAIL after restart, cycle %0d rst_n=%0d expected %0d", cyc, rst_n, exp_v);
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
