// tb_delay_register: drives a random DELAY sequence and checks that the
// output repeats it exactly one clock later, and that reset clears it.
// Inputs change on the falling edge and the output is compared on the
// next falling edge, i.e. after exactly one rising edge; reset is
// pulsed at intervals in the middle of the sequence.
module tb_delay_register;
  logic clk = 0, rst = 1, delay = 0, delay_q;
  int checks = 0, failures = 0;

  delay_register dut (.clk(clk), .rst(rst), .delay(delay), .delay_q(delay_q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    delay = 1;
    @(negedge clk); @(negedge clk);
    checks++; if (delay_q != 0) begin failures++; $display("FAIL not cleared by reset"); end
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      delay = $urandom;
      rst   = (i % 53) == 52;
      @(negedge clk);
      // the value sampled at this edge is the one driven before it
      checks++;
      if (delay_q != (rst ? 1'b0 : delay)) begin
        failures++;
        $display("FAIL cycle %0d: delay_q=%b expected %b", i, delay_q, rst ? 1'b0 : delay);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
