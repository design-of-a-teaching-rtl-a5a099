// tb_program_counter: reset, hold, increment with wrap-around, and load
// (which wins over increment), against a model counter. PI, PL and
// the load value are random each cycle, driven on the falling edge and
// checked after the next rising edge; the 8-bit counter must wrap from
// 255 to 0.
module tb_program_counter;
  logic       clk = 0, rst = 1, pi = 0, pl = 0;
  logic [7:0] load_val = 0, pc, model;
  int checks = 0, failures = 0;

  program_counter dut (.clk(clk), .rst(rst), .pi(pi), .pl(pl), .load_val(load_val), .pc(pc));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    checks++; if (pc != 0) begin failures++; $display("FAIL reset"); end
    rst = 0; model = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      pi = ($urandom % 4 != 0); pl = ($urandom % 8 == 0); load_val = $urandom;
      if (n > 300 && n < 600) begin pl = 0; pi = 1; end  // long run: wraps
      @(posedge clk);
      if (pl)      model = load_val;
      else if (pi) model = model + 1;
      #1;
      checks++;
      if (pc != model) begin
        failures++;
        $display("FAIL pc=%0d exp %0d (pi=%0d pl=%0d)", pc, model, pi, pl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
