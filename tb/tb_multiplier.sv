// tb_multiplier: random and corner-case 32 x 32 products against 64-bit
// integer multiplication. Checks that done falls after start, that the
// machine is busy for exactly 64 cycles after the start cycle (done is seen in the 65th), that the
// product and done then hold, and that a start while busy is ignored.
module tb_multiplier;
  logic        clk = 0, rst = 1, start = 0;
  logic [31:0] a, b, lo, hi;
  logic        done;
  int checks = 0, failures = 0;

  multiplier dut (.clk(clk), .rst(rst), .start(start), .a(a), .b(b),
                  .product_lo(lo), .product_hi(hi), .done(done));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic run(logic [31:0] x, logic [31:0] y, bit poke_busy);
    int cycles;
    logic [63:0] ref_v;
    ref_v = 64'(x) * 64'(y);
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    a = $urandom; b = $urandom;        // operands must have been latched
    cycles = 1;
    check(!done, "done low after start");
    while (!done && cycles < 200) begin
      if (poke_busy && cycles == 10) start = 1;
      @(negedge clk);
      start = 0;
      cycles++;
    end
    check(cycles == 65, $sformatf("latency %0d, expected 64 busy cycles + 1", cycles));
    check({hi, lo} == ref_v, $sformatf("%h * %h = %h_%h, expected %h", x, y, hi, lo, ref_v));
    repeat (3) @(negedge clk);
    check(done && {hi, lo} == ref_v, "result held while idle");
  endtask

  initial begin
    a = 0; b = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    check(done, "idle after reset");
    run(32'd0, 32'd12345, 0);
    run(32'hFFFF_FFFF, 32'hFFFF_FFFF, 0);
    run(32'd3, 32'd5, 1);
    run(32'h8000_0000, 32'd2, 0);
    for (int i = 0; i < 40; i++) run($urandom, $urandom, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
