// tb_alu: drives the functional unit's CONTINS/CIN codes directly and
// checks the output multiplexer for every unit: shifts both ways, the
// four logic operations, add and subtract with carry/borrow, MOVE, the
// idle code, a store followed by a load, a multiply (waiting on
// mult_done and checking the upper word) and an FP addition (waiting on
// fp_done).
module tb_alu;
  import tb_fp_ref_pkg::*;
  logic        clk = 0, rst = 1;
  logic [31:0] a = 0, b = 0, f, mult_hi;
  logic [5:0]  contins = 6'b111000;
  logic        cin = 0, c_out, mult_done, fp_done;
  int checks = 0, failures = 0;

  alu dut (.clk(clk), .rst(rst), .a(a), .b(b), .contins(contins), .cin(cin), .f(f),
           .c_out(c_out), .mult_done(mult_done), .mult_hi(mult_hi), .fp_done(fp_done));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      logic [32:0] s;
      a = $urandom; b = $urandom; cin = 0;
      contins = 6'b000000; #1; check(f == a << b[4:0], "SHL");
      contins = 6'b000100; #1; check(f == a >> b[4:0], "SHR");
      contins = 6'b001000; #1; check(f == (a & b), "AND");
      contins = 6'b001001; #1; check(f == (a | b), "OR");
      contins = 6'b001010; #1; check(f == (a ^ b), "XOR");
      contins = 6'b001011; #1; check(f == ~b, "NOT");
      contins = 6'b010000; #1; s = {1'b0, a} + {1'b0, b};
      check(f == s[31:0] && c_out == s[32], "ADD and carry");
      cin = 1; #1;
      check(f == a - b && c_out == (a < b), "SUB and borrow");
      cin = 0;
      contins = 6'b110000; #1; check(f == b, "MOVE");
      contins = 6'b111000; #1; check(f == 0 && c_out == 0, "idle");
    end
    // store then load
    @(negedge clk);
    a = 32'hDEAD_BEEF; b = 32'd42; contins = 6'b100010;
    #1 check(f == 0, "store drives nothing on the bus");
    @(negedge clk);
    a = 0; contins = 6'b100011;
    #1 check(f == 32'hDEAD_BEEF, "load returns stored word");
    contins = 6'b100000;
    #1 check(f == 0, "memory output off");
    // multiply
    @(negedge clk);
    a = 32'h1234_5678; b = 32'h9ABC_DEF0; contins = 6'b101100;
    @(negedge clk);
    contins = 6'b101000;
    check(!mult_done, "multiplier busy");
    while (!mult_done) @(negedge clk);
    check({mult_hi, f} == 64'h1234_5678 * 64'h9ABC_DEF0, "product");
    // FP add
    @(negedge clk);
    a = 32'h3FC0_0000; b = 32'h4030_0000; contins = 6'b011100;
    @(negedge clk);
    contins = 6'b011000;
    begin
      int n;
      n = 1;
      while (!fp_done && n < 50) begin @(negedge clk); n++; end
      check(n == 7, $sformatf("FP latency %0d", n));
    end
    check(f == fp_add_ref(32'h3FC0_0000, 32'h4030_0000), "FP sum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
