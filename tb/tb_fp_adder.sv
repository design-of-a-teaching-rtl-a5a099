// tb_fp_adder: single-precision sums against a reference computed in
// double precision and rounded to nearest-even. Checks the seven-cycle
// latency, that done is a one-cycle pulse, that the result holds after
// it, and that operands issued on consecutive cycles come out on
// consecutive cycles in order (the adder is pipelined).
module tb_fp_adder;
  import tb_fp_ref_pkg::*;
  logic        clk = 0, rst = 1, start = 0;
  logic [31:0] a, b, r;
  logic        done;
  int checks = 0, failures = 0;

  fp_adder dut (.clk(clk), .rst(rst), .start(start), .a(a), .b(b), .result(r), .done(done));

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

  task automatic single(logic [31:0] x, logic [31:0] y);
    int cycles;
    logic [31:0] ref_v;
    ref_v = fp_add_ref(x, y);
    @(negedge clk);
    a = x; b = y; start = 1;
    @(negedge clk);
    start = 0; a = $urandom; b = $urandom;
    cycles = 1;
    while (!done && cycles < 50) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == 7, $sformatf("latency %0d, expected 7", cycles));
    check(r == ref_v, $sformatf("%h + %h = %h, expected %h", x, y, r, ref_v));
    @(negedge clk);
    check(!done, "done is a single-cycle pulse");
    check(r == ref_v, "result holds after done");
  endtask

  logic [31:0] qa[$], qb[$];
  int          got;

  initial begin
    a = 0; b = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    single(32'h3FC0_0000, 32'h4030_0000);   // 1.5 + 2.75 = 4.25
    single(32'h3F80_0000, 32'hBF80_0000);   // 1 - 1 = 0
    single(32'h4B80_0000, 32'h3F80_0000);   // 2^24 + 1: tie, rounds to even
    single(32'h4B80_0000, 32'h4040_0000);   // 2^24 + 3: tie, rounds up
    single(32'h7F7F_FFFF, 32'h7F7F_FFFF);   // overflow to infinity
    single(32'h7F80_0000, 32'h3F80_0000);   // infinity passes through
    single(32'h3F80_0001, 32'hBF80_0000);   // cancellation
    for (int i = 0; i < 300; i++) single(rand_fp(100, 150), rand_fp(100, 150));
    for (int i = 0; i < 300; i++) single(rand_fp(120, 130), rand_fp(120, 130));
    // back-to-back issue
    fork
      begin
        for (int i = 0; i < 50; i++) begin
          @(negedge clk);
          a = rand_fp(110, 140); b = rand_fp(110, 140); start = 1;
          qa.push_back(a); qb.push_back(b);
        end
        @(negedge clk);
        start = 0;
      end
      begin
        got = 0;
        while (got < 50) begin
          @(posedge clk);
          #1;
          if (done) begin
            logic [31:0] x, y;
            x = qa.pop_front(); y = qb.pop_front();
            check(r == fp_add_ref(x, y), $sformatf("pipelined %h + %h = %h", x, y, r));
            got++;
          end
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
