// tb_cla_adder: compares sum and carry out of the carry-look-ahead
// adder with 33-bit integer arithmetic, for add and subtract, on corner
// cases (all-propagate chains, zero, all ones) and random operands.
module tb_cla_adder;
  logic [31:0] a, b, s;
  logic        sub, cout;
  int checks = 0, failures = 0;

  cla_adder dut (.a(a), .b(b), .sub(sub), .sum(s), .cout(cout));

  task automatic check_one(logic [31:0] x, logic [31:0] y, logic sb);
    logic [32:0] ref_v;
    a = x; b = y; sub = sb;
    #1;
    ref_v = sb ? ({1'b0, x} + {1'b0, ~y} + 33'd1) : ({1'b0, x} + {1'b0, y});
    checks++;
    if ({cout, s} !== ref_v) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%0d got %0h_%h exp %h", x, y, sb, cout, s, ref_v);
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
    check_one(32'hFFFF_FFFF, 32'h0000_0001, 0);
    check_one(32'h7FFF_FFFF, 32'h0000_0001, 0);
    check_one(32'h0000_0000, 32'h0000_0000, 1);
    check_one(32'h0000_0000, 32'h0000_0001, 1);
    check_one(32'h8000_0000, 32'h8000_0000, 0);
    check_one(32'h0F0F_0F0F, 32'hF0F0_F0F1, 0);
    for (int i = 0; i < 32; i++) check_one(32'hFFFF_FFFF >> i, 32'd1 << i, 0);
    for (int i = 0; i < 4000; i++) check_one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
