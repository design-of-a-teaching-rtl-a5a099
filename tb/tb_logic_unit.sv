// tb_logic_unit: random operands through all four logic operations.
// Expected results use the language's bitwise operators (AND, OR, XOR,
// and NOT of operand B); the unit is combinational, so results are
// sampled 1 time unit after the inputs change.
module tb_logic_unit;
  import tisp_pkg::*;
  logic [31:0] a, b, f;
  lu_op_e      op;
  int checks = 0, failures = 0;

  logic_unit dut (.a(a), .b(b), .op(op), .f(f));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      logic [31:0] exp_v;
      a  = $urandom;
      b  = $urandom;
      op = lu_op_e'(i % 4);
      #1;
      case (i % 4)
        0: exp_v = a & b;
        1: exp_v = a | b;
        2: exp_v = a ^ b;
        default: exp_v = ~b;
      endcase
      checks++;
      if (f !== exp_v) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h got %h exp %h", i % 4, a, b, f, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
