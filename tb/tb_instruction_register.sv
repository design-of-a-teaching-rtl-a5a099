// tb_instruction_register: loads random words with random load enables
// and checks, against a model register, that the word is held while IL
// is low, replaced while it is high, cleared by reset, and that the
// opcode, DA, AA, BA and immediate fields are the right bit slices.
module tb_instruction_register;
  logic        clk = 0, rst = 1, il = 0;
  logic [31:0] d = '0, ir;
  logic [4:0]  opcode;
  logic [2:0]  da, aa, ba;
  logic [7:0]  imm;
  logic [31:0] model;
  int checks = 0, failures = 0;

  instruction_register dut (.clk(clk), .rst(rst), .il(il), .d(d), .ir(ir), .opcode(opcode),
                            .da(da), .aa(aa), .ba(ba), .imm(imm));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    check(ir == 0, "cleared by reset");
    rst = 0;
    model = '0;
    for (int i = 0; i < 500; i++) begin
      il = ($urandom % 3) == 0;
      d  = $urandom;
      rst = (i % 97) == 96;
      @(posedge clk);
      if (rst) model = '0;
      else if (il) model = d;
      @(negedge clk);
      check(ir == model, $sformatf("cycle %0d: ir %h expected %h", i, ir, model));
      check(opcode == model[23:19] && da == model[18:16] && aa == model[10:8] &&
            ba == model[2:0] && imm == model[7:0], $sformatf("cycle %0d: fields of %h", i, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
