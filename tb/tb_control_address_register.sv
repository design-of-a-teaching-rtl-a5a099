// tb_control_address_register: drives random MC, branch_out, opcode,
// NABRA and NASEQ values and checks that the CAR takes the opcode when
// MC is 1, NABRA when branch_out is 1, NASEQ otherwise, one clock edge
// later, and returns to the fetch address 00000 on reset.
module tb_control_address_register;
  logic       clk = 0, rst = 1, mc = 0, bo = 0;
  logic [4:0] opcode = '0, nabra = '0, naseq = '0, car, model;
  int checks = 0, failures = 0;

  control_address_register dut (.clk(clk), .rst(rst), .mc(mc), .branch_out(bo), .opcode(opcode),
                                .nabra(nabra), .naseq(naseq), .car(car));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    checks++; if (car != 0) begin failures++; $display("FAIL reset value %b", car); end
    rst = 0;
    for (int i = 0; i < 600; i++) begin
      mc = $urandom; bo = $urandom; opcode = $urandom; nabra = $urandom; naseq = $urandom;
      rst = (i % 101) == 100;
      model = rst ? 5'd0 : mc ? opcode : bo ? nabra : naseq;
      @(negedge clk);
      checks++;
      if (car != model) begin
        failures++;
        $display("FAIL cycle %0d: mc=%b bo=%b car=%b expected %b", i, mc, bo, car, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
