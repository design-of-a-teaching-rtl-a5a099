// tb_instruction_memory: reads the default program image and compares
// the first instructions and an unused location with words built from
// their fields (opcode, DA, AA, immediate/BA), then compares all
// locations with the image file read independently (words past the end
// of the file must read as 0).
module tb_instruction_memory;
  import tisp_pkg::*;
  logic [7:0]  addr;
  logic [31:0] instr;
  int checks = 0, failures = 0;

  instruction_memory dut (.addr(addr), .instr(instr));

  task automatic expect_word(int a, logic [31:0] w);
    addr = 8'(a);
    #1;
    checks++;
    if (instr !== w) begin
      failures++;
      $display("FAIL IM[%0d]=%h exp %h", a, instr, w);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) expect_word(r, make_instr(OP_LOAD, 3'(r), 3'd0, 8'(r + 1)));
    expect_word(8,  make_instr(OP_SHL, 3'd1, 3'd2, 8'd4));
    expect_word(10, make_instr(OP_MULT, 3'd0, 3'd2, 8'd3));
    expect_word(11, make_instr(OP_FPADD, 3'd2, 3'd2, 8'd3));
    expect_word(200, 32'd0);
    begin
      logic [31:0] image [256];
      for (int i = 0; i < 256; i++) image[i] = '0;
      $readmemh("rtl/tisp_program.hex", image);
      for (int i = 0; i < 256; i++) expect_word(i, image[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
