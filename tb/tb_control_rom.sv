// tb_control_rom: checks every one of the 32 control words field by
// field against the microprogram's rules, written here per instruction
// class rather than as a copy of the table:
//   - IF loads IR, increments PC, resets branch control, goes to EXO;
//   - EXO dispatches on the opcode (MC=1);
//   - a register-to-register ALU word writes the register file from its
//     unit with MB=1 and returns to IF; immediate forms use MB=0;
//   - LOAD/STORE use the memory unit with the immediate address, and
//     STORE does not write a register;
//   - MULT/FPADD start their unit and go to their wait word, which
//     selects the unit without restarting it, writes the result, and
//     loops on the unit's busy condition;
//   - a conditional branch has its condition code, PL and DELAY set and
//     writes no register; JMP has PL without DELAY; HALT loops through
//     EXO; NOP and unused addresses do nothing and return to IF.
// Fields that must be 0 everywhere (DC, MW, MR) and the ENABLE bit
// (0 only in IF) are checked for all words.
module tb_control_rom;
  import tisp_pkg::*;
  logic [4:0] addr;
  ctrl_word_t w;
  int checks = 0, failures = 0;

  control_rom dut (.addr(addr), .word(w));

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (addr %b word %h)", msg, addr, w);
    end
  endtask

  // expected fields of one word
  typedef struct {
    logic [2:0] unit;      // CONTINS[5:3]
    int         op;        // expected CONTINS[2:0], or -1 for "don't care"
    logic       rw, mb, cin, pl, pi, il, mc, delay, brst;
    logic [2:0] bra;
    logic [4:0] nabra, naseq;
    bit         check_nabra, check_mb, check_cin;
  } exp_t;

  function automatic exp_t plain(logic [2:0] unit, int op, logic mb, logic cin);
    exp_t e;
    e = '{unit: unit, op: op, rw: 1'b0, mb: mb, cin: cin, pl: 1'b0, pi: 1'b0, il: 1'b0,
          mc: 1'b0, delay: 1'b0, brst: 1'b0, bra: 3'b110, nabra: 5'd0, naseq: 5'd0,
          check_nabra: 1'b0, check_mb: 1'b1, check_cin: 1'b1};
    return e;
  endfunction

  function automatic exp_t nothing();
    exp_t e;
    e = plain(3'b111, -1, 1'b0, 1'b0);
    e.rw = 1'b1; e.check_mb = 1'b0; e.check_cin = 1'b0;
    return e;
  endfunction

  function automatic exp_t branch(logic [2:0] code);
    exp_t e;
    e = nothing();
    e.unit = 3'b011; e.pl = 1'b1; e.delay = 1'b1; e.bra = code;
    e.check_nabra = 1'b1;   // both successors are IF
    return e;
  endfunction

  function automatic exp_t expected(logic [4:0] a);
    exp_t e;
    case (a)
      5'b00000: begin
        e = nothing(); e.unit = 3'b011; e.il = 1'b1; e.pi = 1'b1; e.brst = 1'b1;
        e.delay = 1'b1; e.naseq = 5'b00001;
      end
      5'b00001: begin e = nothing(); e.unit = 3'b011; e.mc = 1'b1; end
      5'b00010: e = plain(3'b001, 0, 1'b1, 1'b0);   // AND
      5'b00011: e = plain(3'b001, 1, 1'b1, 1'b0);   // OR
      5'b00100: e = plain(3'b001, 3, 1'b1, 1'b0);   // NOT
      5'b00110: e = plain(3'b001, 2, 1'b1, 1'b0);   // XOR
      5'b00111: e = plain(3'b000, 0, 1'b1, 1'b0);   // SHL: direction bit 0
      5'b10111: e = plain(3'b000, 4, 1'b1, 1'b0);   // SHR: direction bit 1
      5'b01000: begin e = plain(3'b100, 2, 1'b0, 1'b0); e.rw = 1'b1; end  // STORE
      5'b01001: e = plain(3'b100, 3, 1'b0, 1'b0);   // LOAD
      5'b01010: e = plain(3'b010, -1, 1'b0, 1'b0);  // ADDI
      5'b01011: e = plain(3'b001, 3, 1'b0, 1'b0);   // NOTI
      5'b01100: e = plain(3'b010, -1, 1'b1, 1'b0);  // ADD
      5'b01101: e = plain(3'b010, -1, 1'b1, 1'b1);  // SUB
      5'b10101: e = plain(3'b110, -1, 1'b1, 1'b0);  // MOVE
      5'b10011: begin e = plain(3'b011, 4, 1'b1, 1'b0); e.naseq = 5'b10110; end  // FPADD start
      5'b10100: begin e = plain(3'b101, 4, 1'b1, 1'b0); e.naseq = 5'b11000; end  // MULT start
      5'b11000: begin  // MULTNOP
        e = plain(3'b101, 0, 1'b0, 1'b0); e.bra = 3'b110; e.nabra = 5'b11000;
        e.check_nabra = 1'b1; e.check_mb = 1'b0; e.check_cin = 1'b0;
      end
      5'b10110: begin  // FPNOP
        e = plain(3'b011, 0, 1'b0, 1'b0); e.bra = 3'b111; e.nabra = 5'b10110;
        e.check_nabra = 1'b1; e.check_mb = 1'b0; e.check_cin = 1'b0;
      end
      5'b11001: e = branch(3'b000);  // BHI
      5'b11010: e = branch(3'b001);  // BHE
      5'b11011: e = branch(3'b010);  // BLT
      5'b11100: e = branch(3'b011);  // BLE
      5'b11101: e = branch(3'b100);  // BEQ
      5'b11110: e = branch(3'b101);  // BNE
      5'b01111: begin e = nothing(); e.pl = 1'b1; end  // JMP
      5'b10000: begin  // HALT: re-dispatch the same instruction forever
        e = nothing(); e.unit = 3'b011; e.naseq = 5'b00001; e.nabra = 5'b00001; e.check_nabra = 1'b1;
      end
      default: e = nothing();  // NOP and unused addresses
    endcase
    return e;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      exp_t e;
      addr = 5'(a);
      #1;
      e = expected(addr);
      check(w.contins[5:3] == e.unit, "unit select");
      if (e.op >= 0) check(w.contins[2:0] == 3'(e.op), "unit operation");
      check(w.rw == e.rw, "RW");
      if (e.check_mb)  check(w.mb == e.mb, "MB");
      if (e.check_cin) check(w.cin == e.cin, "CIN");
      check(w.pl == e.pl, "PL");
      check(w.pi == e.pi, "PI");
      check(w.il == e.il, "IL");
      check(w.mc == e.mc, "MC");
      check(w.delay == e.delay, "DELAY");
      check(w.bra_rst == e.brst, "BRA_RST");
      check(w.bra_ins == e.bra, "BRA_INS");
      check(w.naseq == e.naseq, "NASEQ");
      if (e.check_nabra) check(w.nabra == e.nabra, "NABRA");
      check(w.dc == 1'b0 && w.mw == 1'b0 && w.mr == 1'b0, "unused fields are 0");
      check(w.enable == (a != 0), "ENABLE");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
