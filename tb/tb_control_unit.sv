// tb_control_unit: runs the sequencer on the default program with the
// datapath replaced by random status inputs, and compares CAR, PC and
// IR every cycle with a model of the intended sequencing written from
// the instruction set rather than from the control words: fetch,
// decode to the opcode, return to fetch; conditional branches load the
// PC from the immediate when their flag condition holds; JMP always
// does; MULT and FPADD go to their wait words, which repeat until the
// unit reports done; HALT repeats forever. The run is restarted by
// reset several times so that random flags take the program down many
// paths. Also checks that the register fields go out unchanged.
module tb_control_unit;
  import tisp_pkg::*;
  logic        clk = 0, rst = 1;
  logic        c = 0, z = 0, md = 1, fd = 0;
  ctrl_word_t  cw;
  logic [2:0]  da, aa, ba;
  logic [7:0]  imm, pc;
  logic [4:0]  car;
  logic [31:0] ir;
  logic        branch_out;

  control_unit dut (.clk(clk), .rst(rst), .c_flag(c), .z_flag(z), .mult_done(md), .fp_done(fd),
                    .cw(cw), .da(da), .aa(aa), .ba(ba), .imm(imm), .car(car), .pc(pc), .ir(ir),
                    .branch_out(branch_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [256];
  logic [4:0]  m_car;
  logic [7:0]  m_pc;
  logic [31:0] m_ir;
  int n_taken, n_not, n_waits;

  initial begin
    for (int i = 0; i < 256; i++) prog[i] = 0;
    $readmemh("rtl/tisp_program.hex", prog);
    n_taken = 0; n_not = 0; n_waits = 0;
    for (int run = 0; run < 20; run++) begin
      @(negedge clk);
      rst = 1;
      @(negedge clk);
      rst = 0;
      m_car = OP_IF; m_pc = 0; m_ir = 0;
      for (int cyc = 0; cyc < 400; cyc++) begin
        // status inputs for this cycle
        c  = 1'($urandom);
        z  = 1'($urandom);
        md = (m_car == OP_MULTNOP) ? ($urandom % 4 == 0) : 1'b1;
        fd = ($urandom % 4 == 0);
        #1;
        check(car == m_car && pc == m_pc && ir == m_ir,
              $sformatf("run %0d cycle %0d: car %b pc %0d ir %h, model car %b pc %0d ir %h",
                        run, cyc, car, pc, ir, m_car, m_pc, m_ir));
        check(da == ir[18:16] && aa == ir[10:8] && ba == ir[2:0] && imm == ir[7:0], "register fields");
        // model next state
        case (m_car)
          OP_IF:   begin m_ir = prog[m_pc]; m_pc = m_pc + 1; m_car = OP_EXO; end
          OP_EXO:  m_car = m_ir[23:19];
          OP_MULT: m_car = OP_MULTNOP;
          OP_FPADD: m_car = OP_FPNOP;
          OP_MULTNOP: begin m_car = md ? OP_IF : OP_MULTNOP; n_waits += !md; end
          OP_FPNOP:   begin m_car = fd ? OP_IF : OP_FPNOP;   n_waits += !fd; end
          OP_HALT: m_car = OP_EXO;
          OP_JMP:  begin m_pc = m_ir[7:0]; m_car = OP_IF; end
          OP_BHI, OP_BHE, OP_BLT, OP_BLE, OP_BEQ, OP_BNE: begin
            logic take;
            case (m_car)
              OP_BHI: take = !c && !z;
              OP_BHE: take = !c;
              OP_BLT: take = c;
              OP_BLE: take = c || z;
              OP_BEQ: take = z;
              default: take = !z;
            endcase
            if (take) begin m_pc = m_ir[7:0]; n_taken++; end else n_not++;
            m_car = OP_IF;
          end
          default: m_car = OP_IF;
        endcase
        @(negedge clk);
      end
    end
    check(n_taken > 0 && n_not > 0 && n_waits > 0, "branches taken, not taken and waits all seen");
    $display("taken=%0d not_taken=%0d wait_cycles=%0d", n_taken, n_not, n_waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
