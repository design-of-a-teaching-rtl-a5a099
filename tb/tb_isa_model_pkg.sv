// tb_isa_model_pkg: instruction-level reference model of the processor.
//
// model_run reads a program image and a data image and executes the
// program one instruction at a time, with its own arithmetic, until it
// reaches HALT. It leaves behind the final registers r, temporary
// register m_temp, flags m_c and m_z, data memory mmem, the address of
// every instruction fetched (m_trace) and the number of processor
// cycles up to the cycle in which the HALT word is first reached
// (m_cycles): 3 per instruction, 3 + 65 for MULT, 3 + 7 for FPADD and 2
// for the fetch and decode of HALT.
package tb_isa_model_pkg;
  import tisp_pkg::*;
  import tb_fp_ref_pkg::*;

  logic [31:0] prog [256];
  logic [31:0] mmem [256];
  logic [31:0] r [8];
  logic [31:0] m_temp;
  logic        m_c, m_z;
  int          m_trace[$];
  int          m_cycles;

  task automatic model_run(string prog_file, string data_file);
    int mpc, n;
    m_trace.delete();
    for (int i = 0; i < 256; i++) begin prog[i] = 0; mmem[i] = 0; end
    $readmemh(prog_file, prog);
    $readmemh(data_file, mmem);
    for (int i = 0; i < 8; i++) r[i] = 0;
    m_temp = 0; m_c = 0; m_z = 0; mpc = 0; m_cycles = 0; n = 0;
    forever begin
      logic [31:0] w, a, b, res;
      logic [4:0]  op;
      logic [2:0]  da;
      logic [7:0]  imm;
      logic [63:0] p;
      logic        wr, take;
      w   = prog[mpc];
      op  = w[23:19];
      da  = w[18:16];
      a   = r[w[10:8]];
      b   = r[w[2:0]];
      imm = w[7:0];
      m_trace.push_back(mpc);
      mpc = (mpc + 1) % 256;
      if (op == OP_HALT) begin
        m_cycles += 2;          // its fetch and decode
        break;
      end
      m_cycles += 3;
      wr = 1; res = 0; take = 0;
      case (op)
        OP_LOAD:  res = mmem[imm];
        OP_STORE: begin mmem[imm] = a; wr = 0; end
        OP_ADD:   {m_c, res} = {1'b0, a} + {1'b0, b};
        OP_ADDI:  {m_c, res} = {1'b0, a} + 33'(imm);
        OP_SUB:   begin res = a - b; m_c = (a < b); end
        OP_AND:   res = a & b;
        OP_OR:    res = a | b;
        OP_XOR:   res = a ^ b;
        OP_NOT:   res = ~b;
        OP_NOTI:  res = ~(32'(imm));
        OP_SHL:   res = a << b[4:0];
        OP_SHR:   res = a >> b[4:0];
        OP_MOVE:  res = b;
        OP_MULT:  begin p = 64'(a) * 64'(b); res = p[31:0]; m_temp = p[63:32]; m_cycles += 65; end
        OP_FPADD: begin res = fp_add_ref(a, b); m_cycles += 7; end
        OP_NOP:   wr = 0;
        OP_JMP:   begin wr = 0; take = 1; end
        OP_BHI:   begin wr = 0; take = !m_c && !m_z; end
        OP_BHE:   begin wr = 0; take = !m_c; end
        OP_BLT:   begin wr = 0; take = m_c; end
        OP_BLE:   begin wr = 0; take = m_c || m_z; end
        OP_BEQ:   begin wr = 0; take = m_z; end
        OP_BNE:   begin wr = 0; take = !m_z; end
        default:  begin $display("model: unknown opcode %b at %0d", op, mpc - 1); wr = 0; end
      endcase
      if (wr) begin
        r[da] = res;
        m_z   = (res == 0);
        if (!(op inside {OP_ADD, OP_ADDI, OP_SUB})) m_c = 0;
      end
      if (take) mpc = int'(imm);
      n++;
      if (n > 10000) break;
    end
  endtask

endpackage
