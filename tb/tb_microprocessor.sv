// tb_microprocessor: runs the default program on the complete processor
// at its default sizes and compares it with an instruction-level model.
//
// The model reads the same program and data images, executes them one
// instruction at a time (with its own arithmetic, independent of the
// microcode) and records the address of every instruction fetched, the
// final registers, temporary register, flags and data memory, and the
// cycles each instruction should take: 3 for a single-cycle
// instruction, 3 + 65 for MULT (64 busy cycles plus the cycle that
// sees done) and 3 + 7 for FPADD. The processor is then run until its
// control address reaches the HALT word. Checked: the fetch trace, the
// cycle count, and the final state. Each mechanism of the design must
// occur at least once: conditional branch taken and not taken, jump,
// multiplier and FP-adder wait loops, the delay register being set
// after each conditional branch, the temporary register load, load and store.
module tb_microprocessor;
  import tisp_pkg::*;
  import tb_isa_model_pkg::*;

  logic        clk = 0, rst = 1;
  logic [31:0] data, ir, temp_out;
  logic [7:0]  pc;
  logic [4:0]  car;
  ctrl_word_t  cw;
  logic        c_flag, z_flag, mult_done, fp_done, branch_out;

  microprocessor dut (
    .clk(clk), .rst(rst), .data(data), .pc(pc), .car(car), .ir(ir), .cw(cw),
    .c_flag(c_flag), .z_flag(z_flag), .mult_done(mult_done), .fp_done(fp_done),
    .branch_out(branch_out), .temp_out(temp_out)
  );

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
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ DUT observation
  int d_trace[$];
  int cycles;
  int n_taken, n_not_taken, n_jump, n_mult_wait, n_fp_wait, n_delay_block;
  int n_temp_load, n_load, n_store;
  bit running;

  always @(negedge clk) if (running) begin
    cycles++;
    if (car == OP_IF) d_trace.push_back(int'(pc));
    if (car inside {OP_BHI, OP_BHE, OP_BLT, OP_BLE, OP_BEQ, OP_BNE}) begin
      if (branch_out) n_taken++; else n_not_taken++;
    end
    if (car == OP_JMP) n_jump++;
    if (car == OP_MULTNOP && branch_out) n_mult_wait++;
    if (car == OP_FPNOP && branch_out) n_fp_wait++;
    // the word after a conditional branch runs with the delay register set,
    // which holds branch_out low
    if (dut.u_cu.delay_q && car == OP_IF) begin
      n_delay_block++;
      check(!branch_out, "branch_out low while the delay register is set");
    end
    if (car == OP_MULTNOP && mult_done && temp_out != dut.u_dp.mult_hi) n_temp_load++;
    if (car == OP_LOAD) n_load++;
    if (car == OP_STORE) n_store++;
  end

  initial begin
    model_run("rtl/tisp_program.hex", "rtl/tisp_data.hex");
    $display("model: %0d instructions, %0d cycles", m_trace.size(), m_cycles);
    running = 0; cycles = 0;
    n_taken = 0; n_not_taken = 0; n_jump = 0; n_mult_wait = 0; n_fp_wait = 0;
    n_delay_block = 0; n_temp_load = 0; n_load = 0; n_store = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    running = 1;
    while (car != OP_HALT && cycles < 20000) @(negedge clk);
    running = 0;
    // cycles counts the negedges seen before the HALT word: fetch+decode
    // of HALT are its last two.
    check(cycles == m_cycles, $sformatf("cycles to HALT %0d, model %0d", cycles, m_cycles));
    check(d_trace.size() == m_trace.size(), $sformatf("fetched %0d instructions, model %0d",
                                                       d_trace.size(), m_trace.size()));
    for (int i = 0; i < d_trace.size() && i < m_trace.size(); i++)
      check(d_trace[i] == m_trace[i], $sformatf("fetch %0d at pc %0d, model %0d", i, d_trace[i], m_trace[i]));
    for (int i = 0; i < 8; i++)
      check(dut.u_dp.u_rf.regs[i] == r[i], $sformatf("R%0d = %h, model %h", i, dut.u_dp.u_rf.regs[i], r[i]));
    check(temp_out == m_temp, $sformatf("temp = %h, model %h", temp_out, m_temp));
    check(c_flag == m_c && z_flag == m_z, $sformatf("flags C=%0d Z=%0d, model C=%0d Z=%0d", c_flag, z_flag, m_c, m_z));
    for (int i = 0; i < 16; i++)
      check(dut.u_dp.u_alu.u_mem.mem[i] == mmem[i], $sformatf("M[%0d] = %h, model %h", i, dut.u_dp.u_alu.u_mem.mem[i], mmem[i]));
    // HALT keeps re-executing without fetching
    repeat (20) @(negedge clk);
    check(car inside {OP_HALT, OP_EXO} && pc == 8'(m_trace[$] + 1), "halt holds");

    $display("mechanisms: taken=%0d not_taken=%0d jump=%0d mult_wait=%0d fp_wait=%0d delay_block=%0d temp_load=%0d load=%0d store=%0d",
             n_taken, n_not_taken, n_jump, n_mult_wait, n_fp_wait, n_delay_block, n_temp_load, n_load, n_store);
    check(n_taken > 0, "a conditional branch was taken");
    check(n_not_taken > 0, "a conditional branch was not taken");
    check(n_jump > 0, "a jump ran");
    check(n_mult_wait == 64, $sformatf("multiplier wait loop ran %0d cycles, expected 64", n_mult_wait));
    check(n_fp_wait == 6, $sformatf("FP wait loop ran %0d cycles, expected 6", n_fp_wait));
    check(n_delay_block == n_taken + n_not_taken, "delay register set after every conditional branch");
    check(n_temp_load > 0, "temporary register loaded a product");
    check(n_load > 0 && n_store > 0, "load and store ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
