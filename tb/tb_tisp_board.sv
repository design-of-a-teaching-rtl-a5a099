// tb_tisp_board: end-to-end test of the board-level design at its
// default parameters.
//
// Drives the board clock and checks: the processor clock runs at one
// sixteenth of it; the reset counter holds the processor in reset for
// two processor clocks after power-up and then releases it; the
// default program runs to HALT in the number of cycles, and with the
// fetch trace and final registers, temporary register, flags and data
// memory, that the instruction-level model predicts; the reset counter
// restarts the processor after its period, and the program runs to the
// same result again. Every mechanism is counted and must occur: divided
// clock, reset release, periodic re-reset, conditional branch taken and
// not taken, jump, multiplier and FP wait loops, delay register set,
// temporary register load, load and store.
module tb_tisp_board;
  import tisp_pkg::*;
  import tb_isa_model_pkg::*;

  logic        board_clk = 0, board_rst = 0;
  logic        cpu_clk, cpu_rst_n;
  logic [7:0]  leds, pc;
  logic [31:0] data, ir, temp_out;
  logic [4:0]  car;
  ctrl_word_t  cw;
  logic        c_flag, z_flag, mult_done, fp_done, branch_out;

  tisp_board dut (
    .board_clk(board_clk), .board_rst(board_rst), .cpu_clk(cpu_clk), .cpu_rst_n(cpu_rst_n),
    .leds(leds), .data(data), .pc(pc), .car(car), .ir(ir), .cw(cw), .c_flag(c_flag),
    .z_flag(z_flag), .mult_done(mult_done), .fp_done(fp_done), .branch_out(branch_out),
    .temp_out(temp_out)
  );

  always #1 board_clk = ~board_clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled on the processor clock's falling edge
  int n_taken, n_not_taken, n_jump, n_mult_wait, n_fp_wait, n_delay, n_temp_load, n_load, n_store;
  int n_rst_release, n_rerst;
  logic prev_rst_n;
  initial begin
    n_taken = 0; n_not_taken = 0; n_jump = 0; n_mult_wait = 0; n_fp_wait = 0; n_delay = 0;
    n_temp_load = 0; n_load = 0; n_store = 0; n_rst_release = 0; n_rerst = 0; prev_rst_n = 0;
  end
  always @(negedge cpu_clk) begin
    if (cpu_rst_n && !prev_rst_n) n_rst_release++;
    if (!cpu_rst_n && prev_rst_n) n_rerst++;
    prev_rst_n = cpu_rst_n;
    if (cpu_rst_n) begin
      if (car inside {OP_BHI, OP_BHE, OP_BLT, OP_BLE, OP_BEQ, OP_BNE}) begin
        if (branch_out) n_taken++; else n_not_taken++;
      end
      if (car == OP_JMP) n_jump++;
      if (car == OP_MULTNOP && branch_out) n_mult_wait++;
      if (car == OP_FPNOP && branch_out) n_fp_wait++;
      if (dut.u_cpu.u_cu.delay_q && car == OP_IF) n_delay++;
      if (car == OP_MULTNOP && mult_done && temp_out != dut.u_cpu.u_dp.mult_hi) n_temp_load++;
      if (car == OP_LOAD) n_load++;
      if (car == OP_STORE) n_store++;
    end
  end

  // runs from reset release to HALT and checks the result
  task automatic run_program(int pass);
    int cycles, idx;
    cycles = 0; idx = 0;
    while (!cpu_rst_n) @(negedge cpu_clk);
    while (car != OP_HALT && cycles < 5000) begin
      if (car == OP_IF) begin
        check(idx < m_trace.size() && int'(pc) == m_trace[idx],
              $sformatf("pass %0d fetch %0d at pc %0d", pass, idx, pc));
        idx++;
      end
      cycles++;
      @(negedge cpu_clk);
    end
    check(cycles == m_cycles, $sformatf("pass %0d: %0d cycles to HALT, model %0d", pass, cycles, m_cycles));
    check(idx == m_trace.size(), $sformatf("pass %0d: %0d fetches, model %0d", pass, idx, m_trace.size()));
    for (int i = 0; i < 8; i++)
      check(dut.u_cpu.u_dp.u_rf.regs[i] == r[i],
            $sformatf("pass %0d: R%0d = %h, model %h", pass, i, dut.u_cpu.u_dp.u_rf.regs[i], r[i]));
    check(temp_out == m_temp, $sformatf("pass %0d: temp %h, model %h", pass, temp_out, m_temp));
    check(c_flag == m_c && z_flag == m_z, $sformatf("pass %0d: flags", pass));
    for (int i = 0; i < 16; i++)
      check(dut.u_cpu.u_dp.u_alu.u_mem.mem[i] == mmem[i], $sformatf("pass %0d: M[%0d]", pass, i));
  endtask

  initial begin
    realtime t0, t1;
    model_run("rtl/tisp_program.hex", "rtl/tisp_data.hex");
    #1 board_rst = 1;   // a rising edge, so the asynchronous resets take effect
    repeat (4) @(negedge board_clk);
    board_rst = 0;
    // divided clock period: 16 board clocks of 2 time units
    @(posedge cpu_clk); t0 = $realtime;
    @(posedge cpu_clk); t1 = $realtime;
    check(t1 - t0 == 32.0, $sformatf("processor clock period %0t, expected 16 board clocks", t1 - t0));
    check(!cpu_rst_n || dut.u_rstgen.count >= 2, "reset held for the first two processor clocks");
    run_program(1);
    // HALT holds until the reset counter restarts the processor
    while (cpu_rst_n) @(negedge cpu_clk);
    @(negedge cpu_clk);
    check(pc == 0 && car == OP_IF, "restart from address 0");
    run_program(2);
    $display("mechanisms: rst_release=%0d rerst=%0d taken=%0d not_taken=%0d jump=%0d mult_wait=%0d fp_wait=%0d delay=%0d temp_load=%0d load=%0d store=%0d",
             n_rst_release, n_rerst, n_taken, n_not_taken, n_jump, n_mult_wait, n_fp_wait, n_delay,
             n_temp_load, n_load, n_store);
    check(n_rst_release == 2, "reset released at power-up and after the restart");
    check(n_rerst == 1, "periodic re-reset happened once");
    check(n_taken == 12 && n_not_taken == 6, "conditional branches taken and not taken (6+3 per pass)");
    check(n_jump == 2, "jump ran in each pass");
    check(n_mult_wait == 128, "multiplier wait loop, 64 cycles per pass");
    check(n_fp_wait == 12, "FP wait loop, 6 cycles per pass");
    check(n_delay == n_taken + n_not_taken, "delay register set after every conditional branch");
    check(n_temp_load > 0, "temporary register loaded");
    check(n_load > 0 && n_store > 0, "load and store ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
