// tb_sample_programs: runs the two classic test programs of this
// processor on two copies of the microprocessor sharing one clock:
//
//   initial program   LOAD R2,M[1]; LOAD R3,M[2]; NOP; NOT R7; SHL R7 by
//                     R3; SHR R7 by R3; MOVE R2<-R1; HALT (the HALT is
//                     added so the run stops)
//   final program     LOAD R0..R7 from M[1..8]; SHL R1<-R2<<R4; BEQ 4;
//                     SHR R1<-R2>>R4; MULT R0<-R2*R3; FPADD R2<-R2+R3;
//                     BNE 0 - so the program repeats for ever
//
// Program and data images are tb/sample_*.hex (words are
// opcode<<19 | DA<<16 | AA<<8 | imm-or-BA). For each program the
// testbench works out, from the instruction set alone, the address and
// cycle of every fetch (3 cycles per instruction, 65 extra for MULT, 7
// extra for FPADD) and the register values, and compares them with the
// hardware. The final program is followed for three passes round its
// BNE loop. The BEQ is not taken (SHL leaves a non-zero result) and the
// BNE is taken (the FP sum is non-zero); both must be seen.
module tb_sample_programs;
  import tisp_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  // initial program
  logic [31:0] a_data, a_ir, a_temp;
  logic [7:0]  a_pc;
  logic [4:0]  a_car;
  ctrl_word_t  a_cw;
  logic        a_c, a_z, a_md, a_fd, a_bo;
  microprocessor #(.IM_INIT("tb/sample_initial_prog.hex"), .MEM_INIT("tb/sample_initial_data.hex")) u_a (
    .clk(clk), .rst(rst), .data(a_data), .pc(a_pc), .car(a_car), .ir(a_ir), .cw(a_cw),
    .c_flag(a_c), .z_flag(a_z), .mult_done(a_md), .fp_done(a_fd), .branch_out(a_bo), .temp_out(a_temp));

  // final program
  logic [31:0] b_data, b_ir, b_temp;
  logic [7:0]  b_pc;
  logic [4:0]  b_car;
  ctrl_word_t  b_cw;
  logic        b_c, b_z, b_md, b_fd, b_bo;
  microprocessor #(.IM_INIT("tb/sample_final_prog.hex"), .MEM_INIT("tb/sample_final_data.hex")) u_b (
    .clk(clk), .rst(rst), .data(b_data), .pc(b_pc), .car(b_car), .ir(b_ir), .cw(b_cw),
    .c_flag(b_c), .z_flag(b_z), .mult_done(b_md), .fp_done(b_fd), .branch_out(b_bo), .temp_out(b_temp));

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  localparam int CYCLES = 400;
  initial begin
    #((CYCLES + 100) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fetch traces: address and cycle of every IF word
  int a_fpc[$], a_fcyc[$], b_fpc[$], b_fcyc[$];
  int cycle = 0;
  int beq_not_taken = 0, bne_taken = 0, mult_wait = 0, fp_wait = 0;
  logic [31:0] b_regs_at_bne [$][8];
  logic [31:0] b_temp_at_bne [$];

  always @(posedge clk) if (!rst) begin
    if (a_car == 5'b00000) begin a_fpc.push_back(int'(a_pc)); a_fcyc.push_back(cycle); end
    if (b_car == 5'b00000) begin
      b_fpc.push_back(int'(b_pc)); b_fcyc.push_back(cycle);
      if (b_pc == 8'd13) begin
        logic [31:0] snap [8];
        for (int r = 0; r < 8; r++) snap[r] = u_b.u_dp.u_rf.regs[r];
        b_regs_at_bne.push_back(snap);
        b_temp_at_bne.push_back(b_temp);
      end
    end
    if (b_car == 5'(OP_MULTNOP) && b_bo) mult_wait++;
    if (b_car == 5'(OP_FPNOP) && b_bo) fp_wait++;
    cycle++;
  end

  initial begin
    logic [63:0] prod;
    int exp_cyc;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (CYCLES) @(posedge clk);
    #1;

    // ---------------------------------------------------- initial program
    check(a_fpc.size() == 8, $sformatf("initial: %0d fetches, expected 8", a_fpc.size()));
    for (int i = 0; i < a_fpc.size() && i < 8; i++) begin
      check(a_fpc[i] == i, $sformatf("initial: fetch %0d from %0d", i, a_fpc[i]));
      check(a_fcyc[i] == 3 * i, $sformatf("initial: fetch %0d at cycle %0d, expected %0d", i, a_fcyc[i], 3 * i));
    end
    check(u_a.u_dp.u_rf.regs[2] == 32'h0, "initial: R2 <- R1 (0)");
    check(u_a.u_dp.u_rf.regs[3] == 32'd8, "initial: R3 = M[2]");
    check(u_a.u_dp.u_rf.regs[7] == 32'h00FF_FFFF, $sformatf("initial: R7 = %h, expected 00ffffff (NOT 0, <<8, >>8)",
                                                             u_a.u_dp.u_rf.regs[7]));
    for (int r = 0; r < 8; r++)
      if (!(r inside {2, 3, 7})) check(u_a.u_dp.u_rf.regs[r] == 0, $sformatf("initial: R%0d untouched", r));
    check(a_car inside {5'(OP_HALT), 5'(OP_EXO)} && a_pc == 8'd8, "initial: halted after address 7");
    check(a_z == 1'b1, "initial: Z set by MOVE of zero");

    // ---------------------------------------------------- final program
    // fetch k (k = 0..13) of pass p: 3 cycles each, MULT (11) +65, FPADD (12) +7
    for (int i = 0; i < b_fpc.size(); i++) begin
      int k, p;
      k = i % 14;
      p = i / 14;
      exp_cyc = p * (14 * 3 + 65 + 7) + 3 * k + (k > 11 ? 65 : 0) + (k > 12 ? 7 : 0);
      check(b_fpc[i] == k, $sformatf("final: fetch %0d from %0d, expected %0d", i, b_fpc[i], k));
      check(b_fcyc[i] == exp_cyc, $sformatf("final: fetch %0d at cycle %0d, expected %0d", i, b_fcyc[i], exp_cyc));
      if (k == 10 && b_fpc[i] == 10) beq_not_taken++;
      if (k == 0 && i > 0 && b_fpc[i] == 0 && b_fpc[i - 1] == 13) bne_taken++;
    end
    check(b_fpc.size() >= 3 * 14, $sformatf("final: %0d fetches, expected at least three passes", b_fpc.size()));

    prod = 64'(32'h3FC0_0000) * 64'(32'h4030_0000);
    check(b_regs_at_bne.size() >= 3, "final: BNE reached three times");
    foreach (b_regs_at_bne[n]) begin
      check(b_regs_at_bne[n][0] == prod[31:0], $sformatf("final pass %0d: R0 = low product", n));
      check(b_temp_at_bne[n] == prod[63:32],   $sformatf("final pass %0d: temp = high product", n));
      check(b_regs_at_bne[n][1] == 32'h003F_C000, $sformatf("final pass %0d: R1 = R2 >> 8", n));
      check(b_regs_at_bne[n][2] == 32'h4088_0000, $sformatf("final pass %0d: R2 = 1.5 + 2.75 = 4.25", n));
      check(b_regs_at_bne[n][3] == 32'h4030_0000, $sformatf("final pass %0d: R3 = M[4]", n));
      check(b_regs_at_bne[n][4] == 32'd8,         $sformatf("final pass %0d: R4 = M[5]", n));
      check(b_regs_at_bne[n][5] == 32'h0F0F_0F0F, $sformatf("final pass %0d: R5 = M[6]", n));
      check(b_regs_at_bne[n][6] == 32'h8000_0001, $sformatf("final pass %0d: R6 = M[7]", n));
      check(b_regs_at_bne[n][7] == 32'd7,         $sformatf("final pass %0d: R7 = M[8]", n));
    end

    $display("mechanisms: beq_not_taken=%0d bne_taken=%0d mult_wait=%0d fp_wait=%0d",
             beq_not_taken, bne_taken, mult_wait, fp_wait);
    check(beq_not_taken >= 3, "BEQ not taken in every pass");
    check(bne_taken >= 2, "BNE taken back to 0");
    check(mult_wait > 0, "multiplier wait happened");
    check(fp_wait > 0, "FP adder wait happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
