// control_unit: microprogrammed sequencer.
//
// Connects the program counter (PC), instruction memory (IM),
// instruction register (IR), control address register (CAR, with the
// next-address multiplexers), control ROM (CROM), the branch control
// unit and the delay register. Every cycle the CROM word at CAR is the control word.
// The next CAR is: the IR opcode when MC is 1 (MUXC); otherwise NABRA
// when branch_out is high and NASEQ when it is low. The fetch word
// (CAR 00000) loads IR <= IM[PC] (IL) and increments the PC (PI); the
// decode word EXO (00001) jumps to the opcode; the execute word then
// returns to fetch. A plain instruction therefore takes three cycles.
//
// PL loads the PC with IR[7:0]. In the conditional-branch words, which
// are the words with DELAY set, the load also needs branch_out; in
// every other word (JMP) it is unconditional. The delay register holds
// the previous word's DELAY bit for one cycle and resets the branch
// control with it. CAR, PC and IR clear on reset (synchronous, active
// high), so execution starts with a fetch from address 0. The layers
// and the next-address scheme follow the source; the gating of PL by
// branch_out and the IR field positions are this design's choice.
module control_unit
  import tisp_pkg::*;
#(
  parameter int unsigned IM_DEPTH = 256,
  parameter string       IM_INIT  = "rtl/tisp_program.hex"
) (
  input  logic        clk,
  input  logic        rst,
  // status from the datapath
  input  logic        c_flag,
  input  logic        z_flag,
  input  logic        mult_done,
  input  logic        fp_done,
  // control to the datapath
  output ctrl_word_t  cw,
  output logic [2:0]  da,
  output logic [2:0]  aa,
  output logic [2:0]  ba,
  output logic [7:0]  imm,
  // observation
  output logic [4:0]  car,
  output logic [$clog2(IM_DEPTH)-1:0] pc,
  output logic [31:0] ir,
  output logic        branch_out
);
  localparam int unsigned PC_W = $clog2(IM_DEPTH);

  logic [31:0]     im_data;
  logic [4:0]      opcode;
  logic            delay_q;
  logic            pc_load;

  program_counter #(.WIDTH(PC_W)) u_pc (
    .clk     (clk),
    .rst     (rst),
    .pi      (cw.pi),
    .pl      (pc_load),
    .load_val(PC_W'(imm)),
    .pc      (pc)
  );

  instruction_memory #(.DEPTH(IM_DEPTH), .INIT_FILE(IM_INIT)) u_im (
    .addr (pc),
    .instr(im_data)
  );

  control_rom u_crom (
    .addr(car),
    .word(cw)
  );

  branch_control u_branch (
    .bra_ins   (bra_ins_e'(cw.bra_ins)),
    .c         (c_flag),
    .z         (z_flag),
    .mult_done (mult_done),
    .fp_done   (fp_done),
    .bra_rst   (cw.bra_rst),
    .delay_q   (delay_q),
    .branch_out(branch_out)
  );

  instruction_register u_ir (
    .clk   (clk),
    .rst   (rst),
    .il    (cw.il),
    .d     (im_data),
    .ir    (ir),
    .opcode(opcode),
    .da    (da),
    .aa    (aa),
    .ba    (ba),
    .imm   (imm)
  );

  control_address_register u_car (
    .clk       (clk),
    .rst       (rst),
    .mc        (cw.mc),
    .branch_out(branch_out),
    .opcode    (opcode),
    .nabra     (cw.nabra),
    .naseq     (cw.naseq),
    .car       (car)
  );

  delay_register u_delay (
    .clk    (clk),
    .rst    (rst),
    .delay  (cw.delay),
    .delay_q(delay_q)
  );

  assign pc_load = cw.pl & (branch_out | !cw.delay);
endmodule
