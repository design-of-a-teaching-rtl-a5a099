// control_rom: the 32-word control store (CROM).
//
// Maps the control address register (CAR) to a 32-bit control word
// (field layout in tisp_pkg::ctrl_word_t). Combinational. Addresses
// 00000 (IF) and 00001 (EXO) implement fetch and decode; every opcode
// is the address of its own execute word; MULTNOP and FPNOP are hidden
// wait words that loop on themselves until the multiplier or FP adder
// is done. Unused addresses hold a NOP that returns to fetch.
//
// The words follow the source's final control-word table field by
// field, with '-' entries filled with 0 and BRA_INS '---' filled with
// the multiplier wait code, which is inactive whenever no multiply is
// running. Where this table departs from the printed one, on purpose:
//  * EXO has DELAY = 0, so the delay register does not block a branch
//    word that directly follows it.
//  * NOT and NOTI use logic code 11 (NOT), and XOR code 10, as in the
//    field description; the printed rows give NOT and NOTI other codes.
//  * STORE does not write the register file; LOAD and STORE take their
//    address from the immediate (MB = 0), matching the example
//    programs, which load from the address written in the instruction.
//  * The six branch words all have NABRA = IF, as BNE does.
//  * MULTNOP and FPNOP write the register file (RW = 0), so the result
//    present on the cycle the unit reports done is stored in R[DA].
//  * MULT starts the multiplier with CONTINS 1011xx and MULTNOP reads
//    it with 1010xx, mirroring FPADD (0111xx) and FPNOP (0110xx).
module control_rom
  import tisp_pkg::*;
(
  input  logic [4:0]  addr,
  output ctrl_word_t  word
);
  // Argument order follows the table columns.
  function automatic ctrl_word_t mkword(
      logic [2:0] bra, logic en, logic [4:0] nabra, logic delay,
      logic rw, logic brst, logic cin, logic mb, logic [5:0] contins,
      logic pi, logic pl, logic [4:0] naseq, logic mc, logic il);
    ctrl_word_t w;
    w.bra_ins = bra;   w.enable  = en;      w.nabra = nabra;
    w.delay   = delay; w.dc      = 1'b0;    w.rw    = rw;
    w.bra_rst = brst;  w.cin     = cin;     w.mw    = 1'b0;
    w.mr      = 1'b0;  w.mb      = mb;      w.contins = contins;
    w.pi      = pi;    w.pl      = pl;      w.naseq = naseq;
    w.mc      = mc;    w.il      = il;
    return w;
  endfunction

  localparam logic [2:0] NB = BR_WAITMULT;  // filler for '---'

  always_comb begin
    unique case (opcode_e'(addr))
      //                 bra  en nabra    dly rw brst cin mb contins    pi pl naseq    mc il
      OP_IF:      word = mkword(NB, 0, 5'b00001, 1, 1, 1,  0,  0, 6'b011000, 1, 0, 5'b00001, 0, 1);
      OP_EXO:     word = mkword(NB, 1, 5'b00000, 0, 1, 0,  0,  0, 6'b011000, 0, 0, 5'b00000, 1, 0);
      OP_AND:     word = mkword(NB, 1, 5'b00000, 0, 0, 0,  0,  1, 6'b001000, 0, 0, 5'b00000, 0, 0);
      OP_OR:      word = mkword(NB, 1, 5'b00000, 0, 0, 0,  0,  1, 6'b001001, 0, 0, 5'b00000, 0, 0);
      OP_NOT:     word = mkword(NB, 1, 5'b00000, 0, 0, 0,  0,  1, 6'b001011, 0, 0, 5'b00000, 0, 0);
      OP_XOR:     word = mkword(NB, 1, 5'b00000, 0, 0, 0,  0,  1, 6'b001010, 0, 0, 5'b00000, 0, 0);
      OP_SHL:     word = mkword(NB, 1, 5'b00000, 0, 0, 0,  0,  1, 6'b000000, 0, 0, 5'b00000, 0, 0);
      OP_SHR:     word = mkword(NB, 1, 5'b00000, 0, 0, 0,  0,  1, 6'b000100, 0, 0, 5'b00000, 0, 0);
      OP_STORE:   word = mkword(NB, 1, 5'b00000, 0, 1, 0,  0,  0, 6'b100010, 0, 0, 5'b00000, 0, 0);
      OP_LOAD:    word = mkword(NB, 1, 5'b00000, 0, 0, 0,  0,  0, 6'b100011, 0, 0, 5'b00000, 0, 0);
      OP_ADDI:    word = mkword(NB, 1, 5'b00000, 0, 0, 0,  0,  0, 6'b010000, 0, 0, 5'b00000, 0, 0);
      OP_NOTI:    word = mkword(NB, 1, 5'b00000, 0, 0, 0,  0,  0, 6'b001011, 0, 0, 5'b00000, 0, 0);
      OP_ADD:     word = mkword(NB, 1, 5'b00000, 0, 0, 0,  0,  1, 6'b010000, 0, 0, 5'b00000, 0, 0);
      OP_SUB:     word = mkword(NB, 1, 5'b00000, 0, 0, 0,  1,  1, 6'b010000, 0, 0, 5'b00000, 0, 0);
      OP_NOP:     word = mkword(NB, 1, 5'b00000, 0, 1, 0,  0,  0, 6'b111000, 0, 0, 5'b00000, 0, 0);
      OP_MOVE:    word = mkword(NB, 1, 5'b00000, 0, 0, 0,  0,  1, 6'b110000, 0, 0, 5'b00000, 0, 0);
      OP_JMP:     word = mkword(NB, 1, 5'b00000, 0, 1, 0,  0,  0, 6'b111000, 0, 1, 5'b00000, 0, 0);
      OP_HALT:    word = mkword(NB, 1, 5'b00001, 0, 1, 0,  0,  0, 6'b011000, 0, 0, 5'b00001, 0, 0);
      OP_FPADD:   word = mkword(NB, 1, 5'b00000, 0, 0, 0,  0,  1, 6'b011100, 0, 0, 5'b10110, 0, 0);
      OP_MULT:    word = mkword(NB, 1, 5'b00000, 0, 0, 0,  0,  1, 6'b101100, 0, 0, 5'b11000, 0, 0);
      OP_BHI:     word = mkword(BR_BHI, 1, 5'b00000, 1, 1, 0, 0, 0, 6'b011000, 0, 1, 5'b00000, 0, 0);
      OP_BHE:     word = mkword(BR_BHE, 1, 5'b00000, 1, 1, 0, 0, 0, 6'b011000, 0, 1, 5'b00000, 0, 0);
      OP_BLT:     word = mkword(BR_BLT, 1, 5'b00000, 1, 1, 0, 0, 0, 6'b011000, 0, 1, 5'b00000, 0, 0);
      OP_BLE:     word = mkword(BR_BLE, 1, 5'b00000, 1, 1, 0, 0, 0, 6'b011000, 0, 1, 5'b00000, 0, 0);
      OP_BEQ:     word = mkword(BR_BEQ, 1, 5'b00000, 1, 1, 0, 0, 0, 6'b011000, 0, 1, 5'b00000, 0, 0);
      OP_BNE:     word = mkword(BR_BNE, 1, 5'b00000, 1, 1, 0, 0, 0, 6'b011000, 0, 1, 5'b00000, 0, 0);
      OP_MULTNOP: word = mkword(BR_WAITMULT, 1, 5'b11000, 0, 0, 0, 0, 0, 6'b101000, 0, 0, 5'b00000, 0, 0);
      OP_FPNOP:   word = mkword(BR_WAITFP,   1, 5'b10110, 0, 0, 0, 0, 0, 6'b011000, 0, 0, 5'b00000, 0, 0);
      default:    word = mkword(NB, 1, 5'b00000, 0, 1, 0,  0,  0, 6'b111000, 0, 0, 5'b00000, 0, 0);
    endcase
  end
endmodule
