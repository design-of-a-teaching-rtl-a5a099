// tisp_pkg: types and constants shared by the teaching processor.
//
// The processor is microprogrammed: every clock cycle the control ROM
// produces one 32-bit control word, whose fields (bit positions as in
// the control-word table of the design) steer the sequencer and the
// datapath. The struct below lays the fields out MSB first so that a
// ctrl_word_t can be cast directly from the 32-bit ROM word.
//
// Instruction word layout (32 bits, this design's choice where the
// source gives only example encodings):
//   [23:19] opcode  - address of the instruction's control word
//   [18:16] DA      - destination register
//   [10:8]  AA      - register driven on bus A
//   [2:0]   BA      - register driven on bus B
//   [7:0]   IMM     - immediate, data-memory address or branch target
//   other bits are ignored.
package tisp_pkg;

  localparam int unsigned WORD_W   = 32;  // register and bus width

  // Control word, bit 31 first.
  typedef struct packed {
    logic [2:0] bra_ins;   // 31:29 branch condition / wait select
    logic       enable;    // 28    processor enabled (0 during fetch)
    logic [4:0] nabra;     // 27:23 next address if branch_out is high
    logic       delay;     // 22    conditional word: arm the delay register
    logic       dc;        // 21    no function
    logic       rw;        // 20    0 = write register file, 1 = no write
    logic       bra_rst;   // 19    force branch_out low this cycle
    logic       cin;       // 18    0 = add, 1 = subtract
    logic       mw;        // 17    no function
    logic       mr;        // 16    no function
    logic       mb;        // 15    1 = bus B from register file, 0 = immediate
    logic [5:0] contins;   // 14:9  functional-unit operation
    logic       pi;        // 8     increment PC
    logic       pl;        // 7     load PC with branch target
    logic [4:0] naseq;     // 6:2   next sequential control address
    logic       mc;        // 1     1 = next address is the opcode
    logic       il;        // 0     load instruction register
  } ctrl_word_t;

  // CONTINS[5:3]: which unit drives the result bus (the ALU's 8:1 mux).
  typedef enum logic [2:0] {
    FU_SHIFT = 3'b000,
    FU_LOGIC = 3'b001,
    FU_CLA   = 3'b010,
    FU_FP    = 3'b011,
    FU_MEM   = 3'b100,
    FU_MULT  = 3'b101,
    FU_MOVE  = 3'b110,
    FU_NONE  = 3'b111
  } fu_sel_e;

  // Logic-unit operation, CONTINS[1:0] when CONTINS[5:3] = FU_LOGIC.
  typedef enum logic [1:0] {
    LU_AND = 2'b00,
    LU_OR  = 2'b01,
    LU_XOR = 2'b10,
    LU_NOT = 2'b11
  } lu_op_e;

  // Branch-control select, BRA_INS.
  typedef enum logic [2:0] {
    BR_BHI      = 3'b000,  // C + Z = 0
    BR_BHE      = 3'b001,  // C = 0
    BR_BLT      = 3'b010,  // C = 1
    BR_BLE      = 3'b011,  // C + Z = 1
    BR_BEQ      = 3'b100,  // Z = 1
    BR_BNE      = 3'b101,  // Z = 0
    BR_WAITMULT = 3'b110,  // high while the multiplier is busy
    BR_WAITFP   = 3'b111   // high until the FP adder reports done
  } bra_ins_e;

  // Control-store addresses (= instruction opcodes).
  typedef enum logic [4:0] {
    OP_IF      = 5'b00000,
    OP_EXO     = 5'b00001,
    OP_AND     = 5'b00010,
    OP_OR      = 5'b00011,
    OP_NOT     = 5'b00100,
    OP_XOR     = 5'b00110,
    OP_SHL     = 5'b00111,
    OP_STORE   = 5'b01000,
    OP_LOAD    = 5'b01001,
    OP_ADDI    = 5'b01010,
    OP_NOTI    = 5'b01011,
    OP_ADD     = 5'b01100,
    OP_SUB     = 5'b01101,
    OP_NOP     = 5'b01110,
    OP_JMP     = 5'b01111,
    OP_HALT    = 5'b10000,  // "jump to itself": re-executes forever
    OP_FPADD   = 5'b10011,
    OP_MULT    = 5'b10100,
    OP_MOVE    = 5'b10101,
    OP_FPNOP   = 5'b10110,
    OP_SHR     = 5'b10111,
    OP_MULTNOP = 5'b11000,
    OP_BHI     = 5'b11001,
    OP_BHE     = 5'b11010,
    OP_BLT     = 5'b11011,
    OP_BLE     = 5'b11100,
    OP_BEQ     = 5'b11101,
    OP_BNE     = 5'b11110
  } opcode_e;

  // Builds an instruction word in the layout described above.
  function automatic logic [WORD_W-1:0] make_instr(opcode_e op, logic [2:0] da,
                                                   logic [2:0] aa, logic [7:0] imm_or_ba);
    logic [WORD_W-1:0] w;
    w        = '0;
    w[23:19] = op;
    w[18:16] = da;
    w[10:8]  = aa;
    w[7:0]   = imm_or_ba;
    return w;
  endfunction

endpackage
