// instruction_register: holds the instruction being executed and splits
// it into its fields.
//
// On a rising clock edge with il (the control word's IL bit) high, the
// register loads the instruction-memory word; otherwise it holds. It
// clears to 0 on reset (synchronous, active high). The fields are
// decoded combinationally from the stored word: opcode [23:19] (which
// is also the control-ROM address of the instruction's execute word),
// destination register DA [18:16], A-bus register AA [10:8], B-bus
// register BA [2:0] and the 8-bit immediate / memory address / branch
// target [7:0], which overlaps BA. The register and its IL enable
// follow the source; the field positions are this design's choice.
module instruction_register (
  input  logic        clk,
  input  logic        rst,
  input  logic        il,       // load enable (IL)
  input  logic [31:0] d,        // word from instruction memory
  output logic [31:0] ir,
  output logic [4:0]  opcode,
  output logic [2:0]  da,
  output logic [2:0]  aa,
  output logic [2:0]  ba,
  output logic [7:0]  imm
);
  always_ff @(posedge clk) begin
    if (rst)     ir <= '0;
    else if (il) ir <= d;
  end

  assign opcode = ir[23:19];
  assign da     = ir[18:16];
  assign aa     = ir[10:8];
  assign ba     = ir[2:0];
  assign imm    = ir[7:0];
endmodule
