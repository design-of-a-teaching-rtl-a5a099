// microprocessor: the complete teaching processor, control unit plus
// datapath.
//
// A 32-bit, eight-register, microprogrammed processor. The control
// unit fetches an instruction, decodes it by jumping to the control
// word whose address is the opcode, and drives the datapath with that
// word; the datapath returns carry, zero and the done signals of the
// multi-cycle units. Most instructions take three cycles (fetch,
// decode, execute); MULT takes 3 + 64 and FPADD 3 + 7.
//
// Ports: clk; rst (synchronous, active high; execution starts at
// address 0 of the program memory once it is released); data, the
// result bus (the value written to R[DA] when a word writes); pc, car,
// ir and the current control word cw for observation; c_flag, z_flag,
// mult_done, fp_done and temp_out (upper product word). The program
// and the initial data memory come from IM_INIT and MEM_INIT.
module microprocessor
  import tisp_pkg::*;
#(
  parameter int unsigned IM_DEPTH  = 256,
  parameter int unsigned MEM_DEPTH = 256,
  parameter string       IM_INIT   = "rtl/tisp_program.hex",
  parameter string       MEM_INIT  = "rtl/tisp_data.hex"
) (
  input  logic        clk,
  input  logic        rst,
  output logic [31:0] data,
  output logic [$clog2(IM_DEPTH)-1:0] pc,
  output logic [4:0]  car,
  output logic [31:0] ir,
  output ctrl_word_t  cw,
  output logic        c_flag,
  output logic        z_flag,
  output logic        mult_done,
  output logic        fp_done,
  output logic        branch_out,
  output logic [31:0] temp_out
);
  logic [2:0] da, aa, ba;
  logic [7:0] imm;

  control_unit #(.IM_DEPTH(IM_DEPTH), .IM_INIT(IM_INIT)) u_cu (
    .clk       (clk),
    .rst       (rst),
    .c_flag    (c_flag),
    .z_flag    (z_flag),
    .mult_done (mult_done),
    .fp_done   (fp_done),
    .cw        (cw),
    .da        (da),
    .aa        (aa),
    .ba        (ba),
    .imm       (imm),
    .car       (car),
    .pc        (pc),
    .ir        (ir),
    .branch_out(branch_out)
  );

  datapath #(.WIDTH(32), .MEM_DEPTH(MEM_DEPTH), .MEM_INIT(MEM_INIT)) u_dp (
    .clk      (clk),
    .rst      (rst),
    .da       (da),
    .aa       (aa),
    .ba       (ba),
    .imm      (imm),
    .rw       (cw.rw),
    .mb       (cw.mb),
    .cin      (cw.cin),
    .contins  (cw.contins),
    .c_flag   (c_flag),
    .z_flag   (z_flag),
    .mult_done(mult_done),
    .fp_done  (fp_done),
    .data     (data),
    .temp_out (temp_out)
  );
endmodule
