// alu: the functional unit - shifter, carry-look-ahead adder, floating
// point adder, logic unit, data memory and multiplier behind one 8:1
// output multiplexer.
//
// CONTINS[5:3] picks which unit drives the result f (see fu_sel_e):
// shifter, logic unit, CLA, FP adder, memory, multiplier low word, MOVE
// (operand b passed straight through) or nothing (zero). The remaining
// CONTINS bits are the unit's own control: shift direction [2], logic
// operation [1:0], FP or multiply start [2], memory access [1] with
// load/store [0]. cin selects add or subtract. The shift amount is
// b[4:0]; the memory address is b and its write data a (STORE writes
// M[b] <= a on the clock edge; LOAD returns M[b] in the same cycle).
// The source's "output high impedance" memory code (100x0x) and a store
// put 0 on the memory's mux input instead, since the design has no
// internal tri-state bus.
// c_out is the CLA's carry, inverted for a subtraction so that it
// reads as a borrow, and is 0 for every other unit.
// The multiplier (64 cycles) and FP adder (7 cycles) report completion
// on mult_done and fp_done; mult_hi is bits 63..32 of the product.
// Unit list, the 8:1 output multiplexer, the MOVE input and the
// encodings follow the source's control-word table; where the memory
// and shifter take their operands from is this design's choice.
module alu
  import tisp_pkg::*;
#(
  parameter int unsigned WIDTH      = 32,
  parameter int unsigned MEM_DEPTH  = 256,
  parameter string       MEM_INIT   = "rtl/tisp_data.hex"
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [5:0]       contins,
  input  logic             cin,
  output logic [WIDTH-1:0] f,
  output logic             c_out,
  output logic             mult_done,
  output logic [WIDTH-1:0] mult_hi,
  output logic             fp_done
);
  fu_sel_e          sel;
  logic [WIDTH-1:0] shift_f, logic_f, cla_f, fp_f, mem_f, mult_f;
  logic             cla_cout;
  logic             mem_we;

  assign sel    = fu_sel_e'(contins[5:3]);
  assign mem_we = (sel == FU_MEM) && contins[1] && !contins[0];

  barrel_shifter #(.WIDTH(WIDTH)) u_shifter (
    .data_in (a),
    .amount  (b[$clog2(WIDTH)-1:0]),
    .dir     (contins[2]),
    .data_out(shift_f)
  );

  cla_adder #(.WIDTH(WIDTH)) u_cla (
    .a   (a),
    .b   (b),
    .sub (cin),
    .sum (cla_f),
    .cout(cla_cout)
  );

  fp_adder u_fp (
    .clk   (clk),
    .rst   (rst),
    .start ((sel == FU_FP) && contins[2]),
    .a     (a),
    .b     (b),
    .result(fp_f),
    .done  (fp_done)
  );

  logic_unit #(.WIDTH(WIDTH)) u_logic (
    .a (a),
    .b (b),
    .op(lu_op_e'(contins[1:0])),
    .f (logic_f)
  );

  logic [WIDTH-1:0] mem_rdata;
  main_memory #(.WIDTH(WIDTH), .DEPTH(MEM_DEPTH), .INIT_FILE(MEM_INIT)) u_mem (
    .clk  (clk),
    .we   (mem_we),
    .addr (b[$clog2(MEM_DEPTH)-1:0]),
    .wdata(a),
    .rdata(mem_rdata)
  );
  // Only a load drives the memory's value onto the result bus.
  assign mem_f = (contins[1:0] == 2'b11) ? mem_rdata : '0;

  multiplier #(.WIDTH(WIDTH)) u_mult (
    .clk       (clk),
    .rst       (rst),
    .start     ((sel == FU_MULT) && contins[2]),
    .a         (a),
    .b         (b),
    .product_lo(mult_f),
    .product_hi(mult_hi),
    .done      (mult_done)
  );

  always_comb begin
    unique case (sel)
      FU_SHIFT: f = shift_f;
      FU_LOGIC: f = logic_f;
      FU_CLA:   f = cla_f;
      FU_FP:    f = fp_f;
      FU_MEM:   f = mem_f;
      FU_MULT:  f = mult_f;
      FU_MOVE:  f = b;
      FU_NONE:  f = '0;
    endcase
    c_out = (sel == FU_CLA) ? (cla_cout ^ cin) : 1'b0;
  end
endmodule
