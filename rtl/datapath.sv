// datapath: register file, operand-B multiplexer, functional unit and
// the carry/zero status flags.
//
// Each cycle bus A = R[AA]; bus B is R[BA] when MB is 1 or the
// zero-extended 8-bit immediate when MB is 0 (MUX B). The functional
// unit's result goes out on data and, when RW is 0, is written into
// R[DA] on the rising edge. On that same edge the status flags are
// updated: Z when the result is zero, C from the unit's carry/borrow.
// Branch instructions do not write, so they test the flags of the last
// instruction that did. The temporary register takes the product's
// upper word while the multiplier reports done. Multiplexers between
// control unit and datapath sit in the datapath, as the source
// prescribes. Registering the flags, and updating them on register
// writes, is this design's choice.
module datapath
  import tisp_pkg::*;
#(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned MEM_DEPTH = 256,
  parameter string       MEM_INIT  = "rtl/tisp_data.hex"
) (
  input  logic             clk,
  input  logic             rst,
  // control from the control unit
  input  logic [2:0]       da,
  input  logic [2:0]       aa,
  input  logic [2:0]       ba,
  input  logic [7:0]       imm,
  input  logic             rw,       // 0 = write register file
  input  logic             mb,       // 1 = register, 0 = immediate
  input  logic             cin,
  input  logic [5:0]       contins,
  // status to the control unit
  output logic             c_flag,
  output logic             z_flag,
  output logic             mult_done,
  output logic             fp_done,
  // observation
  output logic [WIDTH-1:0] data,
  output logic [WIDTH-1:0] temp_out
);
  logic [WIDTH-1:0] bus_a, reg_b, bus_b, mult_hi;
  logic             c_out;

  register_file #(.WIDTH(WIDTH)) u_rf (
    .clk     (clk),
    .rst     (rst),
    .we      (!rw),
    .da      (da),
    .aa      (aa),
    .ba      (ba),
    .d_in    (data),
    .a_out   (bus_a),
    .b_out   (reg_b),
    .temp_en (mult_done),
    .temp_in (mult_hi),
    .temp_out(temp_out)
  );

  assign bus_b = mb ? reg_b : WIDTH'(imm);

  alu #(.WIDTH(WIDTH), .MEM_DEPTH(MEM_DEPTH), .MEM_INIT(MEM_INIT)) u_alu (
    .clk      (clk),
    .rst      (rst),
    .a        (bus_a),
    .b        (bus_b),
    .contins  (contins),
    .cin      (cin),
    .f        (data),
    .c_out    (c_out),
    .mult_done(mult_done),
    .mult_hi  (mult_hi),
    .fp_done  (fp_done)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      c_flag <= 1'b0;
      z_flag <= 1'b0;
    end else if (!rw) begin
      c_flag <= c_out;
      z_flag <= (data == '0);
    end
  end
endmodule
