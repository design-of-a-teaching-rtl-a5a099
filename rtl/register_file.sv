// register_file: eight 32-bit registers, two read buses and a temporary
// register for the upper half of a product.
//
// A 3-to-8 decoder on DA selects the register written with d_in on the
// rising clock edge when we is high; two 8:1 multiplexers driven by AA
// and BA put two registers on bus A and bus B combinationally. Reset
// (synchronous, active high) clears all registers to zero. The
// temporary register is loaded from temp_in whenever temp_en is high;
// the multiplier's done signal drives that enable, so it captures bits
// 63..32 of each product. Eight registers, 3-bit selects, 32-bit width
// and the done-enabled temporary register follow the source; reset to
// zero follows its remark that registers hold zero after reset.
module register_file
  import tisp_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NREG  = 8
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] da,
  input  logic [$clog2(NREG)-1:0] aa,
  input  logic [$clog2(NREG)-1:0] ba,
  input  logic [WIDTH-1:0]        d_in,
  output logic [WIDTH-1:0]        a_out,
  output logic [WIDTH-1:0]        b_out,
  input  logic                    temp_en,
  input  logic [WIDTH-1:0]        temp_in,
  output logic [WIDTH-1:0]        temp_out
);
  logic [WIDTH-1:0] regs [NREG];
  logic [NREG-1:0]  dec;      // write decoder

  always_comb begin
    dec     = '0;
    dec[da] = we;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < NREG; i++)
        if (dec[i]) regs[i] <= d_in;
    end
  end

  always_ff @(posedge clk) begin
    if (rst)          temp_out <= '0;
    else if (temp_en) temp_out <= temp_in;
  end

  assign a_out = regs[aa];
  assign b_out = regs[ba];
endmodule
