// logic_unit: 32-bit logic operations selected by a 4:1 multiplexer.
//
// op selects AND, OR or XOR of the two operands, or NOT of operand b
// (so that the same operation serves NOT of a register and NOT of an
// immediate, both of which reach the unit on the b input). The source
// gives the four operations and the 4:1 output multiplexer; applying
// NOT to b is this design's choice. Combinational.
module logic_unit
  import tisp_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  lu_op_e           op,
  output logic [WIDTH-1:0] f
);
  always_comb begin
    unique case (op)
      LU_AND: f = a & b;
      LU_OR:  f = a | b;
      LU_XOR: f = a ^ b;
      LU_NOT: f = ~b;
    endcase
  end
endmodule
