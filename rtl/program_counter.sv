// program_counter: instruction address register.
//
// On each rising edge: synchronous reset (active high) sets it to 0;
// else PL loads load_val (a branch or jump target); else PI increments
// it (wrapping); else it holds. Hold, increment and load follow the
// PI/PL fields of the control word; giving load priority over
// increment is this design's choice (no control word sets both).
module program_counter #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             pi,
  input  logic             pl,
  input  logic [WIDTH-1:0] load_val,
  output logic [WIDTH-1:0] pc
);
  always_ff @(posedge clk) begin
    if (rst)     pc <= '0;
    else if (pl) pc <= load_val;
    else if (pi) pc <= pc + 1'b1;
  end
endmodule
