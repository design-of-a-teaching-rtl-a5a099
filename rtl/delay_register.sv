// delay_register: one-cycle delay of the control word's DELAY bit.
//
// A single flip-flop loaded every rising clock edge with DELAY; its
// output goes to the branch control unit, where it forces branch_out
// low in the cycle after a conditional-branch word, so that a condition
// evaluated for one branch cannot steer the next control word. It
// clears on reset (synchronous, active high). The register and its use
// follow the source's control unit; the synchronous reset is this
// design's choice.
module delay_register (
  input  logic clk,
  input  logic rst,
  input  logic delay,    // DELAY bit of the current control word
  output logic delay_q   // DELAY of the previous control word
);
  always_ff @(posedge clk) begin
    if (rst) delay_q <= 1'b0;
    else     delay_q <= delay;
  end
endmodule
