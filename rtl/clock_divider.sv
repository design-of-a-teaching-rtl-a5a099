// clock_divider: slows the board clock for the processor.
//
// Counts input clock cycles and toggles clk_out every DIVIDE/2 of them,
// giving a square wave at clk_in / DIVIDE (DIVIDE must be even and at
// least 2). The counter and output clear on the asynchronous, active
// high reset. The source describes a divider that outputs a new clock
// once a sufficient count has accumulated, without giving the count;
// DIVIDE's default of 16 is this design's choice.
module clock_divider #(
  parameter int unsigned DIVIDE = 16
) (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out
);
  localparam int unsigned HALF = DIVIDE / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] count;

  always_ff @(posedge clk_in or posedge rst) begin
    if (rst) begin
      count   <= '0;
      clk_out <= 1'b0;
    end else if (count == CW'(HALF - 1)) begin
      count   <= '0;
      clk_out <= ~clk_out;
    end else begin
      count   <= count + 1'b1;
    end
  end
endmodule
