// reset_counter: generates the processor reset on a board without a
// working reset button.
//
// A free-running counter advances on every clock. rst_n (active low)
// is held low while the count is below 2, is released when the count
// reaches 2, and stays high until the count reaches PERIOD - 1, when
// the counter wraps to 0 and rst_n goes low again - so the processor
// is restarted every PERIOD clocks and a program runs over and over.
// rst is an asynchronous power-on reset of the counter itself (on the
// board it comes from configuration/power-up); it is this design's
// choice, since the counter must start from a known value. The count of 2 and the periodic re-reset
// after "a huge number" of clocks follow the source; PERIOD's default
// of 65536 is this design's choice.
module reset_counter #(
  parameter int unsigned PERIOD = 65536
) (
  input  logic clk,
  input  logic rst,     // power-on reset of the counter, active high
  output logic rst_n
);
  localparam int unsigned CW = $clog2(PERIOD);

  logic [CW-1:0] count;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)                           count <= '0;
    else if (count == CW'(PERIOD - 1)) count <= '0;
    else                          count <= count + 1'b1;
  end

  assign rst_n = (count >= CW'(2));
endmodule
