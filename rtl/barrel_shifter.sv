// barrel_shifter: 32-bit bidirectional logical barrel shifter.
//
// Shifts data_in left (dir = 0) or right (dir = 1) by 0..31 places in
// one combinational pass of five stages; stage k moves the word by 2^k
// places when bit k of the shift amount is set. Vacated bits fill with
// zeros. The source replaced a one-way 8-bit shifter with a 32-bit
// barrel shifter whose direction is chosen by a control signal; the
// five-stage log structure and zero fill are this design's choice.
// Purely combinational, no clock.
module barrel_shifter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0]         data_in,
  input  logic [$clog2(WIDTH)-1:0] amount,
  input  logic                     dir,       // 0 = left, 1 = right
  output logic [WIDTH-1:0]         data_out
);
  localparam int unsigned STAGES = $clog2(WIDTH);

  logic [WIDTH-1:0] stage [STAGES+1];

  always_comb begin
    stage[0] = data_in;
    for (int k = 0; k < STAGES; k++) begin
      if (amount[k]) begin
        if (dir) stage[k+1] = stage[k] >> (1 << k);
        else     stage[k+1] = stage[k] << (1 << k);
      end else begin
        stage[k+1] = stage[k];
      end
    end
    data_out = stage[STAGES];
  end
endmodule
