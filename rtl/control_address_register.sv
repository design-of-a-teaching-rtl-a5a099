// control_address_register: the control address register (CAR) with
// the two next-address multiplexers in front of it.
//
// Every rising clock edge the CAR loads the address of the next control
// word: the IR opcode when MC is 1 (MUXC, the dispatch step), otherwise
// NABRA when branch_out is 1 and NASEQ when it is 0 (the branch mux).
// It clears to 00000, the fetch word, on reset (synchronous, active
// high). car is the control ROM's address for the current cycle. The
// register and both multiplexers follow the source's control unit;
// giving the opcode priority over the branch mux is this design's
// reading of it (no word sets MC together with a branch condition).
module control_address_register (
  input  logic       clk,
  input  logic       rst,
  input  logic       mc,          // 1 = dispatch on the opcode
  input  logic       branch_out,  // 1 = take NABRA
  input  logic [4:0] opcode,
  input  logic [4:0] nabra,
  input  logic [4:0] naseq,
  output logic [4:0] car
);
  logic [4:0] seq_addr, next_car;

  assign seq_addr = branch_out ? nabra : naseq;
  assign next_car = mc ? opcode : seq_addr;

  always_ff @(posedge clk) begin
    if (rst) car <= 5'b00000;
    else     car <= next_car;
  end
endmodule
