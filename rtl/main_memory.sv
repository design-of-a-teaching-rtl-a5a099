// main_memory: local data memory of the functional unit.
//
// DEPTH words of WIDTH bits. Reads are asynchronous (rdata follows addr
// in the same cycle, so a LOAD completes in its single execute cycle);
// a write of wdata to addr happens on the rising clock edge when we is
// high. The contents can be preset before the processor runs from a
// hex file named by INIT_FILE (one word per line), otherwise they start
// at zero. The source says only that a local memory was added so that
// values could be set before a run; depth, asynchronous read and the
// file preload are this design's choice.
module main_memory #(
  parameter int unsigned WIDTH     = 32,
  parameter int unsigned DEPTH     = 256,
  parameter string       INIT_FILE = "rtl/tisp_data.hex"
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];
endmodule
