// instruction_memory: program store read at the program counter.
//
// DEPTH 32-bit instruction words, read asynchronously (instr follows
// addr in the same cycle, so the fetch word can load the instruction
// register at the end of its cycle). Contents come from the hex file
// INIT_FILE, one word per line; words not in the file are 0. The
// source only says the instruction memory holds the test program;
// depth and file loading are this design's choice. The contents exist
// only through $readmemh in an initial block: FPGA synthesis flows and
// simulators load the file, while a synthesis front end that ignores
// $readmemh sees an all-zero memory and reduces this block to
// constants.
module instruction_memory #(
  parameter int unsigned DEPTH     = 256,
  parameter string       INIT_FILE = "rtl/tisp_program.hex"
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [31:0]              instr
);
  logic [31:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) rom[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign instr = rom[addr];
endmodule
