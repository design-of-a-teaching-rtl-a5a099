// tisp_board: the processor as placed on the FPGA prototype board.
//
// The board clock passes through the clock divider; the divided clock
// runs the reset counter and the processor. The reset counter releases
// the processor's reset two divided clocks after power-up and repeats
// the reset every RESET_PERIOD divided clocks, so the stored program
// runs again and again. The processor's outputs are brought out as
// they are; the low byte of the result bus is also offered as
// leds for the board's LEDs. board_rst only resets the divider (for
// simulation); it may be tied low on the board.
//
// Timing: one processor cycle per CLK_DIV board clocks; the program
// starts at the third divided clock after power-up.
module tisp_board
  import tisp_pkg::*;
#(
  parameter int unsigned CLK_DIV      = 16,
  parameter int unsigned RESET_PERIOD = 65536,
  parameter string       IM_INIT      = "rtl/tisp_program.hex",
  parameter string       MEM_INIT     = "rtl/tisp_data.hex"
) (
  input  logic        board_clk,
  input  logic        board_rst,
  output logic        cpu_clk,
  output logic        cpu_rst_n,
  output logic [7:0]  leds,
  output logic [31:0] data,
  output logic [7:0]  pc,
  output logic [4:0]  car,
  output logic [31:0] ir,
  output ctrl_word_t  cw,
  output logic        c_flag,
  output logic        z_flag,
  output logic        mult_done,
  output logic        fp_done,
  output logic        branch_out,
  output logic [31:0] temp_out
);
  clock_divider #(.DIVIDE(CLK_DIV)) u_div (
    .clk_in (board_clk),
    .rst    (board_rst),
    .clk_out(cpu_clk)
  );

  reset_counter #(.PERIOD(RESET_PERIOD)) u_rstgen (
    .clk  (cpu_clk),
    .rst  (board_rst),
    .rst_n(cpu_rst_n)
  );

  microprocessor #(.IM_DEPTH(256), .MEM_DEPTH(256), .IM_INIT(IM_INIT), .MEM_INIT(MEM_INIT)) u_cpu (
    .clk       (cpu_clk),
    .rst       (!cpu_rst_n),
    .data      (data),
    .pc        (pc),
    .car       (car),
    .ir        (ir),
    .cw        (cw),
    .c_flag    (c_flag),
    .z_flag    (z_flag),
    .mult_done (mult_done),
    .fp_done   (fp_done),
    .branch_out(branch_out),
    .temp_out  (temp_out)
  );

  assign leds = data[7:0];
endmodule
