// multiplier: sequential 32 x 32 -> 64-bit unsigned shift-and-add multiplier.
//
// A small state machine in the style of the classic textbook binary
// multiplier: registers B (multiplicand), Q (multiplier), A (partial
// product) and a carry bit E, with a counter P of remaining bits. Each
// multiplier bit takes two states: ADD adds B into A when Q[0] is 1,
// SHIFT shifts E,A,Q right by one and counts P down. A 32-bit multiply
// therefore takes 64 clock cycles, as in the source.
//
// Interface: pulse start for one cycle with a and b valid; the operands
// are taken on that clock edge. done is low while the machine runs and
// high when it is idle, so it rises in the cycle the 64-bit product
// {A,Q} is complete and stays high, with the product held, until the
// next start. product_lo goes to the result bus and product_hi to the
// register file's temporary register. done also serves as that
// register's load enable. Start is ignored while busy.
module multiplier #(
  parameter int unsigned WIDTH = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [WIDTH-1:0]   product_lo,
  output logic [WIDTH-1:0]   product_hi,
  output logic               done
);
  typedef enum logic [1:0] {S_IDLE, S_ADD, S_SHIFT} state_e;

  state_e                   state;
  logic [WIDTH-1:0]         reg_a, reg_q, reg_b;
  logic                     reg_e;
  logic [$clog2(WIDTH):0]   count;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      reg_a <= '0;
      reg_q <= '0;
      reg_b <= '0;
      reg_e <= 1'b0;
      count <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            reg_b <= b;
            reg_q <= a;
            reg_a <= '0;
            reg_e <= 1'b0;
            count <= ($clog2(WIDTH)+1)'(WIDTH);
            state <= S_ADD;
          end
        end
        S_ADD: begin
          if (reg_q[0]) {reg_e, reg_a} <= {1'b0, reg_a} + {1'b0, reg_b};
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          {reg_e, reg_a, reg_q} <= {1'b0, reg_e, reg_a, reg_q[WIDTH-1:1]};
          count <= count - 1'b1;
          state <= (count == 1) ? S_IDLE : S_ADD;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign done       = (state == S_IDLE);
  assign product_lo = reg_q;
  assign product_hi = reg_a;
endmodule
