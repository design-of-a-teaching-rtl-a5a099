// cla_adder: 32-bit carry-look-ahead adder/subtractor.
//
// Computes a + b + cin, or a - b when sub is high (a + ~b + 1). Each
// bit forms generate g = a&b and propagate p = a^b. The word is cut into
// 4-bit groups; inside a group every carry is written out as a flat
// sum of products of g, p and the group carry-in, and each group's
// carry-in is in turn a flat sum of products of the group generate and
// propagate terms, so no carry ripples from bit to bit. The source asks
// for a carry-look-ahead adder replacing a ripple-carry one; the group
// size of four and the two-level arrangement are this design's choice.
// Combinational; cout is the carry out of bit 31 (for a subtraction it
// is 1 when there was no borrow).
module cla_adder #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned GROUP = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NGROUPS = WIDTH / GROUP;

  logic [WIDTH-1:0]   bx, g, p;
  logic [WIDTH:0]     c;
  logic [NGROUPS-1:0] gg, gp;        // group generate / propagate
  logic [NGROUPS:0]   gc;            // group carry-in

  always_comb begin
    bx = sub ? ~b : b;
    g  = a & bx;
    p  = a ^ bx;

    // Group generate and propagate: flat products over each group.
    for (int j = 0; j < NGROUPS; j++) begin
      gp[j] = 1'b1;
      gg[j] = 1'b0;
      for (int i = GROUP - 1; i >= 0; i--) begin
        logic term;
        term = g[j*GROUP+i];
        for (int k = i + 1; k < GROUP; k++) term = term & p[j*GROUP+k];
        gg[j] = gg[j] | term;
        gp[j] = gp[j] & p[j*GROUP+i];
      end
    end

    // Second level: every group carry from the group terms and cin.
    for (int j = 0; j <= NGROUPS; j++) begin
      logic allp;
      allp  = 1'b1;
      gc[j] = 1'b0;
      for (int k = j - 1; k >= 0; k--) begin
        logic term;
        term = gg[k];
        for (int m = k + 1; m < j; m++) term = term & gp[m];
        gc[j] = gc[j] | term;
        allp  = allp & gp[k];
      end
      gc[j] = gc[j] | (allp & sub);
    end

    // First level: bit carries inside each group from the group carry-in.
    for (int j = 0; j < NGROUPS; j++) begin
      for (int i = 0; i <= GROUP; i++) begin
        logic cc, allp;
        allp = 1'b1;
        cc   = 1'b0;
        for (int k = i - 1; k >= 0; k--) begin
          logic term;
          term = g[j*GROUP+k];
          for (int m = k + 1; m < i; m++) term = term & p[j*GROUP+m];
          cc   = cc | term;
          allp = allp & p[j*GROUP+k];
        end
        cc = cc | (allp & gc[j]);
        if (i < GROUP) c[j*GROUP+i] = cc;
      end
    end
    c[WIDTH] = gc[NGROUPS];

    sum  = p ^ c[WIDTH-1:0];
    cout = c[WIDTH];
  end
endmodule
