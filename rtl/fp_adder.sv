// fp_adder: seven-stage pipelined IEEE-754 single-precision adder.
//
// Adds a and b with round-to-nearest-even. The seven register stages
// are: 1 capture operands, 2 unpack and order by magnitude, 3 align the
// smaller significand (guard, round and sticky bits kept), 4 add or
// subtract significands, 5 normalise, 6 round, 7 pack and handle
// overflow. A result therefore appears seven clock cycles after start.
// As in the source, start itself travels down the pipeline in a chain
// of valid flip-flops and comes out as done, a one-cycle pulse in the
// cycle the result is first valid; result then holds until the next
// result arrives, because each stage only loads when the stage before
// it holds valid data.
//
// Simplifications (this design's choice; the source gives only the
// seven-cycle latency and the done mechanism): subnormal inputs count
// as zero and subnormal results flush to zero; an infinite operand
// passes through (inf - inf gives the quiet NaN 7FC00000); a NaN
// operand gives 7FC00000; overflow gives a signed infinity.
module fp_adder (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result,
  output logic        done
);
  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  // valid chain: v[k] qualifies stage k's registers
  logic [7:1] v;

  // stage 1: operands
  logic [31:0] s1_a, s1_b;

  // stage 2: ordered, unpacked
  logic        s2_sx, s2_sy, s2_special;
  logic [7:0]  s2_ex;
  logic [7:0]  s2_diff;
  logic [23:0] s2_mx, s2_my;
  logic [31:0] s2_spec_val;

  // stage 3: aligned (24 bits + guard, round, sticky)
  logic        s3_sign, s3_sub, s3_special;
  logic [7:0]  s3_exp;
  logic [26:0] s3_mx, s3_my;
  logic [31:0] s3_spec_val;

  // stage 4: raw sum
  logic        s4_sign, s4_special;
  logic [7:0]  s4_exp;
  logic [27:0] s4_sum;
  logic [31:0] s4_spec_val;

  // stage 5: normalised (bit 26 is the hidden bit), exponent may be <= 0
  logic        s5_sign, s5_special, s5_zero;
  logic signed [9:0] s5_exp;
  logic [26:0] s5_man;
  logic [31:0] s5_spec_val;

  // stage 6: rounded
  logic        s6_sign, s6_special, s6_zero;
  logic signed [9:0] s6_exp;
  logic [22:0] s6_man;   // fraction only: the hidden bit is implied by s6_exp
  logic [31:0] s6_spec_val;

  // ---------------------------------------------------------------- stage 2 logic
  logic        c2_sx, c2_sy, c2_special;
  logic [7:0]  c2_ex, c2_ey;
  logic [23:0] c2_mx, c2_my;
  logic [31:0] c2_spec_val;

  always_comb begin
    logic [31:0] x, y;
    logic        a_nan, b_nan, a_inf, b_inf;
    // order so that |x| >= |y|
    if (s1_a[30:0] >= s1_b[30:0]) begin x = s1_a; y = s1_b; end
    else                          begin x = s1_b; y = s1_a; end
    c2_sx = x[31];
    c2_sy = y[31];
    c2_ex = x[30:23];
    c2_ey = y[30:23];
    c2_mx = (x[30:23] == 8'd0) ? 24'd0 : {1'b1, x[22:0]};
    c2_my = (y[30:23] == 8'd0) ? 24'd0 : {1'b1, y[22:0]};
    a_nan = (s1_a[30:23] == 8'hFF) && (s1_a[22:0] != 0);
    b_nan = (s1_b[30:23] == 8'hFF) && (s1_b[22:0] != 0);
    a_inf = (s1_a[30:23] == 8'hFF) && (s1_a[22:0] == 0);
    b_inf = (s1_b[30:23] == 8'hFF) && (s1_b[22:0] == 0);
    c2_special  = a_nan | b_nan | a_inf | b_inf;
    if (a_nan || b_nan || (a_inf && b_inf && (s1_a[31] != s1_b[31])))
      c2_spec_val = QNAN;
    else if (a_inf)
      c2_spec_val = s1_a;
    else
      c2_spec_val = s1_b;
  end

  // ---------------------------------------------------------------- stage 3 logic
  logic [26:0] c3_my;
  always_comb begin
    logic [50:0] wide;
    wide = {s2_my, 27'd0} >> s2_diff;   // diff >= 27 leaves only sticky
    c3_my = {wide[50:25], |wide[24:0]};
  end

  // ---------------------------------------------------------------- stage 5 logic
  logic signed [9:0] c5_exp;
  logic [26:0]       c5_man;
  logic              c5_zero;
  always_comb begin
    int lz;
    c5_zero = (s4_sum == 28'd0);
    c5_exp  = signed'({2'b00, s4_exp});
    c5_man  = s4_sum[26:0];
    lz      = 0;
    if (s4_sum[27]) begin
      c5_man = {s4_sum[27:2], s4_sum[1] | s4_sum[0]};
      c5_exp = c5_exp + 10'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (s4_sum[i]) begin
          lz = 26 - i;
          break;
        end
      end
      c5_man = s4_sum[26:0] << lz;
      c5_exp = c5_exp - 10'(lz);
    end
  end

  // ---------------------------------------------------------------- stage 6 logic
  logic [22:0]       c6_man;   // rounded fraction (hidden bit dropped)
  logic signed [9:0] c6_exp;
  always_comb begin
    logic        round_up;
    logic [24:0] r;
    round_up = s5_man[2] & (s5_man[1] | s5_man[0] | s5_man[3]);
    r        = {1'b0, s5_man[26:3]} + 25'(round_up);
    c6_exp   = s5_exp;
    c6_man   = r[22:0];
    if (r[24]) begin
      c6_man = r[23:1];
      c6_exp = s5_exp + 10'sd1;
    end
  end

  // ---------------------------------------------------------------- stage 7 logic
  logic [31:0] c7_result;
  always_comb begin
    if (s6_special)
      c7_result = s6_spec_val;
    else if (s6_zero || s6_exp <= 0)
      c7_result = {s6_sign & ~s6_zero, 31'd0};
    else if (s6_exp >= 255)
      c7_result = {s6_sign, 8'hFF, 23'd0};
    else
      c7_result = {s6_sign, s6_exp[7:0], s6_man};
  end

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (rst) v <= '0;
    else     v <= {v[6:1], start};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_a <= '0; s1_b <= '0;
      s2_sx <= 1'b0; s2_sy <= 1'b0; s2_special <= 1'b0; s2_ex <= '0;
      s2_diff <= '0; s2_mx <= '0; s2_my <= '0; s2_spec_val <= '0;
      s3_sign <= 1'b0; s3_sub <= 1'b0; s3_special <= 1'b0; s3_exp <= '0;
      s3_mx <= '0; s3_my <= '0; s3_spec_val <= '0;
      s4_sign <= 1'b0; s4_special <= 1'b0; s4_exp <= '0; s4_sum <= '0;
      s4_spec_val <= '0;
      s5_sign <= 1'b0; s5_special <= 1'b0; s5_zero <= 1'b0; s5_exp <= '0;
      s5_man <= '0; s5_spec_val <= '0;
      s6_sign <= 1'b0; s6_special <= 1'b0; s6_zero <= 1'b0; s6_exp <= '0;
      s6_man <= '0; s6_spec_val <= '0;
      result <= '0;
    end else begin
      if (start) begin
        s1_a <= a;
        s1_b <= b;
      end
      if (v[1]) begin
        s2_sx <= c2_sx; s2_sy <= c2_sy; s2_ex <= c2_ex;
        s2_diff <= c2_ex - c2_ey;
        s2_mx <= c2_mx; s2_my <= c2_my;
        s2_special <= c2_special; s2_spec_val <= c2_spec_val;
      end
      if (v[2]) begin
        s3_sign <= s2_sx;
        s3_sub <= s2_sx ^ s2_sy;
        s3_exp <= s2_ex;
        s3_mx <= {s2_mx, 3'b000};
        s3_my <= c3_my;
        s3_special <= s2_special; s3_spec_val <= s2_spec_val;
      end
      if (v[3]) begin
        s4_sign <= s3_sign;
        s4_exp <= s3_exp;
        s4_sum <= s3_sub ? ({1'b0, s3_mx} - {1'b0, s3_my})
                         : ({1'b0, s3_mx} + {1'b0, s3_my});
        s4_special <= s3_special; s4_spec_val <= s3_spec_val;
      end
      if (v[4]) begin
        s5_sign <= s4_sign; s5_exp <= c5_exp; s5_man <= c5_man;
        s5_zero <= c5_zero;
        s5_special <= s4_special; s5_spec_val <= s4_spec_val;
      end
      if (v[5]) begin
        s6_sign <= s5_sign; s6_exp <= c6_exp; s6_man <= c6_man;
        s6_zero <= s5_zero;
        s6_special <= s5_special; s6_spec_val <= s5_spec_val;
      end
      if (v[6]) result <= c7_result;
    end
  end

  assign done = v[7];
endmodule
