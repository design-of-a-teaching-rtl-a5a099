// branch_control: decides whether the sequencer takes the NABRA address.
//
// branch_out is high when the condition selected by BRA_INS holds:
// BHI C+Z=0, BHE C=0, BLT C=1, BLE C+Z=1, BEQ Z=1, BNE Z=0 (the source's
// condition table), or, for the two wait codes, while the multiplier is
// not done (110) or until the FP adder's done pulse (111). It is forced
// low by branch reset (the BRA_RST bit of the current control word, set
// in the fetch word) and by the delay register's output (the DELAY bit
// of the previous control word, set in the conditional-branch words),
// so a branch decision cannot leak into the word after it.
// Combinational: the decision is made within the control word's cycle.
module branch_control
  import tisp_pkg::*;
(
  input  bra_ins_e bra_ins,
  input  logic     c,
  input  logic     z,
  input  logic     mult_done,
  input  logic     fp_done,
  input  logic     bra_rst,
  input  logic     delay_q,
  output logic     branch_out
);
  logic cond;

  always_comb begin
    unique case (bra_ins)
      BR_BHI:      cond = !(c | z);
      BR_BHE:      cond = !c;
      BR_BLT:      cond = c;
      BR_BLE:      cond = c | z;
      BR_BEQ:      cond = z;
      BR_BNE:      cond = !z;
      BR_WAITMULT: cond = !mult_done;
      BR_WAITFP:   cond = !fp_done;
    endcase
    branch_out = cond & !bra_rst & !delay_q;
  end
endmodule
