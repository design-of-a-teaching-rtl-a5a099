// tb_branch_control: every combination of BRA_INS, flags, done signals,
// branch reset and delayed reset against the condition table.
// Expected values come from the table of conditions (BHI C+Z=0, BHE
// C=0, BLT C=1, BLE C+Z=1, BEQ Z=1, BNE Z=0, 110 multiplier busy, 111
// FP busy), with either reset forcing the output low. The block is
// combinational; each case is sampled 1 time unit after it is driven.
module tb_branch_control;
  import tisp_pkg::*;
  logic [2:0] bi;
  logic       c, z, md, fd, br, dq, out;
  int checks = 0, failures = 0;

  branch_control dut (.bra_ins(bra_ins_e'(bi)), .c(c), .z(z), .mult_done(md), .fp_done(fd),
                      .bra_rst(br), .delay_q(dq), .branch_out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      logic exp_v;
      {bi, c, z, md, fd, br} = 8'(v);
      for (int d = 0; d < 2; d++) begin
        dq = d[0];
        #1;
        case (bi)
          3'd0: exp_v = (c == 0) && (z == 0);   // higher
          3'd1: exp_v = (c == 0);               // higher or same
          3'd2: exp_v = (c == 1);               // lower
          3'd3: exp_v = (c == 1) || (z == 1);   // lower or same
          3'd4: exp_v = (z == 1);
          3'd5: exp_v = (z == 0);
          3'd6: exp_v = (md == 0);
          default: exp_v = (fd == 0);
        endcase
        if (br || dq) exp_v = 0;
        checks++;
        if (out !== exp_v) begin
          failures++;
          $display("FAIL bra=%0d c=%0d z=%0d md=%0d fd=%0d rst=%0d dq=%0d out=%0d", bi, c, z, md, fd, br, dq, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
