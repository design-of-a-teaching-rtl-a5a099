// tb_barrel_shifter: checks every shift amount in both directions, with
// random data, against the language's own shift operators. The shifter
// is combinational, so each result is sampled 1 time unit after the
// inputs change; 0 and 31 are included, and bits shifted in must be 0.
module tb_barrel_shifter;
  logic [31:0] din, dout;
  logic [4:0]  amt;
  logic        dir;
  int checks = 0, failures = 0;

  barrel_shifter dut (.data_in(din), .amount(amt), .dir(dir), .data_out(dout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int s = 0; s < 32; s++) begin
        for (int d = 0; d < 2; d++) begin
          logic [31:0] exp_v;
          din = (rep == 0) ? 32'hFFFF_FFFF : $urandom;
          amt = 5'(s);
          dir = d[0];
          #1;
          exp_v = d ? (din >> s) : (din << s);
          checks++;
          if (dout !== exp_v) begin
            failures++;
            $display("FAIL din=%h amt=%0d dir=%0d got %h exp %h", din, s, d, dout, exp_v);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
