// tb_register_file: random writes and reads against a shadow register
// array, including simultaneous reads of the register being written
// (the old value must be read until the edge), reset to zero, and the
// temporary register's enable.
module tb_register_file;
  logic        clk = 0, rst = 1, we = 0, temp_en = 0;
  logic [2:0]  da = 0, aa = 0, ba = 0;
  logic [31:0] d_in = 0, a_out, b_out, temp_in = 0, temp_out;
  logic [31:0] shadow [8];
  logic [31:0] temp_shadow;
  int checks = 0, failures = 0;

  register_file dut (.clk(clk), .rst(rst), .we(we), .da(da), .aa(aa), .ba(ba),
                     .d_in(d_in), .a_out(a_out), .b_out(b_out),
                     .temp_en(temp_en), .temp_in(temp_in), .temp_out(temp_out));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 8; i++) begin
      shadow[i] = 0;
      aa = 3'(i); #1;
      check(a_out == 0, $sformatf("R%0d zero after reset", i));
    end
    temp_shadow = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = 1'($urandom); da = 3'($urandom); aa = 3'($urandom); ba = 3'($urandom);
      d_in = $urandom; temp_en = ($urandom % 4 == 0); temp_in = $urandom;
      #1;
      check(a_out == shadow[aa] && b_out == shadow[ba],
            $sformatf("read A=R%0d %h/%h B=R%0d %h/%h", aa, a_out, shadow[aa], ba, b_out, shadow[ba]));
      check(temp_out == temp_shadow, "temp register");
      @(posedge clk);
      if (we) shadow[da] = d_in;
      if (temp_en) temp_shadow = temp_in;
    end
    @(negedge clk);
    rst = 1; we = 0; temp_en = 0;
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < 8; i++) begin
      ba = 3'(i); #1;
      check(b_out == 0, $sformatf("R%0d cleared by reset", i));
    end
    check(temp_out == 0, "temp cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
