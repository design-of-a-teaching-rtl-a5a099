// tb_datapath: issues control fields cycle by cycle as the control unit
// would and checks register contents on bus outputs, the immediate path
// through MUX B, write suppression when RW is 1, the carry and zero
// flags, and the temporary register after a multiply.
module tb_datapath;
  logic        clk = 0, rst = 1;
  logic [2:0]  da = 0, aa = 0, ba = 0;
  logic [7:0]  imm = 0;
  logic        rw = 1, mb = 1, cin = 0;
  logic [5:0]  contins = 6'b111000;
  logic        c_flag, z_flag, mult_done, fp_done;
  logic [31:0] data, temp_out;
  logic [31:0] model [8];
  int checks = 0, failures = 0;

  datapath dut (.clk(clk), .rst(rst), .da(da), .aa(aa), .ba(ba), .imm(imm), .rw(rw), .mb(mb),
                .cin(cin), .contins(contins), .c_flag(c_flag), .z_flag(z_flag),
                .mult_done(mult_done), .fp_done(fp_done), .data(data), .temp_out(temp_out));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // one execute cycle
  task automatic op(logic [5:0] c, logic [2:0] d, logic [2:0] x, logic [2:0] y,
                    logic [7:0] im, logic m, logic ci, logic w);
    @(negedge clk);
    contins = c; da = d; aa = x; ba = y; imm = im; mb = m; cin = ci; rw = !w;
  endtask

  // read a register through MOVE without writing
  task automatic peek(logic [2:0] rr, logic [31:0] exp_v, string msg);
    op(6'b110000, 3'd0, 3'd0, rr, 8'd0, 1, 0, 0);
    #1 check(data == exp_v, $sformatf("%s: R%0d = %h, expected %h", msg, rr, data, exp_v));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 8; i++) model[i] = 0;
    // R1 <- 0 + 200 (ADDI), R2 <- ~0x0F (NOTI)
    op(6'b010000, 3'd1, 3'd0, 3'd0, 8'd200, 0, 0, 1); model[1] = 200;
    op(6'b001011, 3'd2, 3'd0, 3'd0, 8'h0F, 0, 0, 1);  model[2] = ~32'h0F;
    peek(3'd1, model[1], "ADDI");
    peek(3'd2, model[2], "NOTI");
    // R3 <- R1 + R2: 200 + 0xFFFFFFF0 carries out
    op(6'b010000, 3'd3, 3'd1, 3'd2, 8'd0, 1, 0, 1); model[3] = 200 + ~32'h0F;
    @(negedge clk); check(c_flag == 1 && z_flag == 0, "carry out of ADD");
    // R4 <- R1 - R1 = 0: zero, no borrow
    op(6'b010000, 3'd4, 3'd1, 3'd1, 8'd0, 1, 1, 1); model[4] = 0;
    @(negedge clk); check(z_flag == 1 && c_flag == 0, "zero flag on SUB");
    // R5 <- R1 - R2 borrows
    op(6'b010000, 3'd5, 3'd1, 3'd2, 8'd0, 1, 1, 1); model[5] = 200 - ~32'h0F;
    @(negedge clk); check(c_flag == 1, "borrow flag on SUB");
    // RW = 1: no write, flags hold
    op(6'b010000, 3'd5, 3'd1, 3'd1, 8'd0, 1, 1, 0);
    @(negedge clk); check(c_flag == 1 && z_flag == 0, "flags hold without a write");
    peek(3'd5, model[5], "no write with RW = 1");
    peek(3'd3, model[3], "ADD");
    // random ALU operations against the model
    for (int i = 0; i < 200; i++) begin
      logic [2:0] d, x, y;
      logic [31:0] av, bv, rv;
      int k;
      d = 3'($urandom); x = 3'($urandom); y = 3'($urandom);
      av = model[x]; bv = model[y]; k = $urandom % 4;
      case (k)
        0: begin op(6'b001000, d, x, y, 0, 1, 0, 1); rv = av & bv; end
        1: begin op(6'b001010, d, x, y, 0, 1, 0, 1); rv = av ^ bv; end
        2: begin op(6'b010000, d, x, y, 0, 1, 0, 1); rv = av + bv; end
        default: begin
          logic [7:0] im;
          im = 8'($urandom);
          op(6'b010000, d, x, y, im, 0, 0, 1); rv = av + 32'(im);
        end
      endcase
      #1 check(data == rv, $sformatf("random op %0d result %h expected %h", k, data, rv));
      model[d] = rv;
    end
    for (int i = 0; i < 8; i++) peek(3'(i), model[i], "final");
    // multiply R6 <- R1 * R2, upper word to temp
    op(6'b010000, 3'd6, 3'd0, 3'd0, 8'd77, 0, 0, 1);   // R6 = R0 + 77
    model[6] = model[0] + 77;
    op(6'b101100, 3'd7, 3'd6, 3'd2, 8'd0, 1, 0, 0);    // start
    op(6'b101000, 3'd7, 3'd6, 3'd2, 8'd0, 1, 0, 0);
    while (!mult_done) @(negedge clk);
    @(negedge clk);
    begin
      logic [63:0] p;
      p = 64'(model[6]) * 64'(model[2]);
      check(temp_out == p[63:32], $sformatf("temp %h expected %h", temp_out, p[63:32]));
      contins = 6'b101000; #1;
      check(data == p[31:0], "product low word on the bus");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
