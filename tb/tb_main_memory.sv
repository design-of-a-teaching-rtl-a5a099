// tb_main_memory: checks the preset contents, then writes random words
// to random addresses and reads them back against a shadow array;
// a read with we low must not change the contents.
module tb_main_memory;
  logic        clk = 0;
  logic        we;
  logic [7:0]  addr;
  logic [31:0] wdata, rdata;
  logic [31:0] shadow [256];
  int checks = 0, failures = 0;

  main_memory dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    // preset image: word 5 is the shift amount 8, word 9 the loop count 3
    #1 addr = 8'd5; #1 checks++; if (rdata !== 32'd8) begin failures++; $display("FAIL preset[5]=%h", rdata); end
    addr = 8'd9; #1 checks++; if (rdata !== 32'd3) begin failures++; $display("FAIL preset[9]=%h", rdata); end
    addr = 8'd200; #1 checks++; if (rdata !== 32'd0) begin failures++; $display("FAIL preset[200]=%h", rdata); end
    for (int i = 0; i < 256; i++) shadow[i] = (i == 5) ? 32'd8 : 32'd0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we    = 1'($urandom);
      addr  = 8'($urandom % 16 + ((i % 3 == 0) ? 240 : 16));
      wdata = $urandom;
      @(posedge clk);
      if (we) shadow[addr] = wdata;
      #1;
      checks++;
      if (we && rdata !== wdata) begin
        failures++;
        $display("FAIL write addr=%0d got %h exp %h", addr, rdata, wdata);
      end
    end
    @(negedge clk);
    we = 0;
    for (int i = 16; i < 32; i++) begin
      addr = 8'(i); #1;
      checks++;
      if (rdata !== shadow[i]) begin
        failures++;
        $display("FAIL readback addr=%0d got %h exp %h", i, rdata, shadow[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
