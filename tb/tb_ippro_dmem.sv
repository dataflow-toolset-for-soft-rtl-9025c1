// tb_ippro_dmem: self-checking test of the data memory.
// Port A (core): asynchronous read, synchronous write.  Port B (host):
// synchronous write, one-clock read latency, priority over port A.
`timescale 1ns/1ps
module tb_ippro_dmem;
  logic clk = 0;
  logic [7:0] a_addr, b_addr;
  logic a_we, b_we;
  logic [15:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [15:0] model[256];
  logic [15:0] b_exp;
  int checks = 0, failures = 0;

  ippro_dmem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); b_we = 1; b_addr = 8'(i); b_wdata = 16'($urandom); model[i] = b_wdata;
    end
    @(negedge clk); b_we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t > 0) check("b_rdata", b_rdata, b_exp);
      b_we = ($urandom_range(0, 3) == 0); a_we = $urandom_range(0, 1);
      b_addr = 8'($urandom); a_addr = (t % 5 == 0) ? b_addr : 8'($urandom);
      b_wdata = 16'($urandom); a_wdata = 16'($urandom);
      #1;
      check("a_rdata", a_rdata, model[a_addr]);
      b_exp = model[b_addr];
      @(posedge clk);
      if (b_we) model[b_addr] = b_wdata;
      else if (a_we) model[a_addr] = a_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
