// tb_ippro_regfile: self-checking test of the register file.
// Random writes and three-port reads against an array model; checks reset
// to zero and write-through (a read of the register being written returns
// the new value in the same cycle).
`timescale 1ns/1ps
module tb_ippro_regfile;
  logic clk = 0, rst = 1;
  logic we;
  logic [4:0] waddr, raddr1, raddr2, raddr3;
  logic [15:0] wdata, rdata1, rdata2, rdata3;
  logic [15:0] model[32];
  int checks = 0, failures = 0;

  ippro_regfile dut (.*);
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
    we = 0; waddr = 0; wdata = 0; raddr1 = 0; raddr2 = 0; raddr3 = 0;
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 32; i++) begin
      raddr1 = 5'(i); #1; check("reset value", rdata1, 0);
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = 5'($urandom); wdata = 16'($urandom);
      raddr1 = 5'($urandom); raddr2 = (t % 4 == 0) ? waddr : 5'($urandom); raddr3 = 5'($urandom);
      #1;
      check("rdata1", rdata1, (we && waddr == raddr1) ? wdata : model[raddr1]);
      check("rdata2", rdata2, (we && waddr == raddr2) ? wdata : model[raddr2]);
      check("rdata3", rdata3, (we && waddr == raddr3) ? wdata : model[raddr3]);
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
