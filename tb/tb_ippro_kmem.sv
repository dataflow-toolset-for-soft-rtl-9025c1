// tb_ippro_kmem: self-checking test of the kernel memory.
// Random core (STK) and host writes, host priority when both write, and
// asynchronous reads, including write-through of a core write, against an
// array model.
`timescale 1ns/1ps
module tb_ippro_kmem;
  logic clk = 0;
  logic core_we, host_we;
  logic [4:0] core_waddr, host_waddr, raddr;
  logic [15:0] core_wdata, host_wdata, rdata;
  logic [15:0] model[32];
  int checks = 0, failures = 0;

  ippro_kmem dut (.*);
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
    core_we = 0; host_we = 0; core_waddr = 0; host_waddr = 0; core_wdata = 0; host_wdata = 0;
    raddr = 0;
    for (int i = 0; i < 32; i++) begin   // fill through the host port
      @(negedge clk); host_we = 1; host_waddr = 5'(i); host_wdata = 16'($urandom);
      model[i] = host_wdata;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      host_we = ($urandom_range(0, 3) == 0); core_we = $urandom_range(0, 1);
      host_waddr = 5'($urandom); core_waddr = (t % 5 == 0) ? host_waddr : 5'($urandom);
      host_wdata = 16'($urandom); core_wdata = 16'($urandom);
      raddr = (t % 7 == 0) ? core_waddr : 5'($urandom);
      #1;
      check("rdata", rdata, (core_we && !host_we && core_waddr == raddr) ? core_wdata : model[raddr]);
      @(posedge clk);
      if (host_we) model[host_waddr] = host_wdata;
      else if (core_we) model[core_waddr] = core_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
