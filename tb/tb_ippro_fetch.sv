// tb_ippro_fetch: self-checking test of the program counter / branch handler.
// Random run, hold and redirect inputs; checks PC, the memory read enable,
// d_valid and d_pc against a model: PC advances by one per unheld running
// cycle, a redirect loads the target and kills the word in DECODE.
`timescale 1ns/1ps
module tb_ippro_fetch;
  logic clk = 0, rst = 1, run, hold, redirect, imem_rd_en, d_valid;
  logic [8:0] target, pc, d_pc;
  logic [8:0] m_pc, m_dpc;
  logic m_dv;
  int checks = 0, failures = 0;

  ippro_fetch dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    run = 0; hold = 0; redirect = 0; target = 0;
    m_pc = 0; m_dpc = 0; m_dv = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      run = ($urandom_range(0, 9) != 0); hold = ($urandom_range(0, 4) == 0);
      redirect = ($urandom_range(0, 9) == 0); target = 9'($urandom);
      #1;
      check("pc", pc, m_pc);
      check("d_valid", d_valid, m_dv);
      if (m_dv) check("d_pc", d_pc, m_dpc);
      check("imem_rd_en", imem_rd_en, run && !hold && !redirect);
      @(posedge clk);
      if (redirect) begin m_pc = target; m_dv = 0; end
      else if (!hold) begin
        m_dv = run;
        if (run) begin m_dpc = m_pc; m_pc = m_pc + 1; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
