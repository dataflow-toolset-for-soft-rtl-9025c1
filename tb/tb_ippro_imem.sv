// tb_ippro_imem: self-checking test of the instruction memory.
// Host writes a random program, then reads with random enables: rd_data
// must show the addressed word one clock after an enabled read and hold
// while rd_en is low; reset clears the read register.
`timescale 1ns/1ps
module tb_ippro_imem;
  logic clk = 0, rst = 1;
  logic wr_en, rd_en;
  logic [8:0] wr_addr, rd_addr;
  logic [35:0] wr_data, rd_data, exp_q;
  logic [35:0] model[512];
  int checks = 0, failures = 0;

  ippro_imem dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    repeat (2) @(negedge clk);
    check("reset clears read register", rd_data, 0);
    rst = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 9'(i); wr_data = {$urandom, 4'($urandom)};
      model[i] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    exp_q = rd_data;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      check("rd_data", rd_data, exp_q);
      rd_en = $urandom_range(0, 1); rd_addr = 9'($urandom);
      if (rd_en) exp_q = model[rd_addr];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
