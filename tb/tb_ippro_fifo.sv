// tb_ippro_fifo: self-checking test of the stream FIFO.
// Random push/pop traffic against a queue model; checks data order, the
// count output, full (in_ready low) and empty (out_valid low) behaviour, and
// that a word written is readable on the next clock.
`timescale 1ns/1ps
module tb_ippro_fifo;
  localparam int DEPTH = 16;   // the default depth of ippro_fifo
  logic clk = 0, rst = 1;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model[$];
  int n_full = 0, n_empty = 0;

  ippro_fifo dut (.*);
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
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 4000; t++) begin
      automatic int ph = (t / 500) % 3;   // phases: mostly fill, mostly drain, balanced
      @(negedge clk);
      if (!in_valid || in_ready) begin
        in_valid = $urandom_range(0, 99) < (ph == 0 ? 80 : ph == 1 ? 20 : 50);
        in_data  = 16'($urandom);
      end
      out_ready = $urandom_range(0, 99) < (ph == 0 ? 20 : ph == 1 ? 80 : 50);
      #1;
      check("count", count, model.size());
      check("out_valid", out_valid, model.size() > 0);
      check("in_ready", in_ready, (model.size() < DEPTH) || out_ready);
      if (out_valid) check("out_data", out_data, model[0]);
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0) n_empty++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    check("full reached", n_full > 0, 1);
    check("empty reached", n_empty > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
