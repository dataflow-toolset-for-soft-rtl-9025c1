// tb_ippro_fir_array: end-to-end test of the seven-core streaming FIR array.
//
// Loads the seven programs and the tap coefficients through the host port,
// then streams samples in and checks every filtered output against
//   y[n] = c0 x[n] + c1 x[n-1] + c2 x[n-2] + c3 x[n-3]   (16-bit wrap-around)
// with x[n<0] = 0.  Coefficients are 8-bit signed; c3 = 0 makes it the
// 3-tap filter.  Core programs (NOPs keep dependent instructions three apart):
//   multiplier core k: shift delay line R1..R4, R1 = pop(R30),
//                      push(R31) = R(1+k) * K[0], jump back     (8 instructions)
//   adder cores:       push(R31) = pop(R30) + pop(R31), jump back
// Phase 1 drives the input with random gaps and the output with random
// back-pressure and counts the mechanisms: input FIFO full, a core waiting
// on an empty input, a core frozen on a full output, taken branches.  Each
// must occur at least once.  Phase 2 streams without gaps and checks the
// steady-state rate of one output per 11 clocks (8-instruction loop plus
// 3 cancelled slots after the jump).  Runs at the default parameters.
`timescale 1ns/1ps
module tb_ippro_fir_array;
  import ippro_pkg::*;

  localparam int N1 = 300;   // samples, phase 1
  localparam int N2 = 60;    // samples, phase 2

  logic clk = 1'b0, rst = 1'b1, run = 1'b0;
  host_req_t host;
  logic [2:0] host_core;
  logic [DATA_W-1:0] host_rdata;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [DATA_W-1:0] in_data, out_data;
  logic [6:0] retire, stall_in, stall_out, branch_taken;

  int checks = 0, failures = 0;

  ippro_fir_array dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic host_write(int core, hsel_e sel, int addr, logic [INSTR_W-1:0] data);
    @(negedge clk);
    host.we = 1'b1; host.sel = sel; host.addr = addr[15:0]; host.wdata = data;
    host_core = core[2:0];
    @(negedge clk);
    host.we = 1'b0;
  endtask

  localparam logic [INSTR_W-1:0] NOP = enc_misc(MOP_NOP, 0, 0, 0, 0);

  task automatic load_programs(logic signed [7:0] cf[4]);
    logic [INSTR_W-1:0] p[$];
    for (int k = 0; k < 4; k++) begin
      p.delete();
      p.push_back(enc_ri(OP_ADD, 4, 3, 0));
      p.push_back(enc_ri(OP_ADD, 3, 2, 0));
      p.push_back(enc_ri(OP_ADD, 2, 1, 0));
      p.push_back(enc_ri(OP_ADD, 1, 30, 0));      // pop x[n]
      p.push_back(NOP);
      p.push_back(NOP);
      p.push_back(enc_rk(OP_MUL, 31, 1 + k, 0));  // push c_k * x[n-k]
      p.push_back(enc_misc(MOP_JMP, 0, 0, 0, 0));
      foreach (p[i]) host_write(k, HSEL_IMEM, i, p[i]);
      host_write(k, HSEL_KMEM, 0, {20'd0, 16'(cf[k])});
    end
    for (int k = 4; k < 7; k++) begin
      host_write(k, HSEL_IMEM, 0, enc_rr(OP_ADD, 31, 30, 31));
      host_write(k, HSEL_IMEM, 1, enc_misc(MOP_JMP, 0, 0, 0, 0));
    end
  endtask

  // Source and sink
  logic [15:0] src[$], got[$];
  int  gap_pct, bp_pct;
  int  n_full, n_stall_in, n_stall_out, n_branch;
  int  out_cycles[$];
  int  cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (in_valid && in_ready) void'(src.pop_front());
      if (in_valid && !in_ready) n_full++;
      if (out_valid && out_ready) begin
        got.push_back(out_data);
        out_cycles.push_back(cyc);
      end
      n_stall_in  += $countones(stall_in);
      n_stall_out += $countones(stall_out);
      n_branch    += $countones(branch_taken);
    end
  end

  always @(negedge clk) begin
    if (!in_valid || in_ready) begin
      in_valid = (src.size() > 0) && ($urandom_range(0, 99) >= gap_pct);
      in_data  = (src.size() > 0) ? src[0] : '0;
    end
    out_ready = ($urandom_range(0, 99) >= bp_pct);
  end

  task automatic run_phase(string name, int n, int gap, int bp, logic signed [7:0] cf[4],
                           output int period);
    logic [15:0] x[$];
    int t0;
    @(negedge clk); rst = 1'b1; run = 1'b0; repeat (2) @(negedge clk); rst = 1'b0;
    load_programs(cf);
    got.delete(); out_cycles.delete();
    gap_pct = gap; bp_pct = bp;
    for (int i = 0; i < n; i++) begin
      logic [15:0] v = 16'($urandom_range(0, 65535));
      x.push_back(v);
      src.push_back(v);
    end
    @(negedge clk); run = 1'b1;
    t0 = cyc;
    wait (got.size() == n || cyc > t0 + n * 60);
    repeat (20) @(negedge clk);
    run = 1'b0;
    check({name, " output count"}, got.size(), n);
    for (int i = 0; i < n && i < got.size(); i++) begin
      longint y = 0;
      for (int k = 0; k < 4; k++)
        if (i - k >= 0) y += longint'(cf[k]) * longint'($signed(x[i-k]));
      check($sformatf("%s y[%0d]", name, i), got[i], y & 16'hFFFF);
    end
    period = (got.size() > 20) ? (out_cycles[got.size()-1] - out_cycles[10]) /
                                 (got.size() - 11) : 0;
  endtask

  initial begin
    logic signed [7:0] cf[4];
    int period;
    host = '0; host_core = '0;
    in_valid = 0; in_data = '0; out_ready = 1;
    n_full = 0; n_stall_in = 0; n_stall_out = 0; n_branch = 0;
    repeat (3) @(negedge clk);

    // Phase 1: 3-tap filter, random gaps and back-pressure.
    cf = '{8'sd37, -8'sd91, 8'sd120, 8'sd0};
    run_phase("3-tap", N1, 60, 70, cf, period);
    $display("mechanisms: input-full %0d, wait-on-input %0d, output-frozen %0d, taken branches %0d",
             n_full, n_stall_in, n_stall_out, n_branch);
    check("input FIFO full seen",    n_full > 0,      1);
    check("core waited on input",    n_stall_in > 0,  1);
    check("core frozen on output",   n_stall_out > 0, 1);
    check("taken branches seen",     n_branch > 0,    1);

    // Phase 2: four random taps, free-running source and sink.
    foreach (cf[k]) cf[k] = 8'($urandom);
    run_phase("4-tap", N2, 0, 0, cf, period);
    $display("steady-state period: %0d clocks per output", period);
    check("steady-state clocks per output", period, 11);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
