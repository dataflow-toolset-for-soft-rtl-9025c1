// tb_ippro_core: self-checking testbench of one IPPro core.
//
// Programs are assembled with the ippro_pkg encoders, loaded through the host
// port and run; results are read back from the data memory or the output
// stream and compared with a reference model written here.  Parts:
//   A  every ALU operation in R-R, R-K and R-I form, several operand sets
//      (MULACC checked against the accumulated P value)
//   B  3-tap FIR over an array in data memory: LD, MULK, MULADDK, ST, loop
//      closed with CMP/BSF (the single-core FIR mapping)
//   C  conditional branches BZF, BEQF, BGTF, BSF and JMP, taken and not taken
//   D  streaming: out = in0 + in1 through R30/R31 with random gaps on both
//      input streams and random back-pressure on the output
//   E  STK then an R-K read, a back-to-back MUL/MULACC chain, and register
//      reads one, two and three slots after a write
//   F  timing: first instruction retires 4 clocks after fetch starts,
//      then one instruction per clock
// Dependent instructions are kept three slots apart with NOPs, as the
// core requires.
`timescale 1ns/1ps
module tb_ippro_core;
  import ippro_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic run = 1'b0;
  host_req_t host;
  logic [DATA_W-1:0] host_rdata;
  logic in0_valid, in0_ready, in1_valid, in1_ready, out_valid, out_ready;
  logic [DATA_W-1:0] in0_data, in1_data, out_data;
  logic [8:0] pc;
  flags_t flags;
  logic retire, stall_in, stall_out, branch_taken;

  int checks = 0, failures = 0;

  ippro_core dut (.*);

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
      $display("FAIL %s: got %0d (0x%0h) expected %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  // ---------------- assembler ----------------
  logic [INSTR_W-1:0] prog[$];
  localparam logic [INSTR_W-1:0] NOP = enc_misc(MOP_NOP, 0, 0, 0, 0);

  // Emit an instruction followed by two NOPs so its result is visible next.
  task automatic emit(logic [INSTR_W-1:0] i);
    prog.push_back(i);
    prog.push_back(NOP);
    prog.push_back(NOP);
  endtask

  task automatic host_write(hsel_e sel, int addr, logic [INSTR_W-1:0] data);
    @(negedge clk);
    host.we = 1'b1; host.sel = sel; host.addr = addr[15:0]; host.wdata = data;
    @(negedge clk);
    host.we = 1'b0;
  endtask

  task automatic host_read(int addr, output logic [DATA_W-1:0] data);
    @(negedge clk);
    host.we = 1'b0; host.sel = HSEL_DMEM; host.addr = addr[15:0];
    @(negedge clk);
    data = host_rdata;
  endtask

  task automatic load_and_run(int cycles);
    @(negedge clk); run = 1'b0; rst = 1'b1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    foreach (prog[i]) host_write(HSEL_IMEM, i, prog[i]);
    @(negedge clk); run = 1'b1;
    repeat (cycles) @(negedge clk);
    run = 1'b0;
    repeat (8) @(negedge clk);
  endtask

  // ---------------- reference model ----------------
  longint p_model;   // accumulator P

  function automatic longint sx(logic [15:0] v);
    return longint'($signed(v));
  endfunction

  function automatic logic [15:0] alu_model(alu_op_e op, logic [15:0] a, logic [15:0] b,
                                            logic [15:0] c);
    longint sa = sx(a), sb = sx(b), sc = sx(c), r;
    logic [15:0] t;
    unique case (op)
      OP_ADD:    r = sa + sb;
      OP_SUB:    r = sa - sb;
      OP_MUL:    r = sa * sb;
      OP_MULADD: r = sa * sb + sc;
      OP_MULSUB: r = sa * sb - sc;
      OP_MULACC: r = p_model + sa * sb;
      OP_LXOR:   begin t = a ^ b;     r = sx(t); end
      OP_LXNR:   begin t = ~(a ^ b);  r = sx(t); end
      OP_LOR:    begin t = a | b;     r = sx(t); end
      OP_LNOR:   begin t = ~(a | b);  r = sx(t); end
      OP_LNAND:  begin t = ~(a & b);  r = sx(t); end
      OP_LAND:   begin t = a & b;     r = sx(t); end
      OP_LSL:    begin t = a << b[3:0]; r = sx(t); end
      OP_LSR:    begin t = a >> b[3:0]; r = sx(t); end
      OP_MIN:    r = (sa < sb) ? sa : sb;
      OP_MAX:    r = (sa > sb) ? sa : sb;
      default:   r = 0;
    endcase
    p_model = r;
    return r[15:0];
  endfunction

  // ---------------- tests ----------------
  logic [15:0] expv[$];
  logic [15:0] rd;

  // One operand set per program run (48 results fill most of the 512-word
  // instruction memory once NOPs are added).
  task automatic test_alu(int sets);
    logic [15:0] a, b, c, k, imm;
    int addr;
    for (int s = 0; s < sets; s++) begin
      prog.delete(); expv.delete();
      p_model = 0;
      addr = 0;
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); k = 16'($urandom);
      imm = 16'($urandom);
      if (s == 0) begin a = 16'd1234; b = 16'hFFF3; c = 16'd77; k = 16'd3; imm = 16'd5; end
      host_write(HSEL_KMEM, s, {20'd0, k});
      emit(enc_ri(OP_ADD, 1, 0, int'(a)));  void'(alu_model(OP_ADD, 0, a, 0));
      emit(enc_ri(OP_ADD, 2, 0, int'(b)));  void'(alu_model(OP_ADD, 0, b, 0));
      emit(enc_ri(OP_ADD, 3, 0, int'(c)));  void'(alu_model(OP_ADD, 0, c, 0));
      for (int mode = 0; mode < 3; mode++) begin
        for (int o = 0; o <= int'(OP_MAX); o++) begin
          alu_op_e op = alu_op_e'(o);
          logic [15:0] bb;
          bb = (mode == 0) ? b : (mode == 1) ? k : imm;
          case (mode)
            0: emit(enc_rr(op, 4, 1, 2, 3));
            1: emit(enc_rk(op, 4, 1, s, 3));
            default: emit(enc_ri(op, 4, 1, int'(imm)));
          endcase
          expv.push_back(alu_model(op, a, bb, (mode == 2) ? 16'd0 : c));
          emit(enc_misc(MOP_ST, 0, 0, 4, addr));
          addr++;
        end
      end
      prog.push_back(enc_misc(MOP_JMP, 0, 0, 0, prog.size()));
      load_and_run(prog.size() + 20);
      foreach (expv[i]) begin
        host_read(i, rd);
        check($sformatf("alu set %0d op %0d mode %0d", s, i % 16, i / 16), rd, expv[i]);
      end
    end
  endtask

  task automatic test_fir(int n);
    logic signed [7:0] cf[3];
    logic [15:0] x[];
    int loop_pc;
    prog.delete();
    x = new[n];
    foreach (cf[i]) cf[i] = 8'($urandom);
    foreach (x[i]) begin
      x[i] = 16'($urandom_range(0, 4095));
      host_write(HSEL_DMEM, i, {20'd0, x[i]});
    end
    for (int i = 0; i < 3; i++) host_write(HSEL_KMEM, i, {20'd0, 16'(cf[i])});
    emit(enc_ri(OP_ADD, 1, 0, 2));        // R1 = n = 2
    emit(enc_ri(OP_ADD, 2, 0, n));        // R2 = N
    loop_pc = prog.size();
    prog.push_back(enc_misc(MOP_LD, 3, 1, 0, 0));     // x[n]
    prog.push_back(enc_misc(MOP_LD, 4, 1, 0, -1));    // x[n-1]
    prog.push_back(enc_misc(MOP_LD, 5, 1, 0, -2));    // x[n-2]
    prog.push_back(enc_rk(OP_MUL, 6, 3, 0));          // c0 x[n]      (R3 3 slots later)
    prog.push_back(NOP);
    prog.push_back(NOP);
    prog.push_back(enc_rk(OP_MULADD, 7, 4, 1, 6));    // + c1 x[n-1]
    prog.push_back(NOP);
    prog.push_back(NOP);
    prog.push_back(enc_rk(OP_MULADD, 8, 5, 2, 7));    // + c2 x[n-2]
    prog.push_back(enc_ri(OP_ADD, 1, 1, 1));          // n++
    prog.push_back(NOP);
    prog.push_back(enc_misc(MOP_ST, 0, 1, 8, 200));   // y at 200 + n: R1 is read before n++ lands
    prog.push_back(enc_misc(MOP_CMP, 0, 1, 2, 0));
    prog.push_back(enc_misc(MOP_BSF, 0, 0, 0, loop_pc));
    prog.push_back(enc_misc(MOP_JMP, 0, 0, 0, prog.size()));
    load_and_run(n * 20 + 40);
    for (int i = 2; i < n; i++) begin
      longint y = longint'(cf[0]) * sx(x[i]) + longint'(cf[1]) * sx(x[i-1]) +
                  longint'(cf[2]) * sx(x[i-2]);
      host_read(200 + i, rd);
      check($sformatf("fir y[%0d]", i), rd, y & 16'hFFFF);
    end
  endtask

  task automatic test_branch();
    prog.delete();
    emit(enc_ri(OP_ADD, 1, 0, 5));
    emit(enc_ri(OP_ADD, 2, 0, 5));
    emit(enc_ri(OP_ADD, 3, 0, 7));
    emit(enc_ri(OP_ADD, 9, 0, 99));          // "wrong path" marker value
    // BEQF taken: 5 == 5
    emit(enc_misc(MOP_CMP, 0, 1, 2, 0));
    prog.push_back(enc_misc(MOP_BEQF, 0, 0, 0, prog.size() + 3));
    prog.push_back(enc_misc(MOP_ST, 0, 0, 9, 10));   // skipped
    prog.push_back(enc_misc(MOP_ST, 0, 0, 9, 10));   // skipped
    emit(enc_misc(MOP_ST, 0, 0, 1, 11));             // target: dmem[11] = 5
    // BGTF not taken: 5 > 7 false ; BSF taken: 5 < 7
    emit(enc_misc(MOP_CMP, 0, 1, 3, 0));
    prog.push_back(enc_misc(MOP_BGTF, 0, 0, 0, 0));  // would restart: not taken
    emit(enc_misc(MOP_ST, 0, 0, 3, 12));             // dmem[12] = 7
    prog.push_back(enc_misc(MOP_BSF, 0, 0, 0, prog.size() + 2));
    prog.push_back(enc_misc(MOP_ST, 0, 0, 9, 13));   // skipped
    emit(enc_misc(MOP_ST, 0, 0, 2, 14));             // dmem[14] = 5
    // BGTF taken: 7 > 5
    emit(enc_misc(MOP_CMP, 0, 3, 1, 0));
    prog.push_back(enc_misc(MOP_BGTF, 0, 0, 0, prog.size() + 2));
    prog.push_back(enc_misc(MOP_ST, 0, 0, 9, 15));   // skipped
    // BZF taken: 5 - 5 = 0 (Z set by an ALU op)
    emit(enc_rr(OP_SUB, 4, 1, 2));
    prog.push_back(enc_misc(MOP_BZF, 0, 0, 0, prog.size() + 2));
    prog.push_back(enc_misc(MOP_ST, 0, 0, 9, 16));   // skipped
    // BZF not taken: 7 - 5 != 0
    emit(enc_rr(OP_SUB, 4, 3, 1));
    prog.push_back(enc_misc(MOP_BZF, 0, 0, 0, 0));
    emit(enc_misc(MOP_ST, 0, 0, 4, 17));             // dmem[17] = 2
    prog.push_back(enc_misc(MOP_JMP, 0, 0, 0, prog.size() + 3));
    prog.push_back(enc_misc(MOP_ST, 0, 0, 9, 18));   // skipped
    prog.push_back(enc_misc(MOP_ST, 0, 0, 9, 18));   // skipped
    prog.push_back(enc_misc(MOP_JMP, 0, 0, 0, prog.size()));
    for (int i = 10; i <= 18; i++) host_write(HSEL_DMEM, i, 36'd0);
    load_and_run(prog.size() + 40);
    begin
      int exp_mem[9] = '{0, 5, 7, 0, 5, 0, 0, 2, 0};
      for (int i = 10; i <= 18; i++) begin
        host_read(i, rd);
        check($sformatf("branch dmem[%0d]", i), rd, exp_mem[i-10]);
      end
    end
  endtask

  // Streaming: sources and sink run in parallel with the core.
  int n_stream;
  logic [15:0] s0[$], s1[$], sout[$];
  int n_stall_in, n_stall_out;

  always @(posedge clk) begin
    if (!rst) begin
      if (in0_valid && in0_ready) void'(s0.pop_front());
      if (in1_valid && in1_ready) void'(s1.pop_front());
      if (out_valid && out_ready) sout.push_back(out_data);
      if (stall_in)  n_stall_in++;
      if (stall_out) n_stall_out++;
    end
  end

  always @(negedge clk) begin
    if (!in0_valid || in0_ready) begin
      in0_valid = (s0.size() > 0) && ($urandom_range(0, 3) != 0);
      in0_data  = (s0.size() > 0) ? s0[0] : '0;
    end
    if (!in1_valid || in1_ready) begin
      in1_valid = (s1.size() > 0) && ($urandom_range(0, 2) != 0);
      in1_data  = (s1.size() > 0) ? s1[0] : '0;
    end
    out_ready = ($urandom_range(0, 3) != 0);
  end

  task automatic test_stream(int n);
    logic [15:0] e[$];
    prog.delete(); sout.delete();
    for (int i = 0; i < n; i++) begin
      logic [15:0] a = 16'($urandom), b = 16'($urandom);
      s0.push_back(a); s1.push_back(b); e.push_back(a + b);
    end
    prog.push_back(enc_rr(OP_ADD, 31, 30, 31));
    prog.push_back(enc_misc(MOP_JMP, 0, 0, 0, 0));
    n_stall_in = 0; n_stall_out = 0;
    load_and_run(n * 30);
    check("stream output count", sout.size(), n);
    foreach (e[i]) if (i < sout.size()) check($sformatf("stream out[%0d]", i), sout[i], e[i]);
    checks++;
    if (n_stall_in == 0 || n_stall_out == 0) begin
      failures++;
      $display("FAIL stream stalls not exercised: in=%0d out=%0d", n_stall_in, n_stall_out);
    end
  endtask

  // STK followed by an R-K read; a back-to-back MUL/MULACC chain (P feeds
  // the next instruction directly); reads one, two and three slots after a
  // write (old, old, new value).
  task automatic test_misc();
    prog.delete();
    emit(enc_ri(OP_ADD, 1, 0, 300));
    emit(enc_ri(OP_ADD, 2, 0, -7));
    emit(enc_ri(OP_ADD, 3, 0, 11));
    emit(enc_rk(OP_STK, 0, 1, 9));                  // K[9] = 300
    emit(enc_rk(OP_ADD, 4, 3, 9));                  // R4 = 11 + 300
    emit(enc_misc(MOP_ST, 0, 0, 4, 20));
    prog.push_back(enc_rr(OP_MUL, 5, 1, 2));        // P = 300 * -7
    prog.push_back(enc_rr(OP_MULACC, 6, 3, 3));     // P += 121
    prog.push_back(enc_rr(OP_MULACC, 7, 2, 2));     // P += 49
    prog.push_back(enc_rr(OP_MULACC, 8, 1, 3));     // P += 3300
    prog.push_back(NOP);
    prog.push_back(NOP);
    emit(enc_misc(MOP_ST, 0, 0, 8, 21));
    prog.push_back(enc_ri(OP_ADD, 10, 0, 1));       // R10 = 1
    prog.push_back(NOP);
    prog.push_back(NOP);
    prog.push_back(enc_ri(OP_ADD, 10, 0, 2));       // R10 = 2
    prog.push_back(enc_ri(OP_ADD, 11, 10, 0));      // 1 slot later: old value 1
    prog.push_back(enc_ri(OP_ADD, 12, 10, 0));      // 2 slots later: old value 1
    prog.push_back(enc_ri(OP_ADD, 13, 10, 0));      // 3 slots later: new value 2
    prog.push_back(NOP);
    prog.push_back(NOP);
    emit(enc_misc(MOP_ST, 0, 0, 11, 22));
    emit(enc_misc(MOP_ST, 0, 0, 12, 23));
    emit(enc_misc(MOP_ST, 0, 0, 13, 24));
    prog.push_back(enc_misc(MOP_JMP, 0, 0, 0, prog.size()));
    load_and_run(prog.size() + 20);
    host_read(20, rd); check("STK then ADDK", rd, 311);
    host_read(21, rd); check("MUL/MULACC chain", rd, 16'(-2100 + 121 + 49 + 3300));
    host_read(22, rd); check("read 1 slot after write (old)", rd, 1);
    host_read(23, rd); check("read 2 slots after write (old)", rd, 1);
    host_read(24, rd); check("read 3 slots after write (new)", rd, 2);
  endtask

  task automatic test_timing();
    int first, last, cyc, nret;
    prog.delete();
    for (int i = 0; i < 20; i++) prog.push_back(enc_rr(OP_MULADD, 10 + i % 8, 1, 2, 3));
    for (int i = 0; i < 8; i++) prog.push_back(NOP);
    @(negedge clk); rst = 1'b1; repeat (2) @(negedge clk); rst = 1'b0;
    foreach (prog[i]) host_write(HSEL_IMEM, i, prog[i]);
    @(negedge clk); run = 1'b1;
    first = -1; last = -1; cyc = 0; nret = 0;
    repeat (40) begin
      @(posedge clk); cyc++;
      @(negedge clk);
      if (retire) begin
        nret++;
        if (first < 0) first = cyc;
        if (nret == 20) last = cyc;
      end
    end
    run = 1'b0;
    check("latency fetch->retire (clocks)", first, 4);
    check("20 instructions in 20 clocks", last - first + 1, 20);
  endtask

  initial begin
    host = '0;
    in0_valid = 0; in1_valid = 0; out_ready = 1; in0_data = '0; in1_data = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    test_alu(4);
    test_fir(24);
    test_branch();
    test_stream(200);
    test_misc();
    test_timing();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
