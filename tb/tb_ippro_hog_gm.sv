// tb_ippro_hog_gm: HOG gradient-and-magnitude stage on one IPPro core.
//
// Workload test.  One 8 x 8 cell of 8-bit pixels with a one-pixel border
// (10 x 10 words, row-major at data memory 0..99) is processed by a
// hand-scheduled program:
//   gx = p[r][c+1] - p[r][c-1]     gy = p[r+1][c] - p[r-1][c]
//   mag = |gx| + |gy|              (|v| = MAX(v, 0 - v); L1 magnitude, since
//                                   the core has no square root)
// gx and gy of each pixel are pushed on the output stream (R31) and mag is
// stored at data memory 100 + 8r + c.  The nested loop is closed with
// CMP/BSF.  Everything is compared with a model, and the clocks per pixel
// are checked against the schedule: 24 per pixel inside a row (21
// instructions and the 3 slots cancelled by the taken branch).
`timescale 1ns/1ps
module tb_ippro_hog_gm;
  import ippro_pkg::*;

  logic clk = 1'b0, rst = 1'b1, run = 1'b0;
  host_req_t host;
  logic [DATA_W-1:0] host_rdata;
  logic in0_valid = 0, in0_ready, in1_valid = 0, in1_ready, out_valid, out_ready;
  logic [DATA_W-1:0] in0_data = '0, in1_data = '0, out_data;
  logic [8:0] pc;
  flags_t flags;
  logic retire, stall_in, stall_out, branch_taken;
  int checks = 0, failures = 0;

  ippro_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic host_write(hsel_e sel, int addr, logic [INSTR_W-1:0] data);
    @(negedge clk);
    host.we = 1'b1; host.sel = sel; host.addr = addr[15:0]; host.wdata = data;
    @(negedge clk);
    host.we = 1'b0;
  endtask

  localparam logic [INSTR_W-1:0] NOP = enc_misc(MOP_NOP, 0, 0, 0, 0);
  logic [INSTR_W-1:0] prog[$];
  logic [15:0] sgot[$];

  int pcyc[$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (out_valid && out_ready) begin
      sgot.push_back(out_data);
      pcyc.push_back(cyc);
    end
  end

  initial begin
    logic [7:0] img[10][10];
    int loop_pc, halt_pc, t0, t1;

    logic [15:0] rd;
    host = '0; out_ready = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    foreach (img[r, c]) begin
      img[r][c] = 8'($urandom);
      host_write(HSEL_DMEM, 10 * r + c, {28'd0, img[r][c]});
    end

    // registers: R1 pixel pointer, R10 column, R11 row, R12 output index, R13 = 8
    prog.push_back(enc_ri(OP_ADD, 1, 0, 11));
    prog.push_back(enc_ri(OP_ADD, 10, 0, 0));
    prog.push_back(enc_ri(OP_ADD, 11, 0, 0));
    prog.push_back(enc_ri(OP_ADD, 12, 0, 0));
    prog.push_back(enc_ri(OP_ADD, 13, 0, 8));
    prog.push_back(NOP);
    prog.push_back(NOP);
    loop_pc = prog.size();
    prog.push_back(enc_misc(MOP_LD, 2, 1, 0, 1));     // right
    prog.push_back(enc_misc(MOP_LD, 3, 1, 0, -1));    // left
    prog.push_back(enc_misc(MOP_LD, 4, 1, 0, 10));    // below
    prog.push_back(enc_misc(MOP_LD, 5, 1, 0, -10));   // above
    prog.push_back(enc_rr(OP_SUB, 6, 2, 3));          // gx
    prog.push_back(enc_ri(OP_ADD, 10, 10, 1));        // c++
    prog.push_back(enc_rr(OP_SUB, 7, 4, 5));          // gy
    prog.push_back(enc_rr(OP_SUB, 8, 0, 6));          // -gx
    prog.push_back(enc_ri(OP_ADD, 31, 6, 0));         // push gx
    prog.push_back(enc_rr(OP_SUB, 9, 0, 7));          // -gy
    prog.push_back(enc_rr(OP_MAX, 8, 6, 8));          // |gx|
    prog.push_back(enc_ri(OP_ADD, 31, 7, 0));         // push gy
    prog.push_back(enc_rr(OP_MAX, 9, 7, 9));          // |gy|
    prog.push_back(enc_ri(OP_ADD, 1, 1, 1));          // pointer++
    prog.push_back(enc_misc(MOP_CMP, 0, 10, 13, 0));  // c vs 8
    prog.push_back(enc_rr(OP_ADD, 14, 8, 9));         // mag
    prog.push_back(NOP);
    prog.push_back(NOP);
    prog.push_back(enc_misc(MOP_ST, 0, 12, 14, 100)); // dmem[100 + k] = mag
    prog.push_back(enc_ri(OP_ADD, 12, 12, 1));        // k++
    prog.push_back(enc_misc(MOP_BSF, 0, 0, 0, loop_pc));
    prog.push_back(enc_ri(OP_ADD, 1, 1, 2));          // skip the border columns
    prog.push_back(enc_ri(OP_ADD, 10, 0, 0));         // c = 0
    prog.push_back(enc_ri(OP_ADD, 11, 11, 1));        // r++
    prog.push_back(NOP);
    prog.push_back(NOP);
    prog.push_back(enc_misc(MOP_CMP, 0, 11, 13, 0));
    prog.push_back(enc_misc(MOP_BSF, 0, 0, 0, loop_pc));
    halt_pc = prog.size();
    prog.push_back(enc_misc(MOP_JMP, 0, 0, 0, halt_pc));
    foreach (prog[i]) host_write(HSEL_IMEM, i, prog[i]);

    @(negedge clk);
    run = 1'b1;
    t0 = cyc;
    wait (sgot.size() == 128 || cyc > t0 + 5000);
    t1 = cyc;
    repeat (20) @(negedge clk);
    run = 1'b0;
    repeat (8) @(negedge clk);

    check("stream words (gx, gy per pixel)", sgot.size(), 128);
    for (int r = 1; r <= 8; r++) begin
      for (int c = 1; c <= 8; c++) begin
        automatic int k  = 8 * (r - 1) + (c - 1);
        automatic int gx = int'(img[r][c+1]) - int'(img[r][c-1]);
        automatic int gy = int'(img[r+1][c]) - int'(img[r-1][c]);
        automatic int mg = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
        if (2 * k + 1 < sgot.size()) begin
          check($sformatf("gx[%0d][%0d]", r, c), sgot[2*k],   gx & 16'hFFFF);
          check($sformatf("gy[%0d][%0d]", r, c), sgot[2*k+1], gy & 16'hFFFF);
        end
        @(negedge clk);
        host.we = 1'b0; host.sel = HSEL_DMEM; host.addr = 16'(100 + k);
        @(negedge clk);
        rd = host_rdata;
        check($sformatf("mag[%0d][%0d]", r, c), rd, mg);
      end
    end
    // Within a row, successive pixels are 24 clocks apart.
    for (int k = 1; k < 64 && 2 * k < pcyc.size(); k++)
      if (k % 8 != 0) check($sformatf("clocks between pixel %0d and %0d", k - 1, k),
                            pcyc[2*k] - pcyc[2*k-2], 24);
    $display("cell of 64 pixels: %0d clocks (%0.1f clocks per pixel)", t1 - t0,
             real'(t1 - t0) / 64.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
