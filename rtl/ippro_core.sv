// ippro_core: one IPPro soft processor.
//
// A 16-bit RISC core with a five-stage pipeline:
//   FETCH   PC and branch handler read the instruction memory (ippro_fetch,
//           ippro_imem; the memory's read register is the FETCH/DECODE register)
//   DECODE  instruction fields and controls (ippro_decode), operand reads from
//           the register file, the kernel memory, the immediate or a stream port
//   EXE1    multiplier of the DSP48E1-style unit (ippro_alu)
//   EXE2    add/sub/logic of the DSP unit; branch decision (ippro_branch_ctrl)
//   WRITE   register file write, data memory LD/ST, kernel STK, stream push
// There is no forwarding and no interlock on registers: the register file is
// write-through, so a result can be read by the third instruction after the
// one that produced it; the program (compiler) keeps dependent instructions
// that far apart, inserting NOPs where needed.  A taken branch is resolved in
// EXE2 and cancels the three younger instructions (FETCH/DECODE, EXE1 and
// the word being fetched).
//
// Streaming: reading R30 pops input stream 0, reading R31 pops input stream 1,
// writing R31 pushes the output stream (valid/ready).  An instruction in
// DECODE that needs an empty input waits there (bubbles go down the
// pipeline); an output push that is not accepted freezes the whole pipeline.
//
// Host port: while the core is stopped (run low) the host writes the
// instruction, kernel and data memories, and reads the data memory with one
// clock of latency on host_rdata.  The core fetches while run is high.
//
// The stage split, the memories and the DSP-based ALU follow the published
// IPPro architecture; the hazard policy, the branch penalty, the stream
// register mapping and the host port are this design's choices.
module ippro_core
  import ippro_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 512,
  parameter int unsigned DMEM_DEPTH = 256,
  localparam int unsigned KMEM_DEPTH = 32,
  localparam int unsigned RF_DEPTH   = 32,
  localparam int unsigned IAW        = $clog2(IMEM_DEPTH),
  localparam int unsigned DAW        = $clog2(DMEM_DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              run,
  // host access
  input  host_req_t         host,
  output logic [DATA_W-1:0] host_rdata,
  // input streams
  input  logic              in0_valid,
  output logic              in0_ready,
  input  logic [DATA_W-1:0] in0_data,
  input  logic              in1_valid,
  output logic              in1_ready,
  input  logic [DATA_W-1:0] in1_data,
  // output stream
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  // status
  output logic [IAW-1:0]    pc,
  output flags_t            flags,
  output logic              retire,      // an instruction leaves WRITE
  output logic              stall_in,    // DECODE waits for a stream word
  output logic              stall_out,   // pipeline frozen on output back-pressure
  output logic              branch_taken // a taken branch cancels younger instructions
);

  // ---------------- FETCH ----------------
  logic               freeze, redirect, d_stall, hold_front;
  logic [IAW-1:0]     target;
  logic               imem_rd_en, d_valid;
  logic [IAW-1:0]     d_pc;
  logic [INSTR_W-1:0] d_instr;

  assign hold_front = freeze || d_stall;

  ippro_fetch #(.IMEM_DEPTH(IMEM_DEPTH)) u_fetch (
    .clk, .rst, .run,
    .hold       (hold_front),
    .redirect   (redirect),
    .target     (target),
    .pc         (pc),
    .imem_rd_en (imem_rd_en),
    .d_valid    (d_valid),
    .d_pc       (d_pc)
  );

  ippro_imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .rst,
    .wr_en   (host.we && host.sel == HSEL_IMEM),
    .wr_addr (host.addr[IAW-1:0]),
    .wr_data (host.wdata),
    .rd_en   (imem_rd_en),
    .rd_addr (pc),
    .rd_data (d_instr)
  );

  // ---------------- DECODE ----------------
  ctrl_t             ctrl_d;
  logic [DATA_W-1:0] rf1, rf2, rf3, kval;
  logic [DATA_W-1:0] opa_d, opb_d, opc_d, reg2_d;
  logic              need_in0, need_in1, d_issue;

  // WRITE-stage signals used by the register file
  ctrl_t             ctrl_w;
  logic [DATA_W-1:0] w_result, w_data, dmem_rdata, sd_w;
  logic              rf_we;

  ippro_decode u_decode (.valid(d_valid), .instr(d_instr), .ctrl(ctrl_d));

  ippro_regfile #(.DEPTH(RF_DEPTH)) u_rf (
    .clk, .rst,
    .we     (rf_we),
    .waddr  (ctrl_w.dest),
    .wdata  (w_data),
    .raddr1 (ctrl_d.src1),
    .raddr2 (ctrl_d.src2),
    .raddr3 (ctrl_d.src3),
    .rdata1 (rf1),
    .rdata2 (rf2),
    .rdata3 (rf3)
  );

  ippro_kmem #(.DEPTH(KMEM_DEPTH)) u_kmem (
    .clk,
    .core_we    (ctrl_w.valid && ctrl_w.is_stk && !freeze),
    .core_waddr (ctrl_w.kaddr),
    .core_wdata (sd_w),
    .host_we    (host.we && host.sel == HSEL_KMEM),
    .host_waddr (host.addr[$clog2(KMEM_DEPTH)-1:0]),
    .host_wdata (host.wdata[DATA_W-1:0]),
    .raddr      (ctrl_d.kaddr),
    .rdata      (kval)
  );

  // A register operand is the register file, or a stream word for R30/R31.
  function automatic logic [DATA_W-1:0] src_val(logic [REG_AW-1:0] idx, logic [DATA_W-1:0] rf,
                                                logic [DATA_W-1:0] s0, logic [DATA_W-1:0] s1);
    if (idx == REG_IN0)      return s0;
    else if (idx == REG_IN1) return s1;
    else                     return rf;
  endfunction

  always_comb begin
    need_in0 = ctrl_d.valid && ((ctrl_d.rd1 && ctrl_d.src1 == REG_IN0) ||
                                (ctrl_d.rd2 && ctrl_d.src2 == REG_IN0) ||
                                (ctrl_d.rd3 && ctrl_d.src3 == REG_IN0));
    need_in1 = ctrl_d.valid && ((ctrl_d.rd1 && ctrl_d.src1 == REG_IN1) ||
                                (ctrl_d.rd2 && ctrl_d.src2 == REG_IN1) ||
                                (ctrl_d.rd3 && ctrl_d.src3 == REG_IN1));
    d_stall  = (need_in0 && !in0_valid) || (need_in1 && !in1_valid);
    d_issue  = ctrl_d.valid && !d_stall && !freeze && !redirect;

    opa_d  = src_val(ctrl_d.src1, rf1, in0_data, in1_data);
    reg2_d = src_val(ctrl_d.src2, rf2, in0_data, in1_data);
    opc_d  = ctrl_d.use_c ? src_val(ctrl_d.src3, rf3, in0_data, in1_data) : '0;
    unique case (ctrl_d.bsel)
      BSEL_KMEM: opb_d = kval;
      BSEL_IMM:  opb_d = ctrl_d.imm;
      default:   opb_d = reg2_d;
    endcase
  end

  assign in0_ready = d_issue && need_in0;
  assign in1_ready = d_issue && need_in1;

  // ---------------- DECODE / EXE1 register ----------------
  ctrl_t             ctrl_e1, ctrl_e2;
  logic [DATA_W-1:0] a_e1, b_e1, c_e1, sd_e1, sd_e2;

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_e1 <= '0;
      a_e1    <= '0;
      b_e1    <= '0;
      c_e1    <= '0;
      sd_e1   <= '0;
    end else if (!freeze) begin
      ctrl_e1       <= ctrl_d;
      ctrl_e1.valid <= d_issue;
      a_e1          <= opa_d;
      b_e1          <= opb_d;
      c_e1          <= opc_d;
      sd_e1         <= ctrl_d.is_st ? reg2_d : opa_d;   // ST data is src2, STK data is src1
    end
  end

  // ---------------- EXE1 / EXE2 : DSP unit ----------------
  logic e2_gt, e2_eq, e2_zero, br_taken;

  ippro_alu u_alu (
    .clk, .rst,
    .en        (!freeze),
    .kill      (redirect),
    .op        (ctrl_e1.alu_op),
    .acc_upd   (ctrl_e1.valid && ctrl_e1.acc_upd),
    .a         (a_e1),
    .b         (b_e1),
    .c         (c_e1),
    .e2_gt     (e2_gt),
    .e2_eq     (e2_eq),
    .e2_zero   (e2_zero),
    .e2_result (),
    .result    (w_result)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_e2 <= '0;
      sd_e2   <= '0;
    end else if (!freeze) begin
      ctrl_e2       <= ctrl_e1;
      ctrl_e2.valid <= ctrl_e1.valid && !redirect;
      sd_e2         <= sd_e1;
    end
  end

  ippro_branch_ctrl u_br (
    .clk, .rst,
    .en       (!freeze),
    .valid    (ctrl_e2.valid),
    .br       (ctrl_e2.br),
    .br_mask  (ctrl_e2.br_mask),
    .is_cmp   (ctrl_e2.is_cmp),
    .acc_upd  (ctrl_e2.acc_upd),
    .cmp_gt   (e2_gt),
    .cmp_eq   (e2_eq),
    .res_zero (e2_zero),
    .taken    (br_taken),
    .flags    (flags)
  );

  assign redirect = br_taken && !freeze;
  assign target   = ctrl_e2.imm[IAW-1:0];

  // ---------------- EXE2 / WRITE register ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_w <= '0;
      sd_w   <= '0;
    end else if (!freeze) begin
      ctrl_w <= ctrl_e2;
      sd_w   <= sd_e2;
    end
  end

  // ---------------- WRITE ----------------
  logic w_push;

  ippro_dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk,
    .a_addr  (w_result[DAW-1:0]),
    .a_we    (ctrl_w.valid && ctrl_w.is_st && !freeze),
    .a_wdata (sd_w),
    .a_rdata (dmem_rdata),
    .b_addr  (host.addr[DAW-1:0]),
    .b_we    (host.we && host.sel == HSEL_DMEM),
    .b_wdata (host.wdata[DATA_W-1:0]),
    .b_rdata (host_rdata)
  );

  assign w_data    = ctrl_w.is_ld ? dmem_rdata : w_result;
  assign w_push    = ctrl_w.valid && ctrl_w.rf_we && ctrl_w.dest == REG_OUT;
  assign freeze    = w_push && !out_ready;
  assign rf_we     = ctrl_w.valid && ctrl_w.rf_we && !freeze &&
                     ctrl_w.dest != REG_IN0 && ctrl_w.dest != REG_OUT;
  assign out_valid = w_push;
  assign out_data  = w_data;

  assign retire       = ctrl_w.valid && !freeze;
  assign stall_in     = d_stall && !freeze && !redirect;
  assign stall_out    = freeze;
  assign branch_taken = redirect;

  // d_pc is kept for debug visibility of the instruction in DECODE.
  logic unused_ok;
  assign unused_ok = ^{d_pc, host.wdata[INSTR_W-1:DATA_W], host.addr};

  // The output word stays offered, unchanged, until it is accepted.
  a_out_hold: assert property (@(posedge clk) disable iff (rst)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
