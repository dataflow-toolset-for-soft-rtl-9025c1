// ippro_pkg: shared types and constants of the IPPro soft processor.
//
// IPPro is a small 16-bit RISC core with a 5-stage pipeline (FETCH, DECODE,
// EXE1, EXE2, WRITE) built around a DSP48E1-style multiply-add unit.  Its
// instruction set (operation names, the four operand modes R-R, R-K, R-I and
// Misc, and the GT/EQ/Z flags) follows the published IPPro description.  The
// binary format below is this design's own: the operation names are given,
// the encoding is not.
//
// Instruction word, 36 bits (one 512 x 36 block RAM holds a program):
//   [35:34] itype   R-R, R-K, R-I or Misc
//   [33:29] opcode  alu_op_e for R-R/R-K/R-I, misc_op_e for Misc, OP_STK in R-K
//   [28:24] dest    destination register
//   [23:19] src1    first source register
//   [18:14] src2    second source register (R-R, ST data) or kernel address (R-K)
//   [13:9]  src3    third source register of MULADD/MULSUB (R-R, R-K)
//   [15:0]  imm     16-bit immediate of R-I instructions
//   [13:0]  imm     14-bit sign-extended LD/ST offset or branch target (Misc)
// The immediate overlaps src2/src3; no instruction reads the same bits twice.
//
// Stream registers: as a source, R30 pops input stream 0 and R31 pops input
// stream 1; as a destination R31 pushes the output stream.  This is how a
// core talks to its FIFO channels without LD/ST.
package ippro_pkg;

  localparam int unsigned DATA_W  = 16;
  localparam int unsigned INSTR_W = 36;
  localparam int unsigned REG_AW  = 5;
  localparam int unsigned ACC_W   = 48;
  localparam int unsigned HOST_AW = 16;

  localparam logic [REG_AW-1:0] REG_IN0 = 5'd30;  // source: pop input stream 0
  localparam logic [REG_AW-1:0] REG_IN1 = 5'd31;  // source: pop input stream 1
  localparam logic [REG_AW-1:0] REG_OUT = 5'd31;  // destination: push output

  typedef enum logic [1:0] {
    IT_RR   = 2'd0,
    IT_RK   = 2'd1,
    IT_RI   = 2'd2,
    IT_MISC = 2'd3
  } itype_e;

  // ALU operations, shared by the R-R, R-K (suffix K) and R-I (suffix I) forms.
  typedef enum logic [4:0] {
    OP_ADD    = 5'd0,
    OP_SUB    = 5'd1,
    OP_MUL    = 5'd2,
    OP_MULADD = 5'd3,
    OP_MULSUB = 5'd4,
    OP_MULACC = 5'd5,
    OP_LXOR   = 5'd6,
    OP_LXNR   = 5'd7,
    OP_LOR    = 5'd8,
    OP_LNOR   = 5'd9,
    OP_LNAND  = 5'd10,
    OP_LAND   = 5'd11,
    OP_LSL    = 5'd12,
    OP_LSR    = 5'd13,
    OP_MIN    = 5'd14,
    OP_MAX    = 5'd15,
    OP_STK    = 5'd16   // R-K only: kernel[kaddr] = src1
  } alu_op_e;

  typedef enum logic [4:0] {
    MOP_NOP  = 5'd0,
    MOP_LD   = 5'd1,   // dest = dmem[src1 + imm]
    MOP_ST   = 5'd2,   // dmem[src1 + imm] = src2
    MOP_CMP  = 5'd3,   // flags from src1 - src2
    MOP_JMP  = 5'd4,   // pc = imm
    MOP_BZF  = 5'd5,   // pc = imm if Z
    MOP_BEQF = 5'd6,   // pc = imm if EQ
    MOP_BGTF = 5'd7,   // pc = imm if GT
    MOP_BSF  = 5'd8    // pc = imm if neither GT nor EQ (smaller)
  } misc_op_e;

  // Source of the ALU's second operand.
  typedef enum logic [1:0] {
    BSEL_REG  = 2'd0,
    BSEL_KMEM = 2'd1,
    BSEL_IMM  = 2'd2
  } bsel_e;

  typedef enum logic [1:0] {
    BR_NONE   = 2'd0,   // not a branch
    BR_ALWAYS = 2'd1,   // JMP
    BR_FLAGS  = 2'd2,   // taken if any flag selected by the GTF/EQF/ZF mask is set
    BR_LESS   = 2'd3    // BSF: taken if neither GT nor EQ
  } br_e;

  // Flag bits, in the order GT, EQ, Z.
  typedef struct packed {
    logic gt;
    logic eq;
    logic z;
  } flags_t;

  // Decoded control word, carried down the pipeline.
  typedef struct packed {
    logic              valid;
    alu_op_e           alu_op;
    bsel_e             bsel;
    logic              use_c;     // third operand read from src3
    logic              rf_we;     // result written to dest
    logic              acc_upd;   // result loads the DSP P register and the Z flag
    logic              is_cmp;
    logic              is_ld;
    logic              is_st;
    logic              is_stk;
    br_e               br;
    flags_t            br_mask;   // GTF, EQF, ZF
    logic              rd1, rd2, rd3;  // which register read ports are live
    logic [REG_AW-1:0] dest;
    logic [REG_AW-1:0] src1;
    logic [REG_AW-1:0] src2;
    logic [REG_AW-1:0] src3;
    logic [REG_AW-1:0] kaddr;
    logic [DATA_W-1:0] imm;
  } ctrl_t;

  // Host access port: program, kernel and data memory loading.
  typedef enum logic [1:0] {
    HSEL_IMEM = 2'd0,
    HSEL_KMEM = 2'd1,
    HSEL_DMEM = 2'd2
  } hsel_e;

  typedef struct packed {
    logic               we;
    hsel_e              sel;
    logic [HOST_AW-1:0] addr;
    logic [INSTR_W-1:0] wdata;
  } host_req_t;

  // Instruction assembly helpers (used by testbenches and program generators).
  function automatic logic [INSTR_W-1:0] enc_rr(alu_op_e op, int unsigned d, int unsigned s1,
                                                int unsigned s2, int unsigned s3 = 0);
    return {IT_RR, op, d[4:0], s1[4:0], s2[4:0], s3[4:0], 9'd0};
  endfunction

  function automatic logic [INSTR_W-1:0] enc_rk(alu_op_e op, int unsigned d, int unsigned s1,
                                                int unsigned k, int unsigned s3 = 0);
    return {IT_RK, op, d[4:0], s1[4:0], k[4:0], s3[4:0], 9'd0};
  endfunction

  function automatic logic [INSTR_W-1:0] enc_ri(alu_op_e op, int unsigned d, int unsigned s1,
                                                int imm);
    logic [15:0] i16;
    i16 = imm[15:0];
    return {IT_RI, op, d[4:0], s1[4:0], 3'd0, i16};
  endfunction

  // Misc: LD d,imm(s1); ST s2,imm(s1); CMP s1,s2; JMP/Bxx imm.
  function automatic logic [INSTR_W-1:0] enc_misc(misc_op_e op, int unsigned d, int unsigned s1,
                                                  int unsigned s2, int imm);
    logic [15:0] i16;
    i16 = imm[15:0];
    // src2 sits in [18:14]; a Misc immediate is limited to 14 bits [13:0] so both fit.
    return {IT_MISC, op, d[4:0], s1[4:0], s2[4:0], i16[13:0]};
  endfunction

endpackage
