// ippro_alu: DSP48E1-style two-stage arithmetic unit of IPPro (EXE1, EXE2).
//
// EXE1 multiplies the operands (a * b, signed 16 x 16) into the M register
// and registers the operands beside it.  EXE2 computes the operation on M,
// the operands and the third operand c, and loads the result into the
// output register (the EXE2/WRITE pipeline register).  Operations:
//   ADD a+b   SUB a-b   MUL a*b   MULADD a*b+c   MULSUB a*b-c
//   MULACC P+a*b  (P is the 48-bit result of the last operation with acc_upd)
//   LXOR LXNR LOR LNOR LNAND LAND  bitwise   LSL/LSR a shifted by b[3:0]
//   MIN/MAX signed
// Results are truncated to DATA_W bits.  In EXE2 the unit also outputs the
// compare flags of a - b (gt, eq) and a zero flag of the result, for the
// branch controller.  Both stages advance only when en is high; kill
// cancels the instruction moving from EXE1 to EXE2 (a taken branch), so it
// cannot disturb P.
// The multiply-then-add arrangement follows the published datapath figure;
// the exact semantics of MULSUB and MULACC, the accumulator width and the
// signedness are this design's choices.
module ippro_alu
  import ippro_pkg::*;
#(
  parameter int unsigned DW = ippro_pkg::DATA_W,
  parameter int unsigned AW = ippro_pkg::ACC_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic          kill,
  // EXE1 inputs
  input  alu_op_e       op,
  input  logic          acc_upd,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic [DW-1:0] c,
  // EXE2 combinational outputs
  output logic          e2_gt,
  output logic          e2_eq,
  output logic          e2_zero,
  output logic [DW-1:0] e2_result,
  // registered result (WRITE stage)
  output logic [DW-1:0] result
);

  // EXE1 / EXE2 register
  alu_op_e              op_q;
  logic                 upd_q;
  logic signed [DW-1:0] a_q, b_q, c_q;
  logic signed [2*DW-1:0] m_q;
  logic signed [AW-1:0] p_q;
  logic signed [AW-1:0] p_next;

  always_ff @(posedge clk) begin
    if (rst) begin
      op_q  <= OP_ADD;
      upd_q <= 1'b0;
      a_q   <= '0;
      b_q   <= '0;
      c_q   <= '0;
      m_q   <= '0;
    end else if (en) begin
      op_q  <= op;
      upd_q <= acc_upd && !kill;
      a_q   <= a;
      b_q   <= b;
      c_q   <= c;
      m_q   <= $signed(a) * $signed(b);
    end
  end

  // EXE2 arithmetic
  logic [DW-1:0] nor_ab, nand_ab;
  assign nor_ab  = ~(a_q | b_q);
  assign nand_ab = ~(a_q & b_q);

  always_comb begin
    p_next = '0;
    unique case (op_q)
      OP_ADD:    p_next = AW'(a_q) + AW'(b_q);
      OP_SUB:    p_next = AW'(a_q) - AW'(b_q);
      OP_MUL:    p_next = AW'(m_q);
      OP_MULADD: p_next = AW'(m_q) + AW'(c_q);
      OP_MULSUB: p_next = AW'(m_q) - AW'(c_q);
      OP_MULACC: p_next = p_q + AW'(m_q);
      OP_LXOR:   p_next = AW'(signed'(a_q ^ b_q));
      OP_LXNR:   p_next = AW'(signed'(a_q ~^ b_q));
      OP_LOR:    p_next = AW'(signed'(a_q | b_q));
      OP_LNOR:   p_next = AW'(signed'(nor_ab));
      OP_LNAND:  p_next = AW'(signed'(nand_ab));
      OP_LAND:   p_next = AW'(signed'(a_q & b_q));
      OP_LSL:    p_next = AW'(signed'(a_q << b_q[3:0]));
      OP_LSR:    p_next = AW'(signed'(unsigned'(a_q) >> b_q[3:0]));
      OP_MIN:    p_next = AW'((a_q < b_q) ? a_q : b_q);
      OP_MAX:    p_next = AW'((a_q > b_q) ? a_q : b_q);
      default:   p_next = AW'(a_q) + AW'(b_q);
    endcase
  end

  assign e2_result = p_next[DW-1:0];
  assign e2_gt     = a_q > b_q;
  assign e2_eq     = a_q == b_q;
  assign e2_zero   = (e2_result == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      p_q    <= '0;
      result <= '0;
    end else if (en) begin
      result <= e2_result;
      if (upd_q) p_q <= p_next;
    end
  end

endmodule
