// ippro_decode: instruction decoder of the IPPro DECODE stage.
//
// Purely combinational.  Splits a 36-bit instruction word into the fields
// TYPE, OPCODE, DEST, SRC1, SRC2, SRC3 and IMM and produces the control word
// (ippro_pkg::ctrl_t) that travels down the pipeline with the instruction.
// The four operand modes are those of the IPPro instruction set:
//   R-R   dest = src1 op src2      (MULADD/MULSUB also read src3)
//   R-K   dest = src1 op K[kaddr]  (MULADDK/MULSUBK also read src3; STK stores src1)
//   R-I   dest = src1 op imm16     (the third operand of a trinary op is zero)
//   Misc  LD, ST, CMP, JMP, BZF, BEQF, BGTF, BSF, NOP
// The field layout and opcode numbers are this design's own (see ippro_pkg).
// An undefined opcode decodes as a NOP.
module ippro_decode
  import ippro_pkg::*;
(
  input  logic               valid,
  input  logic [INSTR_W-1:0] instr,
  output ctrl_t              ctrl
);

  itype_e     itype;
  logic [4:0] opc;
  logic       trinary;

  assign itype   = itype_e'(instr[35:34]);
  assign opc     = instr[33:29];
  assign trinary = (opc == OP_MULADD) || (opc == OP_MULSUB);

  always_comb begin
    ctrl         = '0;
    ctrl.alu_op  = OP_ADD;
    ctrl.bsel    = BSEL_REG;
    ctrl.br      = BR_NONE;
    ctrl.dest    = instr[28:24];
    ctrl.src1    = instr[23:19];
    ctrl.src2    = instr[18:14];
    ctrl.src3    = instr[13:9];
    ctrl.kaddr   = instr[18:14];
    ctrl.imm     = (itype == IT_RI) ? instr[15:0]
                                    : {{(DATA_W-14){instr[13]}}, instr[13:0]};
    unique case (itype)
      IT_RR, IT_RK, IT_RI: begin
        if (opc <= OP_MAX) begin
          ctrl.alu_op  = alu_op_e'(opc);
          ctrl.bsel    = (itype == IT_RR) ? BSEL_REG : (itype == IT_RK) ? BSEL_KMEM : BSEL_IMM;
          ctrl.use_c   = trinary && (itype != IT_RI);
          ctrl.rf_we   = 1'b1;
          ctrl.acc_upd = 1'b1;
          ctrl.rd1     = 1'b1;
          ctrl.rd2     = (itype == IT_RR);
          ctrl.rd3     = ctrl.use_c;
          ctrl.valid   = valid;
        end else if (opc == OP_STK && itype == IT_RK) begin
          ctrl.is_stk  = 1'b1;
          ctrl.rd1     = 1'b1;
          ctrl.valid   = valid;
        end
      end
      IT_MISC: begin
        ctrl.bsel  = BSEL_IMM;
        ctrl.valid = valid;
        unique case (opc)
          MOP_LD:   begin ctrl.is_ld = 1'b1; ctrl.rf_we = 1'b1; ctrl.rd1 = 1'b1; end
          MOP_ST:   begin ctrl.is_st = 1'b1; ctrl.rd1 = 1'b1; ctrl.rd2 = 1'b1; end
          MOP_CMP:  begin ctrl.is_cmp = 1'b1; ctrl.alu_op = OP_SUB; ctrl.bsel = BSEL_REG;
                          ctrl.rd1 = 1'b1; ctrl.rd2 = 1'b1; end
          MOP_JMP:  ctrl.br = BR_ALWAYS;
          MOP_BZF:  begin ctrl.br = BR_FLAGS; ctrl.br_mask = '{gt: 1'b0, eq: 1'b0, z: 1'b1}; end
          MOP_BEQF: begin ctrl.br = BR_FLAGS; ctrl.br_mask = '{gt: 1'b0, eq: 1'b1, z: 1'b0}; end
          MOP_BGTF: begin ctrl.br = BR_FLAGS; ctrl.br_mask = '{gt: 1'b1, eq: 1'b0, z: 1'b0}; end
          MOP_BSF:  ctrl.br = BR_LESS;
          default:  ctrl.valid = valid;   // NOP and undefined: flows through, does nothing
        endcase
      end
      default: ;
    endcase
  end

endmodule
