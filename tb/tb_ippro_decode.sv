// tb_ippro_decode: self-checking test of the instruction decoder.
// Random instructions of every form are assembled with the ippro_pkg
// encoders and the control word is compared field by field with the
// expected decoding written out here.
`timescale 1ns/1ps
module tb_ippro_decode;
  import ippro_pkg::*;
  logic valid;
  logic [INSTR_W-1:0] instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  ippro_decode dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      automatic int d = $urandom_range(0, 31), s1 = $urandom_range(0, 31), s2 = $urandom_range(0, 31);
      automatic int s3 = $urandom_range(0, 31), o = $urandom_range(0, 15);
      automatic int imm = $urandom_range(0, 65535), imm14 = $urandom_range(0, 16383);
      automatic int form = $urandom_range(0, 4);
      automatic logic tri_op = (o == 3) || (o == 4);
      valid = $urandom_range(0, 3) != 0;
      case (form)
        0: begin
          instr = enc_rr(alu_op_e'(o), d, s1, s2, s3); #1;
          check("rr valid", ctrl.valid, valid);
          check("rr op", ctrl.alu_op, o);
          check("rr bsel", ctrl.bsel, BSEL_REG);
          check("rr dest", ctrl.dest, d);
          check("rr src1", ctrl.src1, s1);
          check("rr src2", ctrl.src2, s2);
          check("rr src3", ctrl.src3, s3);
          check("rr rf_we", ctrl.rf_we, 1);
          check("rr use_c", ctrl.use_c, tri_op);
          check("rr rd2", ctrl.rd2, 1);
          check("rr br", ctrl.br, BR_NONE);
        end
        1: begin
          instr = enc_rk(alu_op_e'(o), d, s1, s2, s3); #1;
          check("rk op", ctrl.alu_op, o);
          check("rk bsel", ctrl.bsel, BSEL_KMEM);
          check("rk kaddr", ctrl.kaddr, s2);
          check("rk rd2", ctrl.rd2, 0);
          check("rk use_c", ctrl.use_c, tri_op);
          check("rk rf_we", ctrl.rf_we, 1);
        end
        2: begin
          instr = enc_ri(alu_op_e'(o), d, s1, imm); #1;
          check("ri op", ctrl.alu_op, o);
          check("ri bsel", ctrl.bsel, BSEL_IMM);
          check("ri imm", ctrl.imm, imm);
          check("ri dest", ctrl.dest, d);
          check("ri use_c", ctrl.use_c, 0);
        end
        3: begin
          instr = enc_rk(OP_STK, d, s1, s2); #1;
          check("stk", ctrl.is_stk, 1);
          check("stk rf_we", ctrl.rf_we, 0);
          check("stk kaddr", ctrl.kaddr, s2);
          check("stk valid", ctrl.valid, valid);
        end
        default: begin
          automatic int m = $urandom_range(0, 8);
          instr = enc_misc(misc_op_e'(m), d, s1, s2, imm14); #1;
          check("misc valid", ctrl.valid, valid);
          check("misc imm (sign-extended 14 bit)", ctrl.imm,
                (imm14 >= 8192) ? (imm14 + 16'hC000) & 16'hFFFF : imm14);
          check("misc ld", ctrl.is_ld, m == 1);
          check("misc st", ctrl.is_st, m == 2);
          check("misc cmp", ctrl.is_cmp, m == 3);
          check("misc rf_we", ctrl.rf_we, m == 1);
          check("misc br", ctrl.br, m == 4 ? BR_ALWAYS : (m >= 5 && m <= 7) ? BR_FLAGS :
                                    m == 8 ? BR_LESS : BR_NONE);
          check("misc mask", ctrl.br_mask, m == 5 ? 3'b001 : m == 6 ? 3'b010 :
                                          m == 7 ? 3'b100 : 3'b000);
          check("misc rd2", ctrl.rd2, (m == 2) || (m == 3));
          if (m == 3) check("cmp op", ctrl.alu_op, OP_SUB);
        end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
