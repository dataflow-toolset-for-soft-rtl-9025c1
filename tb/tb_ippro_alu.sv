// tb_ippro_alu: self-checking test of the two-stage DSP arithmetic unit.
// Random operations with random operands, random stalls (en low) and
// cancellations (kill); each cycle the EXE2 outputs (result, compare flags,
// zero) and the registered result are compared with a model that tracks
// the accumulator P used by MULACC.
`timescale 1ns/1ps
module tb_ippro_alu;
  import ippro_pkg::*;
  logic clk = 0, rst = 1, en, kill, acc_upd;
  alu_op_e op;
  logic [15:0] a, b, c, e2_result, result;
  logic e2_gt, e2_eq, e2_zero;
  int checks = 0, failures = 0;
  longint p_model = 0;

  ippro_alu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  function automatic longint sx(logic [15:0] v); return longint'($signed(v)); endfunction

  function automatic longint model(alu_op_e o, logic [15:0] x, logic [15:0] y, logic [15:0] z);
    logic [15:0] t;
    case (o)
      OP_ADD:    return sx(x) + sx(y);
      OP_SUB:    return sx(x) - sx(y);
      OP_MUL:    return sx(x) * sx(y);
      OP_MULADD: return sx(x) * sx(y) + sx(z);
      OP_MULSUB: return sx(x) * sx(y) - sx(z);
      OP_MULACC: return p_model + sx(x) * sx(y);
      OP_LXOR:   begin t = x ^ y;     return sx(t); end
      OP_LXNR:   begin t = x ~^ y;    return sx(t); end
      OP_LOR:    begin t = x | y;     return sx(t); end
      OP_LNOR:   begin t = ~(x | y);  return sx(t); end
      OP_LNAND:  begin t = ~(x & y);  return sx(t); end
      OP_LAND:   begin t = x & y;     return sx(t); end
      OP_LSL:    begin t = x << y[3:0]; return sx(t); end
      OP_LSR:    begin t = x >> y[3:0]; return sx(t); end
      OP_MIN:    return (sx(x) < sx(y)) ? sx(x) : sx(y);
      default:   return (sx(x) > sx(y)) ? sx(x) : sx(y);
    endcase
  endfunction

  typedef struct { alu_op_e op; logic [15:0] a, b, c; logic upd; } iss_t;
  iss_t s1;
  logic [15:0] res_model;

  initial begin
    en = 1; kill = 0; acc_upd = 0; op = OP_ADD; a = 0; b = 0; c = 0;
    s1 = '{OP_ADD, 0, 0, 0, 0};
    res_model = 0;
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 6000; t++) begin
      longint r;
      @(negedge clk);
      en = ($urandom_range(0, 9) != 0);
      kill = ($urandom_range(0, 9) == 0);
      op = alu_op_e'($urandom_range(0, 15));
      a = (t % 7 == 0) ? 16'($urandom_range(0, 3)) : 16'($urandom);
      b = (t % 7 == 0) ? a : (t % 3 == 0) ? 16'($urandom_range(0, 20)) : 16'($urandom);
      c = 16'($urandom);
      acc_upd = ($urandom_range(0, 3) != 0);
      #1;
      // stage 2 holds s1; the result register holds the previous result
      r = model(s1.op, s1.a, s1.b, s1.c);
      check("e2_result", e2_result, r & 16'hFFFF);
      check("e2_gt", e2_gt, sx(s1.a) > sx(s1.b));
      check("e2_eq", e2_eq, s1.a == s1.b);
      check("e2_zero", e2_zero, (r & 16'hFFFF) == 0);
      check("result", result, res_model);
      @(posedge clk);
      if (en) begin
        res_model = 16'(r);
        if (s1.upd) p_model = r;
        s1 = '{op, a, b, c, acc_upd && !kill};
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
