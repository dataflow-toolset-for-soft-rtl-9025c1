// tb_ippro_branch_ctrl: self-checking test of the branch controller.
// Random flag updates (CMP and other ALU instructions) and random branch
// kinds; checks the flag register and the taken decision of JMP, BZF, BEQF,
// BGTF (one-hot masks) and BSF against a model.
`timescale 1ns/1ps
module tb_ippro_branch_ctrl;
  import ippro_pkg::*;
  logic clk = 0, rst = 1, en, valid, is_cmp, acc_upd, cmp_gt, cmp_eq, res_zero, taken;
  br_e br;
  flags_t br_mask, flags, fm;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not = 0;

  ippro_branch_ctrl dut (.*);
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
    logic exp_t;
    en = 0; valid = 0; is_cmp = 0; acc_upd = 0; cmp_gt = 0; cmp_eq = 0; res_zero = 0;
    br = BR_NONE; br_mask = '0;
    fm = '0;
    repeat (2) @(negedge clk); rst = 0;
    for (int t = 0; t < 5000; t++) begin
      automatic int kind = $urandom_range(0, 5);
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0); valid = ($urandom_range(0, 7) != 0);
      is_cmp = 0; acc_upd = 0; br = BR_NONE; br_mask = '0;
      cmp_gt = $urandom_range(0, 1); cmp_eq = !cmp_gt && $urandom_range(0, 1);
      res_zero = $urandom_range(0, 1);
      case (kind)
        0: is_cmp = 1;
        1: acc_upd = 1;
        2: br = BR_ALWAYS;
        3: begin
          br = BR_FLAGS;
          case ($urandom_range(0, 2))
            0: br_mask = '{gt: 1'b0, eq: 1'b0, z: 1'b1};
            1: br_mask = '{gt: 1'b0, eq: 1'b1, z: 1'b0};
            default: br_mask = '{gt: 1'b1, eq: 1'b0, z: 1'b0};
          endcase
        end
        4: br = BR_LESS;
        default: ;
      endcase
      #1;
      check("flags", flags, fm);
      case (br)
        BR_ALWAYS: exp_t = 1;
        BR_FLAGS:  exp_t = (br_mask.gt && fm.gt) || (br_mask.eq && fm.eq) || (br_mask.z && fm.z);
        BR_LESS:   exp_t = !fm.gt && !fm.eq;
        default:   exp_t = 0;
      endcase
      exp_t = exp_t && valid;
      check("taken", taken, exp_t);
      if (br == BR_FLAGS || br == BR_LESS) begin
        if (exp_t) n_taken++; else if (valid) n_not++;
      end
      @(posedge clk);
      if (en && valid) begin
        if (is_cmp) fm = '{gt: cmp_gt, eq: cmp_eq, z: cmp_eq};
        else if (acc_upd) fm.z = res_zero;
      end
    end
    check("conditional branches taken and not taken", (n_taken > 0) && (n_not > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
