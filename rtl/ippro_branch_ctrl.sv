// ippro_branch_ctrl: branch controller of the IPPro EXE2 stage.
//
// Keeps the three condition flags GT, EQ and Z and decides, for the
// instruction in EXE2, whether the branch is taken.  A conditional branch
// (BZF, BEQF, BGTF) carries a flag mask GTF/EQF/ZF; it is taken when a flag
// selected by the mask is set.  JMP is always taken; BSF ("smaller") is taken
// when neither GT nor EQ is set.  CMP loads GT, EQ and Z from its compare;
// every other ALU instruction loads Z from its result and leaves GT and EQ.
// Flags are written at the end of EXE2, so a branch right after a CMP sees
// its result.  Reset clears the flags.
// The flag names and mask follow the published pipeline figure; the rule of
// which instruction sets which flag, and the reading of BSF, are this
// design's choices.
module ippro_branch_ctrl
  import ippro_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   en,        // EXE2 instruction advances this cycle
  input  logic   valid,     // EXE2 holds a live instruction
  input  br_e    br,
  input  flags_t br_mask,
  input  logic   is_cmp,
  input  logic   acc_upd,
  input  logic   cmp_gt,
  input  logic   cmp_eq,
  input  logic   res_zero,
  output logic   taken,
  output flags_t flags
);

  always_comb begin
    unique case (br)
      BR_ALWAYS: taken = 1'b1;
      BR_FLAGS:  taken = |(br_mask & flags);
      BR_LESS:   taken = !flags.gt && !flags.eq;
      default:   taken = 1'b0;
    endcase
    taken = taken && valid;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      flags <= '0;
    end else if (en && valid) begin
      if (is_cmp)       flags <= '{gt: cmp_gt, eq: cmp_eq, z: cmp_eq};
      else if (acc_upd) flags.z <= res_zero;
    end
  end

endmodule
