// ippro_fetch: program counter and branch handler of the IPPro FETCH stage.
//
// The PC addresses the instruction memory, whose synchronous read register is
// the FETCH/DECODE pipeline register.  Each cycle in which the front end is
// not held and run is high, the word at PC is read and PC advances by one;
// d_valid then marks the word arriving in DECODE as live.  A taken branch
// (redirect, from the branch controller in EXE2) loads PC with the target
// and marks the word in DECODE dead; a redirect wins over hold.  While hold
// is high (DECODE waiting for a stream word, or the pipeline frozen) PC, the
// memory read register and d_valid keep their values.  Reset puts PC at 0.
// PC, the +1 adder and the branch address path follow the published
// figure; the priorities are this design's choices.
module ippro_fetch #(
  parameter int unsigned IMEM_DEPTH = 512,
  localparam int unsigned AW        = $clog2(IMEM_DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          run,
  input  logic          hold,
  input  logic          redirect,
  input  logic [AW-1:0] target,
  output logic [AW-1:0] pc,
  output logic          imem_rd_en,
  output logic          d_valid,
  output logic [AW-1:0] d_pc
);

  assign imem_rd_en = run && !hold && !redirect;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc      <= '0;
      d_valid <= 1'b0;
      d_pc    <= '0;
    end else if (redirect) begin
      pc      <= target;
      d_valid <= 1'b0;
    end else if (!hold) begin
      d_valid <= run;
      if (run) begin
        d_pc <= pc;
        pc   <= pc + 1'b1;
      end
    end
  end

endmodule
