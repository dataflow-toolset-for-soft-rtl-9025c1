// ippro_regfile: general-purpose register file of one IPPro core.
//
// DEPTH registers of DATA_W bits in distributed (LUT) memory.  Three
// asynchronous read ports serve the SRC1, SRC2 and SRC3 operands in the
// DECODE stage; one synchronous write port is driven by the WRITE stage.
// Reads are write-through: a read of the register being written in the same
// cycle returns the new value, so an instruction sees a result written three
// instructions before it.  All registers clear to zero on reset.
// Three read ports and write-through are this design's choices.
module ippro_regfile #(
  parameter int unsigned DEPTH  = 32,
  parameter int unsigned DATA_W = ippro_pkg::DATA_W,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr1,
  input  logic [AW-1:0]     raddr2,
  input  logic [AW-1:0]     raddr3,
  output logic [DATA_W-1:0] rdata1,
  output logic [DATA_W-1:0] rdata2,
  output logic [DATA_W-1:0] rdata3
);

  logic [DATA_W-1:0] regs [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) regs[i] <= '0;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    rdata1 = (we && waddr == raddr1) ? wdata : regs[raddr1];
    rdata2 = (we && waddr == raddr2) ? wdata : regs[raddr2];
    rdata3 = (we && waddr == raddr3) ? wdata : regs[raddr3];
  end

endmodule
