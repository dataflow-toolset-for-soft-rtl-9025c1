// ippro_imem: instruction memory of one IPPro core.
//
// A single-port-read, single-port-write RAM of DEPTH words of INSTR_W bits,
// shaped to map onto one FPGA block RAM (512 x 36 by default).  The read is
// synchronous: when rd_en is high the word at rd_addr appears on rd_data one
// clock later, and rd_data holds its value while rd_en is low, so the output
// register doubles as the FETCH/DECODE pipeline register.  The host writes
// programs through the write port (one word per clock).
// The memory size and the synchronous read are this design's choices; the
// published core only states that one block RAM is used per processor.
module ippro_imem #(
  parameter int unsigned DEPTH   = 512,
  parameter int unsigned INSTR_W = ippro_pkg::INSTR_W,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  // host write port
  input  logic               wr_en,
  input  logic [AW-1:0]      wr_addr,
  input  logic [INSTR_W-1:0] wr_data,
  // fetch read port
  input  logic               rd_en,
  input  logic [AW-1:0]      rd_addr,
  output logic [INSTR_W-1:0] rd_data
);

  logic [INSTR_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  // Read register, cleared to an all-zero word (an R-R ADD R0,R0,R0 that the
  // pipeline never issues because its valid bit is low after reset).
  always_ff @(posedge clk) begin
    if (rst)        rd_data <= '0;
    else if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
