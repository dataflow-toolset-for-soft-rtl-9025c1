// ippro_dmem: data memory of one IPPro core.
//
// The main input/output store of a core: LD and ST reach it in the WRITE
// stage.  DEPTH words of DATA_W bits.  Port A (core) has an asynchronous read,
// so an LD reads and writes the register file in the same WRITE cycle, and a
// synchronous write for ST.  Port B (host) writes synchronously and reads
// with one clock of latency.  A host write wins over a core write in the same
// cycle.  Contents are not reset.
// Placement in the WRITE stage follows the published pipeline figure; the
// size and the host port are this design's choices.
module ippro_dmem #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned DATA_W = ippro_pkg::DATA_W,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  // core port
  input  logic [AW-1:0]     a_addr,
  input  logic              a_we,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // host port
  input  logic [AW-1:0]     b_addr,
  input  logic              b_we,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (b_we)      mem[b_addr] <= b_wdata;
    else if (a_we) mem[a_addr] <= a_wdata;
    b_rdata <= mem[b_addr];
  end

  assign a_rdata = mem[a_addr];

endmodule
