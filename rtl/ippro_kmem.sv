// ippro_kmem: kernel (coefficient) memory of one IPPro core.
//
// Holds the coefficients of window and filter operations.  DEPTH words of
// DATA_W bits in distributed memory with one asynchronous read port (the
// second operand of R-K instructions, read in DECODE) and one synchronous
// write port shared by the STK instruction (WRITE stage) and the host loader;
// the host has priority.  A read of the word STK is writing returns the new
// value (write-through).  Contents are not reset.
// The size and the port arrangement are this design's choices.
module ippro_kmem #(
  parameter int unsigned DEPTH  = 32,
  parameter int unsigned DATA_W = ippro_pkg::DATA_W,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  // core write (STK)
  input  logic              core_we,
  input  logic [AW-1:0]     core_waddr,
  input  logic [DATA_W-1:0] core_wdata,
  // host write
  input  logic              host_we,
  input  logic [AW-1:0]     host_waddr,
  input  logic [DATA_W-1:0] host_wdata,
  // operand read
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we)      mem[host_waddr] <= host_wdata;
    else if (core_we) mem[core_waddr] <= core_wdata;
  end

  // Write-through for STK, like the register file, so the same three-slot
  // rule holds for coefficients written by the program.
  assign rdata = (core_we && !host_we && core_waddr == raddr) ? core_wdata : mem[raddr];

endmodule
