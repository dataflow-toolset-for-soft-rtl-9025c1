// ippro_fir_array: seven IPPro cores in streaming mode, wired as a FIR filter.
//
// The streaming FIR arrangement has three stages of cores joined by FIFO
// channels: four multiplier cores, two adder cores and one final adder core.
// Each input sample is broadcast to the four multiplier cores (it is taken
// only when all four input FIFOs have room).  Core k of the first stage holds
// tap coefficient c_k in its kernel memory, keeps its own delay line of past
// samples in registers and emits c_k * x[n-k].  The two adder cores each add
// a pair of products and the final core adds the two partial sums, giving
//   y[n] = c0 x[n] + c1 x[n-1] + c2 x[n-2] + c3 x[n-3]
// A 3-tap filter sets c3 = 0.  What each core computes is set by its program;
// the wiring only fixes who talks to whom:
//   core 0..3 : in0 <- input FIFO k            out -> FIFO to core 4 + k/2, port k%2
//   core 4, 5 : in0, in1 <- first-stage FIFOs  out -> FIFO to core 6, port (k-4)
//   core 6    : in0, in1 <- second-stage FIFOs out -> out_* of this module
// Every channel is an ippro_fifo of FIFO_DEPTH words; a full FIFO stalls its
// producer, an empty one stalls its consumer.
//
// Loading: while run is low the host writes instruction, kernel and data
// memory of core host_core through host (ippro_pkg::host_req_t); host_rdata
// returns the data memory word of that core one clock after its address.
//
// Seven cores in a 4-2-1 arrangement with FIFOs between the stages follow
// the published streaming FIR example; the padding to four taps, the
// broadcast of the input and the per-channel FIFOs are this design's reading.
module ippro_fir_array
  import ippro_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned IMEM_DEPTH = 512,
  parameter int unsigned DMEM_DEPTH = 256,
  localparam int unsigned N_MUL     = 4,
  localparam int unsigned N_CORES   = 7
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              run,
  // host access
  input  host_req_t         host,
  input  logic [2:0]        host_core,
  output logic [DATA_W-1:0] host_rdata,
  // sample stream in
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  // filtered stream out
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  // per-core status
  output logic [N_CORES-1:0] retire,
  output logic [N_CORES-1:0] stall_in,
  output logic [N_CORES-1:0] stall_out,
  output logic [N_CORES-1:0] branch_taken
);

  // Core-side stream signals
  logic              c_in0_valid [N_CORES];
  logic              c_in0_ready [N_CORES];
  logic [DATA_W-1:0] c_in0_data  [N_CORES];
  logic              c_in1_valid [N_CORES];
  logic              c_in1_ready [N_CORES];
  logic [DATA_W-1:0] c_in1_data  [N_CORES];
  logic              c_out_valid [N_CORES];
  logic              c_out_ready [N_CORES];
  logic [DATA_W-1:0] c_out_data  [N_CORES];
  logic [DATA_W-1:0] c_host_rdata[N_CORES];

  // ---------------- input broadcast ----------------
  logic [N_MUL-1:0] inq_ready;
  assign in_ready = &inq_ready;

  for (genvar k = 0; k < N_MUL; k++) begin : g_inq
    ippro_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst,
      .in_valid  (in_valid && in_ready),
      .in_ready  (inq_ready[k]),
      .in_data   (in_data),
      .out_valid (c_in0_valid[k]),
      .out_ready (c_in0_ready[k]),
      .out_data  (c_in0_data[k]),
      .count     ()
    );
    assign c_in1_valid[k] = 1'b0;
    assign c_in1_data[k]  = '0;
  end

  // ---------------- channels between stages ----------------
  // Channel j carries core j's output to core 4 + j/2 (j < 4) or to core 6.
  for (genvar j = 0; j < N_CORES - 1; j++) begin : g_ch
    localparam int unsigned DST  = (j < 4) ? 4 + j / 2 : 6;
    localparam int unsigned PORT = (j < 4) ? j % 2 : j - 4;
    logic              v, r;
    logic [DATA_W-1:0] d;

    ippro_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst,
      .in_valid  (c_out_valid[j]),
      .in_ready  (c_out_ready[j]),
      .in_data   (c_out_data[j]),
      .out_valid (v),
      .out_ready (r),
      .out_data  (d),
      .count     ()
    );

    if (PORT == 0) begin : g_p0
      assign c_in0_valid[DST] = v;
      assign c_in0_data[DST]  = d;
      assign r                = c_in0_ready[DST];
    end else begin : g_p1
      assign c_in1_valid[DST] = v;
      assign c_in1_data[DST]  = d;
      assign r                = c_in1_ready[DST];
    end
  end

  assign out_valid                = c_out_valid[N_CORES-1];
  assign out_data                 = c_out_data[N_CORES-1];
  assign c_out_ready[N_CORES-1]   = out_ready;

  // ---------------- cores ----------------
  for (genvar i = 0; i < N_CORES; i++) begin : g_core
    host_req_t h;
    always_comb begin
      h    = host;
      h.we = host.we && (host_core == 3'(i));
    end

    ippro_core #(.IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH)) u_core (
      .clk, .rst, .run,
      .host         (h),
      .host_rdata   (c_host_rdata[i]),
      .in0_valid    (c_in0_valid[i]),
      .in0_ready    (c_in0_ready[i]),
      .in0_data     (c_in0_data[i]),
      .in1_valid    (c_in1_valid[i]),
      .in1_ready    (c_in1_ready[i]),
      .in1_data     (c_in1_data[i]),
      .out_valid    (c_out_valid[i]),
      .out_ready    (c_out_ready[i]),
      .out_data     (c_out_data[i]),
      .pc           (),
      .flags        (),
      .retire       (retire[i]),
      .stall_in     (stall_in[i]),
      .stall_out    (stall_out[i]),
      .branch_taken (branch_taken[i])
    );
  end

  // Host read-back, selected by the core index of the previous cycle.
  logic [2:0] rd_core_q;
  always_ff @(posedge clk) begin
    if (rst) rd_core_q <= '0;
    else     rd_core_q <= host_core;
  end
  assign host_rdata = (rd_core_q < 3'(N_CORES)) ? c_host_rdata[rd_core_q] : '0;

endmodule
