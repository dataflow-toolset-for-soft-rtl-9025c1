// ippro_fifo: FIFO channel between IPPro cores.
//
// Dataflow actors mapped onto cores talk through first-in first-out
// channels.  This is a synchronous FIFO of DEPTH words of DATA_W bits with a
// valid/ready handshake on both sides: a word is written when in_valid and
// in_ready are both high, and read when out_valid and out_ready are both
// high.  out_data shows the oldest word combinationally (first-word
// fall-through), so a word written in one cycle can be read in the next.
// Simultaneous read and write are allowed when full.  Reset empties it.
// The abstract dataflow model assumes unbounded channels; the finite depth
// and the back-pressure are this design's choices.
module ippro_fifo #(
  parameter int unsigned DEPTH  = 16,
  parameter int unsigned DATA_W = ippro_pkg::DATA_W,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic [AW:0]       count
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     wr_ptr, rd_ptr;
  logic              push, pop;

  assign out_valid = (count != '0);
  assign in_ready  = (count != (AW+1)'(DEPTH)) || out_ready;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (pop)  rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // A word offered by the producer stays offered, unchanged, until taken.
  a_in_hold: assert property (@(posedge clk) disable iff (rst)
    in_valid && !in_ready |=> in_valid && $stable(in_data));
  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    count <= (AW+1)'(DEPTH));

endmodule
