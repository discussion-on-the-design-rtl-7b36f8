// stream_fifo: small first-in first-out buffer for a valid/ready stream.
//
// Decouples the bursty output of one layer from the padding stage of the
// next. DEPTH entries held in a register array with read and write pointers
// and an occupancy count; the head is shown combinationally. The write side
// has no ready: the producer must never find it full, and an assertion
// reports it if it does (in cnn_top the consumer drains at least one value
// per cycle while the producer makes at most one every two cycles).
//
// Interface: in_valid/in_data push; out_valid/out_ready/out_data pop.
// Timing: a pushed value can be popped from the next cycle on.
// This buffer is this design's own addition.
module stream_fifo
  import cnn_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output data_t out_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  data_t         mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;
  logic          push, pop;

  assign out_valid = (count != '0);
  assign out_data  = mem[rp];
  assign pop       = out_valid && out_ready;
  assign push      = in_valid;

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= (int'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      if (pop)  rp <= (int'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (int'(count) < DEPTH || pop))
    else $error("stream_fifo overflow");

endmodule
