// max_pool: 2x2 max pooling with stride 2 on a raster-scanned map.
//
// Values of a W x H map arrive one per valid cycle. On even rows the maximum
// of each horizontal pair is kept in a row buffer of W/2 entries; on odd rows
// the pair maximum is compared with the stored one and the maximum of the
// 2x2 block is emitted. An odd last column or row is dropped, giving a
// W/2 x H/2 output map.
//
// Interface: in_valid/in_data in, out_valid/out_data out.
// Timing: a result is registered one cycle after the last value of its block.
// Max pooling is the document's; the 2x2/stride-2 size is this design's choice.
module max_pool
  import cnn_pkg::*;
#(
  parameter int unsigned W = 28,
  parameter int unsigned H = 28
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t in_data,
  output logic  out_valid,
  output data_t out_data
);

  localparam int unsigned PW = W / 2;
  localparam int unsigned CW = $clog2(W);
  localparam int unsigned RW = $clog2(H);

  logic [CW-1:0] col;
  logic [RW-1:0] row;
  data_t         prev;
  data_t         rowbuf [PW];
  data_t         pair_max;
  data_t         blk_max;
  logic          in_block;

  assign pair_max = (in_data > prev) ? in_data : prev;
  assign blk_max  = (pair_max > rowbuf[col[CW-1:1]]) ? pair_max : rowbuf[col[CW-1:1]];
  assign in_block = col[0] && (int'(col) < 2 * PW) && (int'(row) < 2 * (H / 2));

  always_ff @(posedge clk) begin
    if (in_valid) begin
      prev <= in_data;
      if (in_block && !row[0]) rowbuf[col[CW-1:1]] <= pair_max;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && in_block && row[0];
      if (in_valid && in_block && row[0]) out_data <= blk_max;
      if (in_valid) begin
        if (int'(col) == W - 1) begin
          col <= '0;
          row <= (int'(row) == H - 1) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

endmodule
