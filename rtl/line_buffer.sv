// line_buffer: sliding KxK window over a raster-scanned feature map.
//
// Pixels of a W x H map arrive one per valid cycle, row by row. K-1 row
// memories hold the previous rows; a KxK bank of shift registers (the shared
// window registers) is fed one column per pixel, so every valid pixel
// produces a new full window without re-reading the map. A window is
// emitted once K rows and K columns have been seen, and then only at the
// positions chosen by the stride S, so the output map is
// (W-K)/S+1 by (H-K)/S+1; padding, where used, is added upstream (pad_unit).
//
// Interface: in_valid/in_data is the pixel stream; win_valid/win is the
// window, win[0][0] the top-left (oldest) pixel and win[K-1][K-1] the pixel
// just received. Timing: the window appears one cycle after its last pixel.
// The raster counters return to (0,0) after W*H pixels, so frames follow one
// another with no gap needed. Row memories and window registers are not
// reset: a window is only flagged valid after K fresh rows have filled it.
// Line buffers and shared window registers follow the document's outline of
// an FPGA CNN; their sizes, stride handling and the absence of padding are
// this design's choices.
module line_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned W = 30,
  parameter int unsigned H = 30,
  parameter int unsigned K = 3,
  parameter int unsigned S = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t in_data,
  output logic  win_valid,
  output data_t win [K][K]
);

  localparam int unsigned CW = $clog2(W);
  localparam int unsigned RW = $clog2(H);

  data_t            rows [K-1][W];
  logic [CW-1:0]    col;
  logic [RW-1:0]    row;
  data_t            col_vec [K];
  logic             emit;

  // Column of K pixels ending at the new pixel: older rows first.
  always_comb begin
    for (int r = 0; r < K - 1; r++) col_vec[r] = rows[r][col];
    col_vec[K-1] = in_data;
  end

  always_comb begin
    emit = 1'b0;
    if (int'(row) >= K - 1 && int'(col) >= K - 1)
      emit = ((int'(row) - (K - 1)) % S == 0) && ((int'(col) - (K - 1)) % S == 0);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int r = 0; r < K - 2; r++) rows[r][col] <= rows[r+1][col];
      rows[K-2][col] <= in_data;
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) win[r][c] <= win[r][c+1];
        win[r][K-1] <= col_vec[r];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid && emit;
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
