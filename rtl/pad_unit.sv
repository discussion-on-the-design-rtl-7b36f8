// pad_unit: zero padding ("feature fill") around a raster-scanned map.
//
// Turns a W x H map into a (W+2P) x (H+2P) map with P rows/columns of zeros
// on every side, so that a following KxK convolution with stride S gives
// (W + 2P - K)/S + 1 outputs per row, the output-size rule of the design.
// A counter walks the padded frame: at a border position it emits a zero by
// itself, at an inner position it waits for and forwards one input value.
// Upstream is therefore stalled (in_ready low) while border zeros are sent;
// downstream has no back-pressure. With P = 0 the unit only frames the stream
// and in_ready stays high.
//
// Interface: in_valid/in_ready/in_data (a value moves when both are high),
// out_valid/out_data. Timing: combinational from input to output (no
// register), so a forwarded value leaves in the cycle it is accepted.
// The padded frame is restarted by reset; frames follow with no gap.
// Padding itself follows the document; the stall-based scheme is this
// design's choice.
module pad_unit
  import cnn_pkg::*;
#(
  parameter int unsigned W = 28,
  parameter int unsigned H = 28,
  parameter int unsigned P = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  data_t in_data,
  output logic  out_valid,
  output data_t out_data
);

  localparam int unsigned PW = W + 2 * P;
  localparam int unsigned PH = H + 2 * P;
  localparam int unsigned CW = $clog2(PW);
  localparam int unsigned RW = $clog2(PH);

  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic          border;

  assign border    = (int'(col) < P) || (int'(col) >= P + W) ||
                     (int'(row) < P) || (int'(row) >= P + H);
  assign in_ready  = !border;
  assign out_valid = border || in_valid;
  assign out_data  = border ? '0 : in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0;
      row <= '0;
    end else if (out_valid) begin
      if (int'(col) == PW - 1) begin
        col <= '0;
        row <= (int'(row) == PH - 1) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

endmodule
