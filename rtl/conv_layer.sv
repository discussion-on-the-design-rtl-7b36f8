// conv_layer: one convolutional layer of the classifier.
//
// A feature-extraction stage: zero padding, line buffer and window
// registers, the parallel KxK convolution unit, the ReLU activation and 2x2
// max pooling, in that order, on a W x H single-channel map streamed one
// value per cycle. The padding stage stalls the input (in_ready low) while it
// inserts border zeros, so a padded frame takes (W+2P)*(H+2P) cycles.
// The KxK kernel coefficients sit in a small register file loaded through
// coef_we/coef_addr/coef_wdata (addr = row*K + col, Q8.8); they must be
// loaded before the frame that uses them.
//
// Output: the pooled map, pool_out_dim(conv_out_dim(W,P,K,S)) on each side,
// as out_valid/out_data. clip_evt and sat_evt pulse when the activation
// clipped a negative or saturated a positive value. Timing: a pooled value
// leaves four cycles after the last (padded) pixel of its window block (line
// buffer, conv, ReLU, pool registers). The layer chain is the document's; one kernel
// per layer, the sizes and the load port are this design's choices.
module conv_layer
  import cnn_pkg::*;
#(
  parameter int unsigned W = 28,
  parameter int unsigned H = 28,
  parameter int unsigned K = 3,
  parameter int unsigned S = 1,
  parameter int unsigned P = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     coef_we,
  input  logic [$clog2(K*K)-1:0]   coef_addr,
  input  coef_t                    coef_wdata,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  data_t                    in_data,
  output logic                     out_valid,
  output data_t                    out_data,
  output logic                     clip_evt,
  output logic                     sat_evt
);

  localparam int unsigned CW_OUT = conv_out_dim(W, P, K, S);
  localparam int unsigned CH_OUT = conv_out_dim(H, P, K, S);

  coef_t coef [K][K];
  logic  pad_valid;
  data_t pad_data;
  logic  win_valid;
  data_t win [K][K];
  logic  conv_valid;
  acc_t  conv_acc;
  logic  act_valid;
  data_t act_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++) coef[r][c] <= '0;
    end else if (coef_we) begin
      coef[int'(coef_addr) / K][int'(coef_addr) % K] <= coef_wdata;
    end
  end

  pad_unit #(.W(W), .H(H), .P(P)) u_pad (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(pad_valid), .out_data(pad_data)
  );

  line_buffer #(.W(W + 2 * P), .H(H + 2 * P), .K(K), .S(S)) u_lb (
    .clk, .rst_n, .in_valid(pad_valid), .in_data(pad_data), .win_valid, .win
  );

  conv_unit #(.K(K)) u_conv (
    .clk, .rst_n, .in_valid(win_valid), .win, .coef,
    .out_valid(conv_valid), .out_acc(conv_acc)
  );

  relu_unit u_relu (
    .clk, .rst_n, .in_valid(conv_valid), .in_acc(conv_acc),
    .out_valid(act_valid), .out_data(act_data),
    .clipped(clip_evt), .saturated(sat_evt)
  );

  max_pool #(.W(CW_OUT), .H(CH_OUT)) u_pool (
    .clk, .rst_n, .in_valid(act_valid), .in_data(act_data),
    .out_valid, .out_data
  );

endmodule
