// cnn_top: streaming CNN image classifier with N_LAYERS convolutional layers.
//
// An IMG_W x IMG_H single-channel image enters one pixel per accepted cycle
// in raster order. Each convolutional layer zero-pads its input, slides a
// KxK window over it, convolves it with all K*K products in parallel,
// applies ReLU and 2x2 max pooling. A small FIFO between layers absorbs the
// bursts of the pooled stream while the next layer's padding stage inserts
// border zeros. The N_F values of the last pooled map feed N_CLASSES fully
// connected neurons in parallel, each a sum of products plus bias; the
// arg-max of their scores is the class, and a SoftMax unit turns the scores
// into probabilities. Alongside, the variance of each layer's pooled feature
// map is computed on a shared arithmetic unit per layer.
//
// At the defaults (two layers, 3x3 kernels, stride 1, padding 1):
// 28x28 -> pad 30x30 -> conv 28x28 -> pool 14x14 -> pad 16x16 -> conv 14x14
// -> pool 7x7 = 49 features -> 10 scores -> class and probabilities.
//
// Loading (before the frame that uses it):
//   coef_we/coef_layer/coef_addr/coef_wdata  kernel of layer coef_layer,
//                                            addr = row*K + col, Q8.8
//   fcw_we/fcw_class/fcw_addr/fcw_data       weight i of class c, Q8.8
//   fcb_we/fcb_class/fcb_data                bias of class c, Q8.8
// Image: pix_valid/pix_ready/pix_data, a pixel moves when both are high;
//   pix_ready is low while the first layer sends border zeros.
// Results, each a one-cycle pulse per frame:
//   feat_valid/feat_data   the final feature stream (Q8.8)
//   logits_valid/logits    the class scores (Q16.16)
//   class_valid/class_idx/class_score   the chosen class, one cycle later
//   prob_valid/prob        SoftMax probabilities, unsigned Q0.16
//   var_valid/var_value    per layer, variance of its pooled map about its mean
//   clip_evt/sat_evt       per layer, ReLU clipped / saturated a value
// Timing: a frame takes (IMG_W+2P)*(IMG_H+2P) cycles at the input and frames
// may follow back to back; the class of a frame appears a few dozen cycles
// after its last pixel, the probabilities about 430 cycles after the class.
// The layer chain, its extension to N layers, padding and stride follow the
// document; sizes, formats and interfaces are this design's.
module cnn_top
  import cnn_pkg::*;
#(
  parameter int unsigned IMG_W     = 28,
  parameter int unsigned IMG_H     = 28,
  parameter int unsigned N_LAYERS  = 2,
  parameter int unsigned K         = 3,
  parameter int unsigned S         = 1,
  parameter int unsigned P         = 1,
  parameter int unsigned N_CLASSES = 10,
  parameter int unsigned VAR_W     = 48,
  parameter int unsigned FIFO_D    = 4,
  // Derived sizes, not to be overridden.
  localparam int unsigned F_W   = map_dim(IMG_W, N_LAYERS, K, S, P),
  localparam int unsigned F_H   = map_dim(IMG_H, N_LAYERS, K, S, P),
  localparam int unsigned N_F   = F_W * F_H,
  localparam int unsigned LY_W  = (N_LAYERS > 1) ? $clog2(N_LAYERS) : 1,
  localparam int unsigned CA_W  = $clog2(K * K),
  localparam int unsigned CL_W  = $clog2(N_CLASSES),
  localparam int unsigned FA_W  = $clog2(N_F)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // kernel coefficient load
  input  logic                    coef_we,
  input  logic [LY_W-1:0]         coef_layer,
  input  logic [CA_W-1:0]         coef_addr,
  input  coef_t                   coef_wdata,
  // fully connected weight and bias load
  input  logic                    fcw_we,
  input  logic [CL_W-1:0]         fcw_class,
  input  logic [FA_W-1:0]         fcw_addr,
  input  coef_t                   fcw_data,
  input  logic                    fcb_we,
  input  logic [CL_W-1:0]         fcb_class,
  input  coef_t                   fcb_data,
  // image stream
  input  logic                    pix_valid,
  output logic                    pix_ready,
  input  data_t                   pix_data,
  // results
  output logic                    feat_valid,
  output data_t                   feat_data,
  output logic                    logits_valid,
  output acc_t                    logits [N_CLASSES],
  output logic                    class_valid,
  output logic [CL_W-1:0]         class_idx,
  output acc_t                    class_score,
  output logic                    prob_valid,
  output logic [15:0]             prob [N_CLASSES],
  output logic [N_LAYERS-1:0]     var_valid,
  output logic signed [VAR_W-1:0] var_value [N_LAYERS],
  output logic [N_LAYERS-1:0]     clip_evt,
  output logic [N_LAYERS-1:0]     sat_evt
);

  // Stream into each layer, and out of each layer.
  logic  [N_LAYERS-1:0] li_valid, li_ready, lo_valid;
  data_t                li_data [N_LAYERS];
  data_t                lo_data [N_LAYERS];
  logic  [N_CLASSES-1:0] n_valid;
  logic                 sm_busy;

  assign li_valid[0] = pix_valid;
  assign li_data[0]  = pix_data;
  assign pix_ready   = li_ready[0];

  for (genvar l = 0; l < N_LAYERS; l++) begin : g_layer
    localparam int unsigned LW = map_dim(IMG_W, l, K, S, P);
    localparam int unsigned LH = map_dim(IMG_H, l, K, S, P);
    localparam int unsigned N_POOL = map_dim(IMG_W, l + 1, K, S, P) * map_dim(IMG_H, l + 1, K, S, P);

    conv_layer #(.W(LW), .H(LH), .K(K), .S(S), .P(P)) u_layer (
      .clk, .rst_n,
      .coef_we(coef_we && int'(coef_layer) == l),
      .coef_addr, .coef_wdata,
      .in_valid(li_valid[l]), .in_ready(li_ready[l]), .in_data(li_data[l]),
      .out_valid(lo_valid[l]), .out_data(lo_data[l]),
      .clip_evt(clip_evt[l]), .sat_evt(sat_evt[l])
    );

    // The features of each level are re-evaluated: the variance of the
    // layer's pooled map about its own mean.
    feature_variance #(.N_CUR(N_POOL), .N_REF(N_POOL), .W(VAR_W)) u_var (
      .clk, .rst_n,
      .ref_valid(lo_valid[l]), .ref_data(lo_data[l]),
      .cur_valid(lo_valid[l]), .cur_data(lo_data[l]),
      .var_valid(var_valid[l]), .var_out(var_value[l])
    );

    if (l + 1 < N_LAYERS) begin : g_link
      stream_fifo #(.DEPTH(FIFO_D)) u_fifo (
        .clk, .rst_n,
        .in_valid(lo_valid[l]), .in_data(lo_data[l]),
        .out_valid(li_valid[l+1]), .out_ready(li_ready[l+1]), .out_data(li_data[l+1])
      );
    end
  end

  assign feat_valid = lo_valid[N_LAYERS-1];
  assign feat_data  = lo_data[N_LAYERS-1];

  for (genvar c = 0; c < N_CLASSES; c++) begin : g_neuron
    fc_neuron #(.N_F(N_F)) u_neuron (
      .clk, .rst_n,
      .w_we(fcw_we && int'(fcw_class) == c), .w_addr(fcw_addr), .w_data(fcw_data),
      .b_we(fcb_we && int'(fcb_class) == c), .b_data(fcb_data),
      .in_valid(feat_valid), .in_data(feat_data),
      .out_valid(n_valid[c]), .out_y(logits[c])
    );
  end

  // All neurons see the same stream, so they finish in the same cycle.
  assign logits_valid = n_valid[0];

  a_neurons_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    n_valid == '0 || n_valid == '1)
    else $error("fully connected neurons out of step");

  argmax_unit #(.N_CLASSES(N_CLASSES)) u_argmax (
    .clk, .rst_n, .in_valid(logits_valid), .in_y(logits),
    .out_valid(class_valid), .out_class(class_idx), .out_score(class_score)
  );

  // The scores stay on the neuron outputs until the next frame's scores.
  softmax_unit #(.N_CLASSES(N_CLASSES)) u_softmax (
    .clk, .rst_n, .in_valid(class_valid), .in_y(logits), .in_max(class_score),
    .busy(sm_busy), .out_valid(prob_valid), .out_p(prob)
  );

  a_softmax_free: assert property (@(posedge clk) disable iff (!rst_n)
    class_valid |-> !sm_busy)
    else $error("scores arrived while the SoftMax unit was busy");

endmodule
