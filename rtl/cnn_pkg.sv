// cnn_pkg: number formats and shared helpers of the streaming CNN classifier.
//
// Feature values and coefficients are signed fixed point with FRAC fractional
// bits (Q8.8 at the defaults). Products are accumulated at full precision in
// ACC_W bits and brought back to DATA_W bits only by the activation stage.
// The word sizes are this design's choice; the output-size rule of a
// convolution, (C_in + 2p - k)/s + 1, is the one the design is built around.
package cnn_pkg;

  localparam int unsigned DATA_W = 16;   // feature / pixel word
  localparam int unsigned COEF_W = 16;   // kernel coefficient and FC weight word
  localparam int unsigned FRAC   = 8;    // fractional bits of both
  localparam int unsigned ACC_W  = 40;   // accumulator word (products + growth)

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Operations of the shared arithmetic unit.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_MUL = 2'd1,
    OP_DIV = 2'd2
  } arith_op_e;

  // Output size of a convolution along one axis: (c_in + 2p - k)/s + 1.
  function automatic int conv_out_dim(int c_in, int p, int k, int s);
    return (c_in + 2 * p - k) / s + 1;
  endfunction

  // Output size of a 2x2, stride-2 max pool (an odd last row/column is dropped).
  function automatic int pool_out_dim(int c_in);
    return c_in / 2;
  endfunction

  // Side of the map entering layer l (0 = the image) of a chain of layers
  // that all use kernel k, stride s, padding p and 2x2 pooling.
  function automatic int map_dim(int d0, int l, int k, int s, int p);
    int d = d0;
    for (int i = 0; i < l; i++) d = pool_out_dim(conv_out_dim(d, p, k, s));
    return d;
  endfunction

endpackage
