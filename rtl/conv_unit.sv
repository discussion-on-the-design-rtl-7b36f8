// conv_unit: one output point of a 2-D convolution, all KxK products at once.
//
// Computes Conv(i,j) = sum_a sum_b IN(i-a, j-b) * w(K/2+a, K/2+b) for
// a,b in -K/2..K/2, the convolution sum the design is built on. With the
// window held top-left first, this pairs window element [r][c] with
// coefficient [K-1-r][K-1-c]: the kernel is applied flipped, as a true
// convolution. The K*K multipliers work in parallel and an adder tree sums
// them, so one window is consumed per cycle.
//
// Interface: in_valid/win carry a window, coef the KxK coefficients (Q8.8);
// out_valid/out_acc the full-precision sum (Q16.16 in ACC_W bits).
// Timing: the result is registered, one cycle after the window.
// The one-cycle parallel structure is this design's choice.
module conv_unit
  import cnn_pkg::*;
#(
  parameter int unsigned K = 3
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t win  [K][K],
  input  coef_t coef [K][K],
  output logic  out_valid,
  output acc_t  out_acc
);

  acc_t sum;

  always_comb begin
    sum = '0;
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++)
        sum += acc_t'(win[r][c]) * acc_t'(coef[K-1-r][K-1-c]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_acc   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_acc <= sum;
    end
  end

endmodule
