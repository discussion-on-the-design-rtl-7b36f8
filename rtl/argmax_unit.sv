// argmax_unit: final classification, picks the class with the largest score.
//
// SoftMax is strictly increasing in each score, so the class with the
// largest SoftMax output is the class with the largest pre-activation score
// y. This unit compares the N_CLASSES scores and reports that class and its
// score; the lowest index wins a tie. Exponentials and normalised
// probabilities are not computed.
//
// Interface: in_valid/in_y (one ACC_W score per class) in; out_valid,
// out_class and out_score out. Timing: registered, one cycle.
module argmax_unit
  import cnn_pkg::*;
#(
  parameter int unsigned N_CLASSES = 10
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  acc_t                         in_y [N_CLASSES],
  output logic                         out_valid,
  output logic [$clog2(N_CLASSES)-1:0] out_class,
  output acc_t                         out_score
);

  localparam int unsigned IW = $clog2(N_CLASSES);

  logic [IW-1:0] best_i;
  acc_t          best_y;

  always_comb begin
    best_i = '0;
    best_y = in_y[0];
    for (int i = 1; i < N_CLASSES; i++) begin
      if (in_y[i] > best_y) begin
        best_y = in_y[i];
        best_i = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_class <= '0;
      out_score <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_class <= best_i;
        out_score <= best_y;
      end
    end
  end

endmodule
