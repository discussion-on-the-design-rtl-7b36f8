// relu_unit: activation stage, ReLU with requantisation.
//
// Takes a full-precision sum (2*FRAC fractional bits), shifts it back to
// FRAC fractional bits (arithmetic shift, rounding toward minus infinity),
// clamps it to the largest DATA_W value and then applies ReLU, max(0, x).
// Two event flags report a clipped negative and a saturated positive value.
//
// Interface: in_valid/in_acc in, out_valid/out_data out, plus clipped and
// saturated, valid with out_valid. Timing: registered, one cycle.
// ReLU itself follows the document; the shift and clamp are this design's
// fixed-point choice.
module relu_unit
  import cnn_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  acc_t  in_acc,
  output logic  out_valid,
  output data_t out_data,
  output logic  clipped,
  output logic  saturated
);

  localparam acc_t MAXV = acc_t'({1'b0, {(DATA_W-1){1'b1}}});

  acc_t shifted;
  assign shifted = in_acc >>> FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      clipped   <= 1'b0;
      saturated <= 1'b0;
    end else begin
      out_valid <= in_valid;
      clipped   <= 1'b0;
      saturated <= 1'b0;
      if (in_valid) begin
        if (shifted < 0) begin
          out_data <= '0;
          clipped  <= 1'b1;
        end else if (shifted > MAXV) begin
          out_data  <= data_t'(MAXV);
          saturated <= 1'b1;
        end else begin
          out_data <= data_t'(shifted);
        end
      end
    end
  end

endmodule
