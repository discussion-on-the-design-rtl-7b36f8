// fc_neuron: one neuron of the fully connected layer, a sum of products.
//
// Computes y = sum_{i=1..N_F} x_i * w_i + b over a stream of N_F feature
// values. The weights w_i sit in a weight_mem addressed by the running
// feature count; the bias b is a register. Each feature is multiplied and
// accumulated as it arrives, so the neuron needs no feature storage, and
// several neurons fed the same stream work in parallel, one per class.
//
// Interface: w_we/w_addr/w_data load weight i (Q8.8), b_we/b_data load the
// bias (Q8.8). in_valid/in_data is the feature stream (Q8.8); after every
// N_F-th feature, out_valid pulses with out_y in Q16.16 (ACC_W bits).
// Timing: out_valid comes two cycles after the last feature (weight read,
// then accumulate). The sum of products with bias is the document's; the
// streaming organisation and word sizes are this design's choices.
module fc_neuron
  import cnn_pkg::*;
#(
  parameter int unsigned N_F = 49
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   w_we,
  input  logic [$clog2(N_F)-1:0] w_addr,
  input  coef_t                  w_data,
  input  logic                   b_we,
  input  coef_t                  b_data,
  input  logic                   in_valid,
  input  data_t                  in_data,
  output logic                   out_valid,
  output acc_t                   out_y
);

  localparam int unsigned AW = $clog2(N_F);

  logic [AW-1:0] cnt;
  logic          v1;
  logic          last1;
  data_t         x1;
  logic [COEF_W-1:0] w_raw;
  coef_t         bias;
  acc_t          acc;
  acc_t          prod;

  weight_mem #(.DEPTH(N_F), .WIDTH(COEF_W)) u_mem (
    .clk, .we(w_we), .waddr(w_addr), .wdata(w_data),
    .raddr(cnt), .rdata(w_raw)
  );

  assign prod = acc_t'(x1) * acc_t'(coef_t'(w_raw));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bias      <= '0;
      cnt       <= '0;
      v1        <= 1'b0;
      last1     <= 1'b0;
      x1        <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_y     <= '0;
    end else begin
      if (b_we) bias <= b_data;
      v1        <= in_valid;
      out_valid <= 1'b0;
      if (in_valid) begin
        x1    <= in_data;
        last1 <= (int'(cnt) == N_F - 1);
        cnt   <= (int'(cnt) == N_F - 1) ? '0 : cnt + 1'b1;
      end
      if (v1) begin
        if (last1) begin
          out_y     <= acc + prod + (acc_t'(bias) <<< FRAC);
          out_valid <= 1'b1;
          acc       <= '0;
        end else begin
          acc <= acc + prod;
        end
      end
    end
  end

endmodule
