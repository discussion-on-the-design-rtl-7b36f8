// feature_variance: variance of a feature set about a reference mean.
//
// Two streams are summed while they arrive: a reference set of N_REF
// features (ref_*) and the current set of N_CUR features (cur_*, also summed
// as squares). When both sets are complete the sums are latched, the
// accumulators are cleared for the next sets, and a sequencer runs these
// steps on the shared arith_unit:
//   mu  = sum(ref) / N_REF
//   t1  = mu * sum(cur)        t2 = mu * mu        t3 = t2 * N_CUR
//   V   = (sum(cur^2) - 2*t1 + t3) / (N_CUR - 1)
// which equals sum_i (cur_i - mu)^2 / (N_CUR - 1) exactly for the integer
// mu. Feature values are taken as integers (their raw Q8.8 codes), so V is
// in units of LSB^2.
//
// Interface: ref_valid/ref_data, cur_valid/cur_data in; var_valid pulses with
// var_out (W bits, signed, non-negative). Timing: about 2*W + 10 cycles after
// the last feature of both sets. The statistic, a spread of the current
// features about the mean of a reference set divided by m-1, follows the
// document; reading it as squared deviations, the streaming sums and the
// operation sequence are this design's.
module feature_variance
  import cnn_pkg::*;
#(
  parameter int unsigned N_CUR = 49,
  parameter int unsigned N_REF = 49,
  parameter int unsigned W     = 48
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ref_valid,
  input  data_t               ref_data,
  input  logic                cur_valid,
  input  data_t               cur_data,
  output logic                var_valid,
  output logic signed [W-1:0] var_out
);

  typedef logic signed [W-1:0] word_t;

  typedef enum logic [2:0] {
    S_IDLE, S_MU, S_T1, S_T2, S_T3, S_V
  } state_e;

  localparam int unsigned RCW = $clog2(N_REF + 1);
  localparam int unsigned CCW = $clog2(N_CUR + 1);

  // Streaming accumulation.
  word_t          acc_ref, acc_cur, acc_sq;
  logic [RCW-1:0] n_ref;
  logic [CCW-1:0] n_cur;
  logic           sets_full;
  word_t          ref_next, cur_next, sq_next;
  logic [RCW-1:0] n_ref_next;
  logic [CCW-1:0] n_cur_next;

  // Latched sums and intermediate results.
  word_t  s_ref, s_cur, s_sq, mu, t1, t3;
  state_e state;
  logic   issued;

  // Arithmetic unit port.
  logic      au_start, au_busy, au_done, au_dz;
  arith_op_e au_op;
  word_t     au_a, au_b, au_res;

  always_comb begin
    ref_next   = acc_ref;
    cur_next   = acc_cur;
    sq_next    = acc_sq;
    n_ref_next = n_ref;
    n_cur_next = n_cur;
    if (ref_valid && int'(n_ref) < N_REF) begin
      ref_next   = acc_ref + word_t'(ref_data);
      n_ref_next = n_ref + 1'b1;
    end
    if (cur_valid && int'(n_cur) < N_CUR) begin
      cur_next   = acc_cur + word_t'(cur_data);
      sq_next    = acc_sq + word_t'(cur_data) * word_t'(cur_data);
      n_cur_next = n_cur + 1'b1;
    end
  end

  assign sets_full = (int'(n_ref_next) == N_REF) && (int'(n_cur_next) == N_CUR);

  always_comb begin
    au_op = OP_DIV;
    au_a  = '0;
    au_b  = '0;
    unique case (state)
      S_MU:    begin au_op = OP_DIV; au_a = s_ref; au_b = word_t'(N_REF); end
      S_T1:    begin au_op = OP_MUL; au_a = mu;    au_b = s_cur;          end
      S_T2:    begin au_op = OP_MUL; au_a = mu;    au_b = mu;             end
      S_T3:    begin au_op = OP_MUL; au_a = t3;    au_b = word_t'(N_CUR); end
      S_V:     begin au_op = OP_DIV; au_a = s_sq - (t1 <<< 1) + t3;
                     au_b = word_t'(N_CUR) - word_t'(1); end
      default: ;
    endcase
  end

  assign au_start = (state != S_IDLE) && !issued && !au_busy;

  arith_unit #(.W(W)) u_au (
    .clk, .rst_n, .start(au_start), .op(au_op), .a(au_a), .b(au_b),
    .busy(au_busy), .done(au_done), .result(au_res), .div_zero(au_dz)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_ref <= '0; acc_cur <= '0; acc_sq <= '0;
      n_ref   <= '0; n_cur   <= '0;
      s_ref   <= '0; s_cur   <= '0; s_sq   <= '0;
      mu      <= '0; t1      <= '0; t3     <= '0;
      state     <= S_IDLE;
      issued    <= 1'b0;
      var_valid <= 1'b0;
      var_out   <= '0;
    end else begin
      var_valid <= 1'b0;
      // A new pair of sets is only taken while the sequencer is idle.
      if (sets_full && state == S_IDLE) begin
        s_ref   <= ref_next;
        s_cur   <= cur_next;
        s_sq    <= sq_next;
        acc_ref <= '0; acc_cur <= '0; acc_sq <= '0;
        n_ref   <= '0; n_cur   <= '0;
        state   <= S_MU;
        issued  <= 1'b0;
      end else begin
        acc_ref <= ref_next; acc_cur <= cur_next; acc_sq <= sq_next;
        n_ref   <= n_ref_next; n_cur <= n_cur_next;
      end
      if (au_start) issued <= 1'b1;
      if (au_done) begin
        issued <= 1'b0;
        unique case (state)
          S_MU: begin mu <= au_res; state <= S_T1; end
          S_T1: begin t1 <= au_res; state <= S_T2; end
          S_T2: begin t3 <= au_res; state <= S_T3; end
          S_T3: begin t3 <= au_res; state <= S_V;  end
          S_V:  begin var_out <= au_res; var_valid <= 1'b1; state <= S_IDLE; end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
