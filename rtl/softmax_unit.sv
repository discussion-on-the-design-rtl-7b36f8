// softmax_unit: SoftMax probabilities of the class scores.
//
// p_i = exp(y_i - y_max) / sum_j exp(y_j - y_max), with y_max the largest
// score, so every exponent is <= 0 and the largest term is exactly 1.
// The exponential is taken in base 2: exp(-d) = 2^-(d*log2 e). Writing
// t = d*log2 e = n + f with integer n and fraction f, 2^-t = 2^-f >> n, and
// 2^-f is approximated by the quadratic 1 - 0.67157 f + 0.17157 f^2, which
// is exact at f = 0, 0.5 and 1 (error below 0.3 %). Terms with n >= 17 are 0.
// The unit works serially: one exponential per cycle while summing, then one
// division per class on its own arith_unit (p_i = (e_i << 16) / sum).
//
// Interface: in_valid with in_y (scores, Q16.16) and in_max (their maximum);
// out_valid pulses with out_p, the probabilities in unsigned Q0.16 (65535
// stands for 1.0), summing to 1 within rounding. busy is high while a set
// is being worked on; a new set arriving while busy is ignored.
// Timing: N_CLASSES + N_CLASSES*(DIV_W+2) + 2 cycles, 432 at the defaults.
// SoftMax is the document's; the base-2 quadratic approximation, the formats
// and the serial schedule are this design's choices.
module softmax_unit
  import cnn_pkg::*;
#(
  parameter int unsigned N_CLASSES = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  acc_t        in_y [N_CLASSES],
  input  acc_t        in_max,
  output logic        busy,
  output logic        out_valid,
  output logic [15:0] out_p [N_CLASSES]
);

  localparam int unsigned DIV_W  = 40;
  localparam int unsigned IW     = $clog2(N_CLASSES);
  localparam int unsigned SUM_W  = 17 + $clog2(N_CLASSES);
  localparam longint      LOG2E  = 47274;   // log2(e) in Q1.15
  localparam longint      POLY_B = 44012;   // 0.67157 in Q0.16
  localparam longint      POLY_C = 11244;   // 0.17157 in Q0.16

  typedef logic signed [DIV_W-1:0] word_t;
  typedef enum logic [1:0] { S_IDLE, S_EXP, S_DIV, S_OUT } state_e;

  state_e          state;
  acc_t            y [N_CLASSES];
  acc_t            ymax;
  logic [16:0]     e [N_CLASSES];
  logic [SUM_W-1:0] sum;
  logic [IW-1:0]   idx;
  logic            issued;

  // Exponential of the current class, Q1.16.
  logic [63:0]     d, t;
  logic [47:0]     n;
  logic [15:0]     f;
  logic [31:0]     ff;
  logic [16:0]     g, e_cur;

  always_comb begin
    d     = 64'(ymax - y[idx]);                 // >= 0
    t     = (d * 64'(LOG2E)) >> 15;             // Q16.16
    n     = t[63:16];
    f     = t[15:0];
    ff    = 32'(f) * 32'(f);
    g     = 17'(65536 - ((64'(f) * 64'(POLY_B)) >> 16) + ((64'(ff[31:16]) * 64'(POLY_C)) >> 16));
    e_cur = (n >= 48'd17) ? '0 : (g >> n[4:0]);
  end

  // Division on the arithmetic unit.
  logic  au_start, au_busy, au_done, au_dz;
  word_t au_res;

  assign au_start = (state == S_DIV) && !issued && !au_busy;

  arith_unit #(.W(DIV_W)) u_au (
    .clk, .rst_n, .start(au_start), .op(OP_DIV),
    .a(word_t'({e[idx], 16'h0000})), .b(word_t'(sum)),
    .busy(au_busy), .done(au_done), .result(au_res), .div_zero(au_dz)
  );

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      idx       <= '0;
      issued    <= 1'b0;
      sum       <= '0;
      ymax      <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < N_CLASSES; i++) begin
        y[i]     <= '0;
        e[i]     <= '0;
        out_p[i] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          y     <= in_y;
          ymax  <= in_max;
          sum   <= '0;
          idx   <= '0;
          state <= S_EXP;
        end
        S_EXP: begin
          e[idx] <= e_cur;
          sum    <= sum + SUM_W'(e_cur);
          if (int'(idx) == N_CLASSES - 1) begin
            idx   <= '0;
            state <= S_DIV;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        S_DIV: begin
          if (au_start) issued <= 1'b1;
          if (au_done) begin
            issued     <= 1'b0;
            // a lone maximum gives exactly 1.0, shown as the largest code
            out_p[idx] <= (au_dz || au_res > word_t'(65535)) ? 16'hffff : au_res[15:0];
            if (int'(idx) == N_CLASSES - 1) state <= S_OUT;
            else idx <= idx + 1'b1;
          end
        end
        default: begin
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
      endcase
    end
  end

endmodule
