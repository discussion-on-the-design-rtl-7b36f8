// arith_unit: shared arithmetic unit with addition, multiplication and division.
//
// One operation at a time on two signed W-bit operands. Addition and
// multiplication finish in one cycle (results wrap to W bits). Division is
// a restoring shift-subtract divider on the operand magnitudes, one quotient
// bit per cycle, W cycles in all; the quotient is truncated toward zero and
// takes the sign of a^b. Division by zero returns the largest positive
// value and sets div_zero.
//
// Interface: a start pulse with op/a/b is taken when busy is low; done
// pulses with result (and div_zero) when the operation ends.
// Timing: ADD and MUL: done one cycle after start; DIV: W+1 cycles after start.
// The three operations are the document's; the sequential divider and the
// handshake are this design's choices.
module arith_unit
  import cnn_pkg::*;
#(
  parameter int unsigned W = 48
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  arith_op_e           op,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] result,
  output logic                div_zero
);

  localparam int unsigned CNT_W = $clog2(W + 1);

  logic [W-1:0]     quo;     // dividend shifted out, quotient shifted in
  logic [W:0]       rem;     // partial remainder
  logic [W-1:0]     dvs;     // divisor magnitude
  logic             neg;     // quotient sign
  logic [CNT_W-1:0] cnt;
  logic [W:0]       rem_sh;
  logic [W:0]       rem_sub;

  assign rem_sh  = {rem[W-1:0], quo[W-1]};
  assign rem_sub = rem_sh - {1'b0, dvs};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      result   <= '0;
      div_zero <= 1'b0;
      quo      <= '0;
      rem      <= '0;
      dvs      <= '0;
      neg      <= 1'b0;
      cnt      <= '0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        div_zero <= 1'b0;
        unique case (op)
          OP_ADD: begin
            result <= a + b;
            done   <= 1'b1;
          end
          OP_MUL: begin
            result <= a * b;
            done   <= 1'b1;
          end
          OP_DIV: begin
            if (b == '0) begin
              result   <= {1'b0, {(W-1){1'b1}}};
              div_zero <= 1'b1;
              done     <= 1'b1;
            end else begin
              quo  <= a[W-1] ? -a : a;
              dvs  <= b[W-1] ? -b : b;
              neg  <= a[W-1] ^ b[W-1];
              rem  <= '0;
              cnt  <= CNT_W'(W);
              busy <= 1'b1;
            end
          end
          default: begin
            result <= '0;
            done   <= 1'b1;
          end
        endcase
      end else if (busy) begin
        if (rem_sub[W]) begin
          rem <= rem_sh;
          quo <= {quo[W-2:0], 1'b0};
        end else begin
          rem <= rem_sub;
          quo <= {quo[W-2:0], 1'b1};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy   <= 1'b0;
          done   <= 1'b1;
          result <= neg ? -signed'(rem_sub[W] ? {quo[W-2:0], 1'b0} : {quo[W-2:0], 1'b1})
                        :  signed'(rem_sub[W] ? {quo[W-2:0], 1'b0} : {quo[W-2:0], 1'b1});
        end
      end
    end
  end

endmodule
