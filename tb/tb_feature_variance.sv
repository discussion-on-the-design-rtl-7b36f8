// tb_feature_variance: streams random reference (n=4) and current (m=6)
// feature sets, interleaved and with gaps, and compares the result with
// sum_i (cur_i - mu)^2 / (m-1), mu = sum(ref)/n truncated toward zero,
// computed directly. Several rounds, including negative features.
module tb_feature_variance;
  import cnn_pkg::*;

  localparam int M = 6, N = 4, W = 48;

  logic  clk = 0, rst_n = 0;
  logic  ref_valid, cur_valid, var_valid;
  data_t ref_data, cur_data;
  logic signed [W-1:0] var_out;
  int    checks = 0, failures = 0;

  feature_variance #(.N_CUR(M), .N_REF(N), .W(W)) dut (.clk, .rst_n, .ref_valid, .ref_data,
    .cur_valid, .cur_data, .var_valid, .var_out);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_valid = 0; cur_valid = 0; ref_data = 0; cur_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      automatic longint rv[N], cv[M];
      automatic longint sr = 0, mu, ss = 0, e;
      automatic int ri = 0, ci = 0, wait_c = 0;
      foreach (rv[i]) begin rv[i] = (t % 3 == 0) ? longint'($signed(16'($urandom))) : longint'($urandom_range(32767)); sr += rv[i]; end
      foreach (cv[i]) cv[i] = (t % 3 == 0) ? longint'($signed(16'($urandom))) : longint'($urandom_range(32767));
      mu = sr / N;
      foreach (cv[i]) ss += (cv[i] - mu) * (cv[i] - mu);
      e = ss / (M - 1);
      while (ri < N || ci < M) begin
        @(negedge clk);
        ref_valid = (ri < N) && ($urandom_range(1) == 1);
        cur_valid = (ci < M) && ($urandom_range(1) == 1);
        if (ref_valid) begin ref_data = data_t'(rv[ri]); ri++; end
        if (cur_valid) begin cur_data = data_t'(cv[ci]); ci++; end
      end
      @(negedge clk); ref_valid = 0; cur_valid = 0;
      while (!var_valid && wait_c < 500) begin @(negedge clk); wait_c++; end
      checks++;
      if (!var_valid || longint'(var_out) != e) begin
        failures++; $display("FAIL round %0d got %0d exp %0d", t, var_out, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
