// tb_softmax_unit: random score vectors for 10 classes (spread from nearly
// equal to far apart, with ties) go through the SoftMax unit. Each output is
// compared bit for bit with an integer model of the same base-2 quadratic
// approximation, and with the real SoftMax (within 0.4 % of full scale);
// the probabilities must sum to 1 within rounding. The latency from input to
// result is checked, and a set offered while busy must be ignored.
module tb_softmax_unit;
  import cnn_pkg::*;

  localparam int N = 10;
  localparam int LAT = N + N * 42 + 2;

  logic        clk = 0, rst_n = 0;
  logic        in_valid, busy, out_valid;
  acc_t        in_y [N];
  acc_t        in_max;
  logic [15:0] out_p [N];
  int          checks = 0, failures = 0;

  softmax_unit #(.N_CLASSES(N)) dut (.clk, .rst_n, .in_valid, .in_y, .in_max, .busy, .out_valid, .out_p);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 2^-t for t in Q16.16, Q1.16 result
  function automatic longint exp2neg(longint t);
    longint n = t / 65536, f = t % 65536;
    longint g = 65536 - (f * 44012) / 65536 + (((f * f) / 65536) * 11244) / 65536;
    return (n >= 17) ? 0 : g / (longint'(1) << n);
  endfunction

  initial begin
    in_valid = 0; in_max = 0;
    foreach (in_y[i]) in_y[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      automatic longint e [N];
      automatic longint sum = 0, psum = 0;
      automatic real rsum = 0.0;
      automatic int cyc = 0;
      automatic longint mx;
      automatic int spread = $urandom_range(22);
      foreach (in_y[i]) in_y[i] = acc_t'(longint'($signed($urandom)) >>> (31 - spread));
      if (t % 4 == 0) in_y[3] = in_y[7];
      mx = in_y[0];
      foreach (in_y[i]) if (in_y[i] > mx) mx = in_y[i];
      foreach (in_y[i]) begin
        e[i] = exp2neg(((mx - longint'(in_y[i])) * 47274) / 32768);
        sum += e[i];
        rsum += $exp((real'(in_y[i]) - real'(mx)) / 65536.0);
      end
      @(negedge clk);
      in_max = acc_t'(mx); in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      // offered while busy: must be ignored
      @(negedge clk);
      in_y[0] = in_y[0] + 1000; in_valid = 1;
      @(negedge clk);
      in_valid = 0; in_y[0] = in_y[0] - 1000;
      cyc = 3;
      while (!out_valid && cyc < 2000) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != LAT) begin failures++; $display("FAIL latency %0d exp %0d", cyc, LAT); end
      foreach (out_p[i]) begin
        automatic longint ep = (e[i] * 65536) / sum;
        automatic real rp = $exp((real'(in_y[i]) - real'(mx)) / 65536.0) / rsum;
        if (ep > 65535) ep = 65535;
        checks += 2;
        if (longint'(out_p[i]) != ep) begin failures++; $display("FAIL t=%0d p[%0d] got %0d exp %0d", t, i, out_p[i], ep); end
        if ((real'(out_p[i]) / 65536.0 - rp) > 0.004 || (rp - real'(out_p[i]) / 65536.0) > 0.004) begin
          failures++; $display("FAIL t=%0d p[%0d] = %f, real SoftMax %f", t, i, real'(out_p[i]) / 65536.0, rp);
        end
        psum += longint'(out_p[i]);
      end
      checks++;
      if (psum < 65536 - N || psum > 65536) begin failures++; $display("FAIL t=%0d probabilities sum to %0d", t, psum); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
