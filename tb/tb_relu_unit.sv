// tb_relu_unit: checks requantisation, saturation and ReLU against an
// integer model: y = clamp(floor(x / 2^FRAC), 0, 32767), plus the clipped
// and saturated flags and the one-cycle latency.
module tb_relu_unit;
  import cnn_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid, out_valid, clipped, saturated;
  acc_t  in_acc;
  data_t out_data;
  int    checks = 0, failures = 0;
  int    n_clip = 0, n_sat = 0;

  relu_unit dut (.clk, .rst_n, .in_valid, .in_acc, .out_valid, .out_data, .clipped, .saturated);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint x, q, e;
    logic ec, es;
    in_valid = 0; in_acc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      case ($urandom_range(3))
        0: x = longint'($signed($urandom)) <<< $urandom_range(8);      // wide range
        1: x = longint'($urandom_range(32767 * 256 + 600)) - 300;      // near the limits
        2: x = -longint'($urandom_range(1000));
        default: x = longint'($signed($urandom)) >>> 6;
      endcase
      q = x >>> 8;
      ec = (q < 0); es = (q > 32767);
      e = ec ? 0 : (es ? 32767 : q);
      @(negedge clk);
      in_valid = 1; in_acc = acc_t'(x);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || longint'(out_data) != e || clipped != ec || saturated != es) begin
        failures++;
        $display("FAIL x=%0d got %0d c=%b s=%b exp %0d c=%b s=%b", x, out_data, clipped, saturated, e, ec, es);
      end
      n_clip += int'(ec); n_sat += int'(es);
    end
    checks++;
    if (n_clip == 0 || n_sat == 0) begin failures++; $display("FAIL clip or saturate never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
