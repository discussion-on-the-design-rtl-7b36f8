// tb_argmax_unit: random score vectors for 10 classes (with forced ties
// and extreme values); the reported class must be the first index of the
// maximum and the score the maximum, one cycle after the input.
module tb_argmax_unit;
  import cnn_pkg::*;

  localparam int N = 10;

  logic  clk = 0, rst_n = 0;
  logic  in_valid, out_valid;
  acc_t  in_y [N];
  logic [3:0] out_class;
  acc_t  out_score;
  int    checks = 0, failures = 0;

  argmax_unit #(.N_CLASSES(N)) dut (.clk, .rst_n, .in_valid, .in_y, .out_valid, .out_class, .out_score);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    foreach (in_y[i]) in_y[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      automatic int ei = 0;
      @(negedge clk);
      foreach (in_y[i]) in_y[i] = acc_t'({$urandom, $urandom}) >>> $urandom_range(30);
      if (t % 5 == 0) in_y[$urandom_range(N-1)] = in_y[$urandom_range(N-1)];   // tie
      if (t % 7 == 0) in_y[$urandom_range(N-1)] = {1'b1, {(ACC_W-1){1'b0}}};   // most negative
      for (int i = 1; i < N; i++) if (in_y[i] > in_y[ei]) ei = i;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(out_class) != ei || out_score != in_y[ei]) begin
        failures++; $display("FAIL t=%0d got %0d exp %0d", t, out_class, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
