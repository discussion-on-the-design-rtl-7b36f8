// tb_fc_neuron: loads random weights and a bias into a 7-input neuron,
// streams several feature vectors with random gaps, and compares each score
// with sum(x_i * w_i) + b * 2^8. Also checks that the score appears exactly
// two cycles after the last feature and that reloading a weight takes effect.
module tb_fc_neuron;
  import cnn_pkg::*;

  localparam int N_F = 7;

  logic  clk = 0, rst_n = 0;
  logic  w_we, b_we, in_valid, out_valid;
  logic [2:0] w_addr;
  coef_t w_data, b_data;
  data_t in_data;
  acc_t  out_y;
  int    checks = 0, failures = 0;
  longint wts [N_F];
  longint bias;

  fc_neuron #(.N_F(N_F)) dut (.clk, .rst_n, .w_we, .w_addr, .w_data, .b_we, .b_data,
                              .in_valid, .in_data, .out_valid, .out_y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int i, input longint v);
    @(negedge clk); w_we = 1; w_addr = 3'(i); w_data = coef_t'(v); wts[i] = v;
    @(negedge clk); w_we = 0;
  endtask

  initial begin
    w_we = 0; b_we = 0; in_valid = 0; w_addr = 0; w_data = 0; b_data = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N_F; i++) load(i, longint'($signed(16'($urandom))));
    bias = longint'($signed(16'($urandom)));
    @(negedge clk); b_we = 1; b_data = coef_t'(bias);
    @(negedge clk); b_we = 0;
    for (int v = 0; v < 40; v++) begin
      automatic longint e = bias <<< 8;
      if (v == 20) load($urandom_range(N_F - 1), longint'($signed(16'($urandom))));
      for (int i = 0; i < N_F; i++) begin
        automatic longint x = longint'($signed(16'($urandom)));
        e += x * wts[i];
        @(negedge clk); in_valid = 0;
        while ($urandom_range(2) == 0) begin
          @(negedge clk);
          checks++;
          if (out_valid) begin failures++; $display("FAIL early score"); end
        end
        in_valid = 1; in_data = data_t'(x);
      end
      @(negedge clk); in_valid = 0;
      checks++;
      if (out_valid) begin failures++; $display("FAIL score one cycle after last feature"); end
      @(negedge clk);
      checks++;
      if (!out_valid || longint'(out_y) != e) begin
        failures++; $display("FAIL vector %0d got %0d exp %0d v=%b", v, out_y, e, out_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
