// tb_conv_unit: checks the parallel convolution unit against the convolution
// sum written with centred offsets, Conv = sum_{a,b=-K/2..K/2}
// IN(i-a, j-b) * w(K/2+a, K/2+b), for K=3 and K=5 with random windows and
// coefficients (including extreme values), and checks the one-cycle latency.
module tb_conv_unit;
  import cnn_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  in_valid;
  data_t win3 [3][3];  coef_t coef3 [3][3];
  data_t win5 [5][5];  coef_t coef5 [5][5];
  logic  ov3, ov5;
  acc_t  oa3, oa5;
  int    checks = 0, failures = 0;

  conv_unit #(.K(3)) dut3 (.clk, .rst_n, .in_valid, .win(win3), .coef(coef3), .out_valid(ov3), .out_acc(oa3));
  conv_unit #(.K(5)) dut5 (.clk, .rst_n, .in_valid, .win(win5), .coef(coef5), .out_valid(ov5), .out_acc(oa5));

  always #5 clk = ~clk;

  function automatic data_t rnd_data();
    case ($urandom_range(5))
      0: return 16'sh7fff;
      1: return 16'sh8000;
      default: return data_t'($urandom);
    endcase
  endfunction

  // window index [r][c] holds IN(i + r - K/2, j + c - K/2)
  function automatic longint ref3();
    longint s = 0;
    for (int a = -1; a <= 1; a++)
      for (int b = -1; b <= 1; b++)
        s += longint'(win3[1-a][1-b]) * longint'(coef3[1+a][1+b]);
    return s;
  endfunction
  function automatic longint ref5();
    longint s = 0;
    for (int a = -2; a <= 2; a++)
      for (int b = -2; b <= 2; b++)
        s += longint'(win5[2-a][2-b]) * longint'(coef5[2+a][2+b]);
    return s;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e3, e5;
    in_valid = 0;
    for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) begin win5[r][c] = 0; coef5[r][c] = 0; end
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin win3[r][c] = 0; coef3[r][c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin win3[r][c] = rnd_data(); coef3[r][c] = coef_t'(rnd_data()); end
      for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) begin win5[r][c] = rnd_data(); coef5[r][c] = coef_t'(rnd_data()); end
      in_valid = 1;
      e3 = ref3(); e5 = ref5();
      @(negedge clk);
      in_valid = 0;
      checks += 2;
      if (!ov3 || longint'(oa3) != e3) begin failures++; $display("FAIL K=3 t=%0d got %0d exp %0d v=%b", t, oa3, e3, ov3); end
      if (!ov5 || longint'(oa5) != e5) begin failures++; $display("FAIL K=5 t=%0d got %0d exp %0d v=%b", t, oa5, e5, ov5); end
      @(negedge clk);
      checks++;
      if (ov3 || ov5) begin failures++; $display("FAIL valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
