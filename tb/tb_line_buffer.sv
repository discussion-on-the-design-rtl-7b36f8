// tb_line_buffer: checks the sliding window generator against a direct
// extraction of KxK windows from a stored random image, for stride 1 and
// stride 2, over two back-to-back frames fed with random idle cycles.
// Also checks the window count per frame and the one-cycle latency.
module tb_line_buffer;
  import cnn_pkg::*;

  localparam int W = 7, H = 6, K = 3;

  logic  clk = 0, rst_n = 0;
  logic  in_valid;
  data_t in_data;
  logic  v1, v2;
  data_t w1 [K][K];
  data_t w2 [K][K];
  int    checks = 0, failures = 0;

  line_buffer #(.W(W), .H(H), .K(K), .S(1)) dut1 (.clk, .rst_n, .in_valid, .in_data, .win_valid(v1), .win(w1));
  line_buffer #(.W(W), .H(H), .K(K), .S(2)) dut2 (.clk, .rst_n, .in_valid, .in_data, .win_valid(v2), .win(w2));

  always #5 clk = ~clk;

  data_t img [H][W];
  // expected window positions, in raster order
  int    exp1_r[$], exp1_c[$], exp2_r[$], exp2_c[$];

  task automatic check_win(input data_t w [K][K], input int r0, input int c0, input string tag);
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++) begin
        checks++;
        if (w[r][c] !== img[r0+r][c0+c]) begin
          failures++;
          $display("FAIL %s win(%0d,%0d)[%0d][%0d] = %0d expected %0d", tag, r0, c0, r, c, w[r][c], img[r0+r][c0+c]);
        end
      end
  endtask

  logic pv = 0;
  always @(posedge clk) pv <= in_valid;

  always @(negedge clk) begin
    if (rst_n && v1) begin
      if (exp1_r.size() == 0) begin failures++; $display("FAIL unexpected S=1 window"); end
      else begin
        check_win(w1, exp1_r.pop_front(), exp1_c.pop_front(), "S1");
        checks++;
        if (!pv) begin failures++; $display("FAIL S=1 latency"); end
      end
    end
    if (rst_n && v2) begin
      if (exp2_r.size() == 0) begin failures++; $display("FAIL unexpected S=2 window"); end
      else check_win(w2, exp2_r.pop_front(), exp2_c.pop_front(), "S2");
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) img[r][c] = data_t'($urandom);
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          while ($urandom_range(3) == 0) begin
            @(negedge clk); in_valid = 0;
          end
          @(negedge clk);
          in_valid = 1; in_data = img[r][c];
          if (r >= K-1 && c >= K-1) begin
            exp1_r.push_back(r-K+1); exp1_c.push_back(c-K+1);
            if ((r-K+1) % 2 == 0 && (c-K+1) % 2 == 0) begin
              exp2_r.push_back(r-K+1); exp2_c.push_back(c-K+1);
            end
          end
          @(posedge clk);
        end
      @(negedge clk); in_valid = 0;
      repeat (3) @(posedge clk);
      checks++;
      if (exp1_r.size() != 0 || exp2_r.size() != 0) begin
        failures++; $display("FAIL frame %0d: %0d/%0d windows missing", f, exp1_r.size(), exp2_r.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
