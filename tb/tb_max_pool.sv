// tb_max_pool: checks 2x2 stride-2 max pooling of random signed maps of odd
// size (7x5, last row and column dropped) against direct block maxima, over
// two frames with random idle cycles, and the count of outputs per frame.
module tb_max_pool;
  import cnn_pkg::*;

  localparam int W = 7, H = 5;

  logic  clk = 0, rst_n = 0;
  logic  in_valid, out_valid;
  data_t in_data, out_data;
  int    checks = 0, failures = 0;
  data_t img [H][W];
  data_t expq[$];

  max_pool #(.W(W), .H(H)) dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        automatic data_t e = expq.pop_front();
        if (out_data !== e) begin failures++; $display("FAIL got %0d exp %0d", out_data, e); end
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = data_t'($urandom);
      for (int r = 0; r + 1 < H; r += 2)
        for (int c = 0; c + 1 < W; c += 2) begin
          automatic data_t m = img[r][c];
          if (img[r][c+1] > m) m = img[r][c+1];
          if (img[r+1][c] > m) m = img[r+1][c];
          if (img[r+1][c+1] > m) m = img[r+1][c+1];
          expq.push_back(m);
        end
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          @(negedge clk); in_valid = 0;
          while ($urandom_range(2) == 0) @(negedge clk);
          in_valid = 1; in_data = img[r][c];
        end
      @(negedge clk); in_valid = 0;
      @(negedge clk);
      checks++;
      if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); expq.delete(); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
