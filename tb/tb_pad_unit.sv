// tb_pad_unit: streams random 5x4 maps, with random idle cycles, through
// pad units with P = 1 and P = 2 and compares the output stream with the
// map surrounded by P rows and columns of zeros. Checks that in_ready is low
// exactly on border positions and that, with the input always valid, the
// first to the last pixel of a frame takes (H-1)*(W+2P)+W cycles.
module tb_pad_unit;
  import cnn_pkg::*;

  localparam int W = 5, H = 4;
  localparam int PV [2] = '{1, 2};

  logic  clk = 0, rst_n = 0;
  logic  [1:0] in_valid, in_ready, out_valid;
  data_t in_data [2];
  data_t out_data [2];
  int    checks = 0, failures = 0;
  localparam int NFR = 4;
  longint imgs [NFR][H*W];
  longint img [H*W];
  bit     all_sent = 0;
  longint expq [2][$];

  pad_unit #(.W(W), .H(H), .P(1)) dut1 (.clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .in_data(in_data[0]), .out_valid(out_valid[0]), .out_data(out_data[0]));
  pad_unit #(.W(W), .H(H), .P(2)) dut2 (.clk, .rst_n, .in_valid(in_valid[1]), .in_ready(in_ready[1]),
    .in_data(in_data[1]), .out_valid(out_valid[1]), .out_data(out_data[1]));

  always #5 clk = ~clk;

  // sampled just before each rising edge
  always @(posedge clk) if (rst_n) begin
    for (int d = 0; d < 2; d++) if (out_valid[d]) begin
      checks++;
      if (expq[d].size() == 0) begin
        // after the last frame only the next frame's top border may follow
        if (!all_sent || out_data[d] != 0 || in_ready[d]) begin failures++; $display("FAIL P=%0d unexpected output %0d ready %b sent %b", PV[d], out_data[d], in_ready[d], all_sent); end
      end
      else begin
        automatic longint e = expq[d].pop_front();
        if (longint'(out_data[d]) != e) begin failures++; $display("FAIL P=%0d got %0d exp %0d", PV[d], out_data[d], e); end
        checks++;
        // a border zero is exactly a cycle in which the input is not taken
        if (in_ready[d] == (e == 0 && !(in_valid[d] && in_data[d] == 0))) begin
          failures++; $display("FAIL P=%0d in_ready %b on value %0d", PV[d], in_ready[d], e);
        end
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input int d, input bit gaps, output int cycles);
    automatic bit rdy;
    automatic bit started = 0;
    cycles = 0;
    foreach (img[i]) begin
      @(negedge clk); in_valid[d] = 0;
      if (gaps) while ($urandom_range(2) == 0) @(negedge clk);
      in_valid[d] = 1; in_data[d] = data_t'(img[i]);
      // in_ready is read at the falling edge, where it is stable
      forever begin
        rdy = in_ready[d];
        @(posedge clk);
        if (rdy) started = 1;
        if (started) cycles++;
        if (rdy) break;
        @(negedge clk);
      end
    end
    @(negedge clk); in_valid[d] = 0;
  endtask

  initial begin
    int cyc [2];
    in_valid = 0; in_data[0] = 0; in_data[1] = 0;
    // borders run ahead of the data, so every frame is expected up front
    for (int f = 0; f < NFR; f++) begin
      foreach (imgs[f][i]) imgs[f][i] = longint'($urandom_range(1000)) + 1;   // non-zero
      for (int d = 0; d < 2; d++)
        for (int r = -PV[d]; r < H + PV[d]; r++)
          for (int c = -PV[d]; c < W + PV[d]; c++)
            expq[d].push_back((r < 0 || r >= H || c < 0 || c >= W) ? 0 : imgs[f][r * W + c]);
    end
    @(negedge clk); rst_n = 1;
    for (int f = 0; f < NFR; f++) begin
      automatic bit gaps = (f % 2 == 1);
      img = imgs[f];
      fork
        drive(0, gaps, cyc[0]);
        drive(1, gaps, cyc[1]);
      join
      if (f == NFR - 1) all_sent = 1;
      repeat (4 * (W + 8)) @(negedge clk);
      for (int d = 0; d < 2; d++) begin
        // what is left is the later frames, their top border already sent
        automatic int pw = W + 2 * PV[d];
        automatic int left = (NFR - 1 - f) * pw * (H + 2 * PV[d]) - ((f < NFR - 1) ? PV[d] * pw + PV[d] : 0);
        checks++;
        if (expq[d].size() != left) begin failures++; $display("FAIL frame %0d P=%0d: %0d values left, exp %0d", f, PV[d], expq[d].size(), left); end
        if (!gaps) begin
          checks++;
          if (cyc[d] != (H - 1) * (W + 2 * PV[d]) + W) begin
            failures++; $display("FAIL P=%0d frame took %0d cycles", PV[d], cyc[d]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
