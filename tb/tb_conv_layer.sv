// tb_conv_layer: runs whole random frames through three convolutional
// layers of different shapes, each fed by its own driver that honours its
// in_ready: 3x3 stride 1 padding 1, 3x3 stride 2 no padding, and 5x5
// stride 1 padding 2, all on a 10x9 input. Every pooled output is compared
// with the integer reference model (padding, convolution, ReLU with
// requantisation, 2x2 max pooling). Kernels are reloaded between frames;
// the ReLU clip and saturate events and the padding stalls are counted and
// must occur. With the input always valid, the first to the last pixel of
// a frame must take exactly (H-1)*(W+2P)+W cycles.
module tb_conv_layer;
  import cnn_pkg::*;
  `include "cnn_ref.svh"

  localparam int W = 10, H = 9, NI = 3;
  localparam int KK [NI] = '{3, 3, 5};
  localparam int SS [NI] = '{1, 2, 1};
  localparam int PP [NI] = '{1, 0, 2};

  logic  clk = 0, rst_n = 0;
  logic  coef_we, coef_we3;
  logic [4:0] coef_addr;
  coef_t coef_wdata;
  logic  [NI-1:0] in_valid, in_ready, ov, ce, se;
  data_t in_data [NI];
  data_t od [NI];
  int    checks = 0, failures = 0;
  int    n_clip = 0, n_sat = 0, n_stall = 0, cur_f = 0;
  vec_t  expq [NI];
  vec_t  img, kern;

  conv_layer #(.W(W), .H(H), .K(3), .S(1), .P(1)) dut0 (.clk, .rst_n, .coef_we(coef_we3),
    .coef_addr(coef_addr[3:0]), .coef_wdata, .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .in_data(in_data[0]), .out_valid(ov[0]), .out_data(od[0]), .clip_evt(ce[0]), .sat_evt(se[0]));
  conv_layer #(.W(W), .H(H), .K(3), .S(2), .P(0)) dut1 (.clk, .rst_n, .coef_we(coef_we3),
    .coef_addr(coef_addr[3:0]), .coef_wdata, .in_valid(in_valid[1]), .in_ready(in_ready[1]),
    .in_data(in_data[1]), .out_valid(ov[1]), .out_data(od[1]), .clip_evt(ce[1]), .sat_evt(se[1]));
  conv_layer #(.W(W), .H(H), .K(5), .S(1), .P(2)) dut2 (.clk, .rst_n, .coef_we,
    .coef_addr(coef_addr), .coef_wdata, .in_valid(in_valid[2]), .in_ready(in_ready[2]),
    .in_data(in_data[2]), .out_valid(ov[2]), .out_data(od[2]), .clip_evt(ce[2]), .sat_evt(se[2]));

  always #5 clk = ~clk;

  // the 3x3 layers take only the first nine coefficients
  assign coef_we3 = coef_we && coef_addr < 5'd9;

  always @(negedge clk) if (rst_n) begin
    for (int d = 0; d < NI; d++) begin
      n_clip += int'(ce[d]);
      n_sat  += int'(se[d]);
      if (in_valid[d] && !in_ready[d]) n_stall++;
      if (ov[d]) begin
        checks++;
        if (expq[d].size() == 0) begin failures++; $display("FAIL layer %0d unexpected output", d); end
        else begin
          automatic longint e = expq[d].pop_front();
          if (longint'(od[d]) != e) begin failures++; $display("FAIL layer %0d got %0d exp %0d (frame %0d, %0d left)", d, od[d], e, cur_f, expq[d].size()); end
        end
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send the image to layer d; gaps = random idle cycles. Returns the cycles
  // from the first accepted pixel to the last, both included.
  task automatic drive(input int d, input bit gaps, output int cycles);
    automatic bit rdy;
    automatic bit started = 0;
    cycles = 0;
    foreach (img[i]) begin
      @(negedge clk); in_valid[d] = 0;
      if (gaps) while ($urandom_range(3) == 0) @(negedge clk);
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
    int cyc [NI];
    coef_we = 0; coef_addr = 0; coef_wdata = 0; in_valid = 0;
    foreach (in_data[d]) in_data[d] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      automatic bit gaps = (f % 2 == 1);
      cur_f = f;
      img.delete(); kern.delete();
      for (int i = 0; i < 25; i++) begin
        // frames 4,5 use large kernels so that saturation happens
        automatic longint c = (f >= 4) ? longint'($urandom_range(4096)) : longint'($signed(16'($urandom))) >>> 4;
        kern.push_back(c);
        @(negedge clk);
        coef_we = 1; coef_addr = 5'(i); coef_wdata = coef_t'(c);
      end
      @(negedge clk); coef_we = 0;
      for (int i = 0; i < W * H; i++)
        img.push_back((f >= 4) ? longint'($urandom_range(32767)) : longint'($signed(16'($urandom))) >>> 2);
      for (int d = 0; d < NI; d++) begin
        automatic vec_t kd;
        for (int r = 0; r < KK[d]; r++) for (int c = 0; c < KK[d]; c++) kd.push_back(kern[r * KK[d] + c]);
        expq[d] = layer(img, H, W, kd, KK[d], SS[d], PP[d]);
      end
      fork
        drive(0, gaps, cyc[0]);
        drive(1, gaps, cyc[1]);
        drive(2, gaps, cyc[2]);
      join
      // the trailing border of a padded frame is sent without input
      repeat (3 * (W + 4) + 8) @(negedge clk);
      for (int d = 0; d < NI; d++) begin
        checks++;
        if (expq[d].size() != 0) begin
          failures++; $display("FAIL frame %0d layer %0d: %0d outputs missing", f, d, expq[d].size());
        end
        if (!gaps) begin
          // rows of the frame plus the side borders between them
          automatic int e = (H - 1) * (W + 2 * PP[d]) + W;
          checks++;
          if (cyc[d] != e) begin failures++; $display("FAIL layer %0d frame took %0d cycles, exp %0d", d, cyc[d], e); end
        end
      end
    end
    checks++;
    if (n_clip == 0 || n_sat == 0 || n_stall == 0) begin
      failures++; $display("FAIL clip=%0d sat=%0d stall=%0d", n_clip, n_sat, n_stall);
    end
    $display("events: clip %0d, saturate %0d, padding stalls %0d", n_clip, n_sat, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
