// tb_cnn_top: end-to-end test of the classifier at its default size
// (28x28 image, two 3x3 layers with padding 1, 49 features, 10 classes).
//
// Loads random kernels, FC weights and biases, streams five random images
// (the first two back to back, the rest with random idle cycles, kernels
// reloaded between some frames) and compares, frame by frame, the final
// feature stream, the ten scores, the chosen class, the SoftMax
// probabilities and each layer's feature variance with the integer model.
// The image is sent through the valid/ready handshake. It counts how often
// each mechanism happened (ReLU clipping in each layer, ReLU saturation,
// input stalls for padding, back-to-back frames, classification, SoftMax,
// variance results in each layer)
// and fails any that never did. It also reports how often the inter-layer
// FIFO had to hold a value back while the second layer sent border zeros
// (at the default sizes the pooled stream is sparse enough that it never
// does; the FIFO is a guard for other shapes).
// It also checks that each class appears after the previous frame's last
// pixel and no later than CLS_LAT cycles after its own frame's last pixel
// (the last rows of a map that pooling drops never delay the result).
module tb_cnn_top;
  import cnn_pkg::*;
  `include "cnn_ref.svh"

  localparam int IW = 28, IH = 28, NL = 2, K = 3, S = 1, P = 1, NC = 10;
  localparam int NF = map_dim(IW, NL, K, S, P) * map_dim(IH, NL, K, S, P);
  localparam int LYW = (NL > 1) ? $clog2(NL) : 1;
  localparam int FAW = $clog2(NF);
  localparam int MAX_LAT = 500;   // idle cycles after a frame (SoftMax takes 432)
  localparam int CLS_LAT = 80;    // class no later than this after the frame's last pixel

  logic  clk = 0, rst_n = 0;
  logic  coef_we, fcw_we, fcb_we, pix_valid, pix_ready;
  logic [LYW-1:0] coef_layer;
  logic [3:0] coef_addr, fcw_class, fcb_class;
  logic [FAW-1:0] fcw_addr;
  coef_t coef_wdata, fcw_data, fcb_data;
  data_t pix_data;
  logic  feat_valid, logits_valid, class_valid, prob_valid;
  logic [NL-1:0] var_valid;
  logic [15:0] prob [NC];
  data_t feat_data;
  acc_t  logits [NC];
  logic [3:0] class_idx;
  acc_t  class_score;
  logic signed [47:0] var_value [NL];
  logic [NL-1:0] clip_evt, sat_evt;

  cnn_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_clip [NL];
  int n_sat = 0, n_class = 0, n_b2b = 0;
  int n_var [NL];
  int n_stall = 0, n_fifo2 = 0, n_prob = 0;
  int cycle = 0;
  int frame_end [$], class_at [$];
  vec_t kerns [NL], fcw [NC], fcb;
  vec_t exp_feat;
  // expected results of frames in flight
  longint exp_logits [$][NC];
  int     exp_class [$];
  longint exp_prob [$][NC];
  longint exp_var [NL][$];

  always @(posedge clk) cycle++;

  always @(negedge clk) if (rst_n) begin
    for (int l = 0; l < NL; l++) begin
      n_clip[l] += int'(clip_evt[l]);
      n_sat     += int'(sat_evt[l]);
    end
    n_stall += int'(pix_valid && !pix_ready);
    n_fifo2 += int'(dut.g_layer[0].g_link.u_fifo.out_valid && !dut.g_layer[0].g_link.u_fifo.out_ready);
    if (prob_valid) begin
      n_prob++;
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (longint'(prob[c]) != exp_prob[0][c]) begin
          failures++; $display("FAIL probability %0d got %0d exp %0d", c, prob[c], exp_prob[0][c]);
        end
      end
      void'(exp_prob.pop_front());
    end
    if (feat_valid) begin
      checks++;
      if (exp_feat.size() == 0) begin failures++; $display("FAIL unexpected feature"); end
      else begin
        automatic longint e = exp_feat.pop_front();
        if (longint'(feat_data) != e) begin failures++; $display("FAIL feature got %0d exp %0d", feat_data, e); end
      end
    end
    if (logits_valid) begin
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (longint'(logits[c]) != exp_logits[0][c]) begin
          failures++; $display("FAIL score %0d got %0d exp %0d", c, logits[c], exp_logits[0][c]);
        end
      end
      void'(exp_logits.pop_front());
    end
    if (class_valid) begin
      n_class++;
      checks += 2;
      if (int'(class_idx) != exp_class[0]) begin failures++; $display("FAIL class got %0d exp %0d", class_idx, exp_class[0]); end
      class_at.push_back(cycle);
      void'(exp_class.pop_front());
    end
    for (int l = 0; l < NL; l++) if (var_valid[l]) begin
      n_var[l]++;
      checks++;
      if (exp_var[l].size() == 0) begin failures++; $display("FAIL unexpected variance in layer %0d", l + 1); end
      else begin
        if (longint'(var_value[l]) != exp_var[l][0]) begin
          failures++; $display("FAIL layer %0d variance got %0d exp %0d", l + 1, var_value[l], exp_var[l][0]);
        end
        void'(exp_var[l].pop_front());
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_kernels(input bit big);
    for (int l = 0; l < NL; l++) begin
      kerns[l].delete();
      for (int i = 0; i < K * K; i++) begin
        automatic longint c = big ? longint'($urandom_range(1024)) : (longint'($signed(16'($urandom))) >>> 6);
        kerns[l].push_back(c);
        @(negedge clk);
        coef_we = 1; coef_layer = LYW'(l); coef_addr = 4'(i); coef_wdata = coef_t'(c);
      end
    end
    @(negedge clk); coef_we = 0;
  endtask

  task automatic load_fc();
    fcb.delete();
    for (int c = 0; c < NC; c++) begin
      fcw[c].delete();
      for (int i = 0; i < NF; i++) begin
        automatic longint w = longint'($signed(16'($urandom))) >>> 4;
        fcw[c].push_back(w);
        @(negedge clk);
        fcw_we = 1; fcw_class = 4'(c); fcw_addr = FAW'(i); fcw_data = coef_t'(w);
      end
      fcb.push_back(longint'($signed(16'($urandom))) >>> 2);
      @(negedge clk); fcw_we = 0;
      fcb_we = 1; fcb_class = 4'(c); fcb_data = coef_t'(fcb[c]);
    end
    @(negedge clk); fcb_we = 0;
  endtask

  // Work out the expected results of one image.
  task automatic expect_frame(input vec_t img);
    automatic vec_t f = img;
    automatic int h = IH, w = IW;
    automatic longint ex [NC];
    automatic longint esum = 0;
    automatic longint pr [NC];
    automatic longint lg [NC];
    automatic int best = 0;
    for (int l = 0; l < NL; l++) begin
      automatic longint s = 0, mu, ss = 0;
      f = layer(f, h, w, kerns[l], K, S, P);
      h = layer_dim(h, K, S, P);
      w = layer_dim(w, K, S, P);
      // variance of the layer's pooled map about its mean
      foreach (f[i]) s += f[i];
      mu = s / (h * w);
      foreach (f[i]) ss += (f[i] - mu) * (f[i] - mu);
      exp_var[l].push_back(ss / (h * w - 1));
    end
    foreach (f[i]) exp_feat.push_back(f[i]);
    for (int c = 0; c < NC; c++) begin
      lg[c] = fcb[c] <<< 8;
      foreach (f[i]) lg[c] += f[i] * fcw[c][i];
      if (lg[c] > lg[best]) best = c;
    end
    exp_logits.push_back(lg);
    // SoftMax: 2^-(d*log2 e) with the quadratic fraction, then normalise
    for (int c = 0; c < NC; c++) begin
      automatic longint t = ((lg[best] - lg[c]) * 47274) / 32768;
      automatic longint n = t / 65536, fr = t % 65536;
      automatic longint g = 65536 - (fr * 44012) / 65536 + (((fr * fr) / 65536) * 11244) / 65536;
      ex[c] = (n >= 17) ? 0 : g / (longint'(1) << n);
      esum += ex[c];
    end
    for (int c = 0; c < NC; c++) begin
      pr[c] = (ex[c] * 65536) / esum;
      if (pr[c] > 65535) pr[c] = 65535;
    end
    exp_prob.push_back(pr);
    exp_class.push_back(best);
  endtask

  task automatic send_frame(input bit gaps, input bit bright);
    automatic vec_t img;
    for (int i = 0; i < IW * IH; i++)
      img.push_back(bright ? longint'($urandom_range(32767)) : (longint'($signed(16'($urandom))) >>> 3));
    expect_frame(img);
    foreach (img[i]) begin
      automatic bit rdy;
      @(negedge clk); pix_valid = 0;
      if (gaps) while ($urandom_range(4) == 0) @(negedge clk);
      pix_valid = 1; pix_data = data_t'(img[i]);
      // pix_ready is read at the falling edge, where it is stable
      forever begin
        rdy = pix_ready;
        @(posedge clk);
        if (rdy) break;
        @(negedge clk);
      end
    end
    frame_end.push_back(cycle);
  endtask

  initial begin
    foreach (n_clip[l]) n_clip[l] = 0;
    foreach (n_var[l]) n_var[l] = 0;
    coef_we = 0; coef_layer = 0; coef_addr = 0; coef_wdata = 0;
    fcw_we = 0; fcw_class = 0; fcw_addr = 0; fcw_data = 0;
    fcb_we = 0; fcb_class = 0; fcb_data = 0; pix_valid = 0; pix_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_kernels(0);
    load_fc();
    // two frames back to back: the second's first pixel follows the first's last
    send_frame(0, 0);
    send_frame(0, 0);
    n_b2b++;
    @(negedge clk); pix_valid = 0;
    repeat (MAX_LAT) @(negedge clk);
    send_frame(1, 0);
    @(negedge clk); pix_valid = 0;
    repeat (MAX_LAT) @(negedge clk);
    load_kernels(1);             // large positive kernels: the activation saturates
    send_frame(1, 1);
    @(negedge clk); pix_valid = 0;
    repeat (MAX_LAT) @(negedge clk);
    load_kernels(0);
    send_frame(1, 0);
    @(negedge clk); pix_valid = 0;
    repeat (MAX_LAT) @(negedge clk);

    checks++;
    if (exp_feat.size() != 0 || exp_class.size() != 0 || exp_var[NL-1].size() != 0 || exp_prob.size() != 0) begin
      failures++; $display("FAIL results missing: %0d features, %0d classes, %0d variances, %0d SoftMax", exp_feat.size(), exp_class.size(), exp_var[NL-1].size(), exp_prob.size());
    end
    foreach (n_clip[l]) $display("mechanisms: layer %0d: relu clip %0d, variance results %0d", l + 1, n_clip[l], n_var[l]);
    $display("mechanisms: relu saturate %0d, padding stalls %0d, fifo held a value during padding %0d, back-to-back frames %0d, classifications %0d, softmax %0d",
             n_sat, n_stall, n_fifo2, n_b2b, n_class, n_prob);
    foreach (class_at[i]) $display("frame %0d: class %0d cycles after its last pixel", i, class_at[i] - frame_end[i]);
    foreach (class_at[i]) begin
      checks++;
      if (class_at[i] > frame_end[i] + CLS_LAT || (i > 0 && class_at[i] <= frame_end[i-1])) begin
        failures++; $display("FAIL frame %0d: class at cycle %0d, frame ended at %0d", i, class_at[i], frame_end[i]);
      end
    end
    checks += 5 + 2 * NL;
    if (n_stall == 0) begin failures++; $display("FAIL padding never stalled the input"); end
    if (n_prob != 5)  begin failures++; $display("FAIL %0d SoftMax results, expected 5", n_prob); end
    foreach (n_clip[l]) if (n_clip[l] == 0) begin failures++; $display("FAIL layer-%0d clipping never happened", l + 1); end
    if (n_sat == 0)   begin failures++; $display("FAIL saturation never happened"); end
    if (n_b2b == 0)   begin failures++; $display("FAIL no back-to-back frames"); end
    if (n_class != 5) begin failures++; $display("FAIL %0d classifications, expected 5", n_class); end
    foreach (n_var[l]) if (n_var[l] != 5) begin failures++; $display("FAIL layer %0d: %0d variance results, expected 5", l + 1, n_var[l]); end
    foreach (exp_var[l]) begin
      checks++;
      if (exp_var[l].size() != 0) begin failures++; $display("FAIL layer %0d: %0d variances missing", l + 1, exp_var[l].size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
