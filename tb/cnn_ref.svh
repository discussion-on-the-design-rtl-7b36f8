// cnn_ref.svh: plain integer reference model of the classifier's arithmetic,
// included inside the testbench modules. Maps are flattened row-major into queues.
//   conv2d  : out(i,j) = sum_{a,b=-K/2..K/2} in(ci-a, cj-b) * w(K/2+a, K/2+b),
//             (ci,cj) the window centre; stride s, p rows/columns of zeros
//             added on every side first.
//   act     : floor(x / 2^8) clamped to [0, 32767].
//   pool2   : 2x2 stride-2 maximum, odd last row/column dropped.
  typedef longint vec_t[$];

  function automatic vec_t pad(vec_t img, int h, int w, int p);
    vec_t o;
    for (int r = -p; r < h + p; r++)
      for (int c = -p; c < w + p; c++)
        o.push_back((r < 0 || r >= h || c < 0 || c >= w) ? 0 : img[r * w + c]);
    return o;
  endfunction

  function automatic vec_t conv2d(vec_t img_in, int h_in, int w_in, vec_t kern, int k, int s, int p);
    vec_t o;
    vec_t img = pad(img_in, h_in, w_in, p);
    int h = h_in + 2 * p, w = w_in + 2 * p;
    int oh = (h - k) / s + 1, ow = (w - k) / s + 1;
    int hk = k / 2;
    for (int i = 0; i < oh; i++)
      for (int j = 0; j < ow; j++) begin
        longint acc = 0;
        int ci = i * s + hk, cj = j * s + hk;
        for (int a = -hk; a <= hk; a++)
          for (int b = -hk; b <= hk; b++)
            acc += img[(ci - a) * w + (cj - b)] * kern[(hk + a) * k + (hk + b)];
        o.push_back(acc);
      end
    return o;
  endfunction

  function automatic longint act(longint x);
    longint q = x >>> 8;
    if (q < 0) return 0;
    if (q > 32767) return 32767;
    return q;
  endfunction

  function automatic vec_t act_map(vec_t m);
    vec_t o;
    foreach (m[i]) o.push_back(act(m[i]));
    return o;
  endfunction

  function automatic vec_t pool2(vec_t m, int h, int w);
    vec_t o;
    for (int r = 0; r + 1 < h; r += 2)
      for (int c = 0; c + 1 < w; c += 2) begin
        longint mx = m[r * w + c];
        if (m[r * w + c + 1] > mx) mx = m[r * w + c + 1];
        if (m[(r + 1) * w + c] > mx) mx = m[(r + 1) * w + c];
        if (m[(r + 1) * w + c + 1] > mx) mx = m[(r + 1) * w + c + 1];
        o.push_back(mx);
      end
    return o;
  endfunction

  // One convolutional layer: convolution, activation, pooling.
  function automatic vec_t layer(vec_t img, int h, int w, vec_t kern, int k, int s, int p);
    int oh = (h + 2 * p - k) / s + 1, ow = (w + 2 * p - k) / s + 1;
    return pool2(act_map(conv2d(img, h, w, kern, k, s, p)), oh, ow);
  endfunction

  // Side of the map after one layer.
  function automatic int layer_dim(int d, int k, int s, int p);
    return ((d + 2 * p - k) / s + 1) / 2;
  endfunction

