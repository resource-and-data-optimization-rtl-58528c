// lenet_ref_pkg: bit-accurate reference model of the LeNet accelerator for
// the testbenches. Generates random Q8.8 weights and images, serialises the
// weights into the accelerator's input stream order for a given parallelism,
// and computes the scores and label of an image with plain nested loops
// (convolution, max-pool + ReLU, fully connected), using the same
// requantisation (floor shift by 8 bits, saturation to 16 bits) as the RTL.
package lenet_ref_pkg;

  typedef logic signed [15:0] d16;
  typedef logic signed [47:0] a48;

  // loop bounds held in variables so the model is not unrolled at compile time
  int n2 = 2, n4 = 4, n5 = 5, n8 = 8, n10 = 10, n12 = 12, n16 = 16, n24 = 24, n128 = 128, n256 = 256;

  d16 k1 [8][1][5][5];
  d16 b1 [8];
  d16 k2 [16][8][5][5];
  d16 b2 [16];
  d16 w1 [128][256];
  d16 bf1 [128];
  d16 w2 [10][128];
  d16 bf2 [10];

  function automatic d16 rq(a48 acc);
    a48 s;
    s = acc >>> 8;
    if (s > 48'sd32767) return 16'sh7fff;
    if (s < -48'sd32768) return 16'sh8000;
    return d16'(s);
  endfunction

  // uniform random value in [-range, range)
  function automatic d16 rnd(int range);
    return d16'(int'($urandom_range(2 * range - 1, 0)) - range);
  endfunction

  function automatic void gen_weights();
    foreach (k1[a, b, c, d]) k1[a][b][c][d] = rnd(96);
    foreach (b1[a]) b1[a] = rnd(64);
    foreach (k2[a, b, c, d]) k2[a][b][c][d] = rnd(40);
    foreach (b2[a]) b2[a] = rnd(64);
    foreach (w1[a, b]) w1[a][b] = rnd(24);
    foreach (bf1[a]) bf1[a] = rnd(64);
    foreach (w2[a, b]) w2[a][b] = rnd(48);
    foreach (bf2[a]) bf2[a] = rnd(64);
  endfunction

  // pixels in [0, 1) as Q8.8
  function automatic void gen_image(ref d16 img [28][28]);
    for (int i = 0; i < n24 + 4; i++)
      for (int j = 0; j < n24 + 4; j++) img[i][j] = d16'($urandom_range(255, 0));
  endfunction

  // weight stream in bank order for the given parallelism
  function automatic void weight_stream(ref logic [15:0] q[$], input int c1p, input int c2p,
                                        input int f1p, input int f2p);
    q.delete();
    for (int a = 0; a < 25 * (1 / c1p); a++)
      for (int l = 0; l < 8 * c1p; l++) begin
        int g, hw;
        g = a % (1 / c1p); hw = a / (1 / c1p);
        q.push_back(k1[l / c1p][g * c1p + l % c1p][hw / 5][hw % 5]);
      end
    for (int l = 0; l < 8; l++) q.push_back(b1[l]);
    for (int a = 0; a < 25 * (8 / c2p); a++)
      for (int l = 0; l < 16 * c2p; l++) begin
        int g, hw;
        g = a % (8 / c2p); hw = a / (8 / c2p);
        q.push_back(k2[l / c2p][g * c2p + l % c2p][hw / 5][hw % 5]);
      end
    for (int l = 0; l < 16; l++) q.push_back(b2[l]);
    for (int a = 0; a < (128 / f1p) * 256; a++)
      for (int l = 0; l < f1p; l++) q.push_back(w1[(a / 256) * f1p + l][a % 256]);
    for (int l = 0; l < 128; l++) q.push_back(bf1[l]);
    for (int a = 0; a < (10 / f2p) * 128; a++)
      for (int l = 0; l < f2p; l++) q.push_back(w2[(a / 128) * f2p + l][a % 128]);
    for (int l = 0; l < 10; l++) q.push_back(bf2[l]);
  endfunction

  // forward pass: scores of fc2 and the label
  function automatic int forward(const ref d16 img [28][28], ref d16 scores [10]);
    d16 c1 [8][24][24];
    d16 p1 [8][12][12];
    d16 c2 [16][8][8];
    d16 p2 [16][4][4];
    d16 v1 [256];
    d16 h1 [128];
    a48 acc;
    int best;
    for (int co = 0; co < n8; co++)
      for (int x = 0; x < n24; x++)
        for (int y = 0; y < n24; y++) begin
          acc = a48'(b1[co]) <<< n8;
          for (int h = 0; h < n5; h++)
            for (int w = 0; w < n5; w++) acc += a48'(int'(k1[co][0][h][w]) * int'(img[x + h][y + w]));
          c1[co][x][y] = rq(acc);
        end
    for (int c = 0; c < n8; c++)
      for (int x = 0; x < n12; x++)
        for (int y = 0; y < n12; y++) begin
          d16 m;
          m = c1[c][2 * x][2 * y];
          for (int h = 0; h < n2; h++)
            for (int w = 0; w < n2; w++) if (c1[c][2 * x + h][2 * y + w] > m) m = c1[c][2 * x + h][2 * y + w];
          p1[c][x][y] = (m > 0) ? m : 16'sd0;
        end
    for (int co = 0; co < n16; co++)
      for (int x = 0; x < n8; x++)
        for (int y = 0; y < n8; y++) begin
          acc = a48'(b2[co]) <<< n8;
          for (int ci = 0; ci < n8; ci++)
            for (int h = 0; h < n5; h++)
              for (int w = 0; w < n5; w++) acc += a48'(int'(k2[co][ci][h][w]) * int'(p1[ci][x + h][y + w]));
          c2[co][x][y] = rq(acc);
        end
    for (int c = 0; c < n16; c++)
      for (int x = 0; x < n4; x++)
        for (int y = 0; y < n4; y++) begin
          d16 m;
          m = c2[c][2 * x][2 * y];
          for (int h = 0; h < n2; h++)
            for (int w = 0; w < n2; w++) if (c2[c][2 * x + h][2 * y + w] > m) m = c2[c][2 * x + h][2 * y + w];
          p2[c][x][y] = (m > 0) ? m : 16'sd0;
          v1[(x * 4 + y) * 16 + c] = p2[c][x][y];
        end
    for (int o = 0; o < n128; o++) begin
      d16 r;
      acc = a48'(bf1[o]) <<< n8;
      for (int i = 0; i < n256; i++) acc += a48'(int'(w1[o][i]) * int'(v1[i]));
      r = rq(acc);
      h1[o] = (r > 0) ? r : 16'sd0;
    end
    best = 0;
    for (int o = 0; o < n10; o++) begin
      acc = a48'(bf2[o]) <<< n8;
      for (int i = 0; i < n128; i++) acc += a48'(int'(w2[o][i]) * int'(h1[i]));
      scores[o] = rq(acc);
      if (scores[o] > scores[best]) best = o;
    end
    return best;
  endfunction

endpackage
