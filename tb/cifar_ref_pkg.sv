// cifar_ref_pkg: bit-accurate reference model of the CifarNet accelerator for
// its testbench. Generates random Q8.8 weights and 24x24x3 images, serialises
// the weights into the accelerator's input stream order for a given
// parallelism, and computes the scores and label with plain nested loops:
// 5x5 convolution with zero padding 2, 2x2/2 max-pool + ReLU, a stand-in for
// each normalization layer, and three fully connected layers, with the same
// requantisation (floor shift by 8 bits, saturation to 16 bits) as the RTL.
// The normalization stand-in (halving every value, an arithmetic shift right
// by one) is the testbench's own placeholder, since the real normalization is
// outside the accelerator; the testbench applies the same function on the
// accelerator's normalization ports.
package cifar_ref_pkg;

  typedef logic signed [15:0] d16;
  typedef logic signed [47:0] a48;

  // loop bounds held in variables so the model is not unrolled at compile time
  int n2 = 2, n3 = 3, n5 = 5, n6 = 6, n10 = 10, n12 = 12, n24 = 24, n32 = 32,
      n48 = 48, n192 = 192, n1152 = 1152;

  d16 k1 [32][3][5][5];
  d16 b1 [32];
  d16 k2 [32][32][5][5];
  d16 b2 [32];
  d16 w1 [192][1152];
  d16 bf1 [192];
  d16 w2 [48][192];
  d16 bf2 [48];
  d16 w3 [10][48];
  d16 bf3 [10];

  function automatic d16 rq(a48 acc);
    a48 s;
    s = acc >>> 8;
    if (s > 48'sd32767) return 16'sh7fff;
    if (s < -48'sd32768) return 16'sh8000;
    return d16'(s);
  endfunction

  function automatic d16 norm(d16 v);
    return v >>> 1;
  endfunction

  // uniform random value in [-range, range)
  function automatic d16 rnd(int range);
    return d16'(int'($urandom_range(2 * range - 1, 0)) - range);
  endfunction

  function automatic void gen_weights();
    foreach (k1[a, b, c, d]) k1[a][b][c][d] = rnd(64);
    foreach (b1[a]) b1[a] = rnd(64);
    foreach (k2[a, b, c, d]) k2[a][b][c][d] = rnd(24);
    foreach (b2[a]) b2[a] = rnd(64);
    foreach (w1[a, b]) w1[a][b] = rnd(16);
    foreach (bf1[a]) bf1[a] = rnd(64);
    foreach (w2[a, b]) w2[a][b] = rnd(40);
    foreach (bf2[a]) bf2[a] = rnd(64);
    foreach (w3[a, b]) w3[a][b] = rnd(64);
    foreach (bf3[a]) bf3[a] = rnd(64);
  endfunction

  // pixels in [0, 1) as Q8.8
  function automatic void gen_image(ref d16 img [24][24][3]);
    for (int i = 0; i < n24; i++)
      for (int j = 0; j < n24; j++)
        for (int c = 0; c < n3; c++) img[i][j][c] = d16'($urandom_range(255, 0));
  endfunction

  // weight stream in bank order for the given parallelism
  function automatic void weight_stream(ref logic [15:0] q[$], input int c1p, input int c2p,
                                        input int f1p, input int f2p, input int f3p);
    q.delete();
    for (int a = 0; a < 25 * (3 / c1p); a++)
      for (int l = 0; l < 32 * c1p; l++) begin
        int g, hw;
        g = a % (3 / c1p); hw = a / (3 / c1p);
        q.push_back(k1[l / c1p][g * c1p + l % c1p][hw / 5][hw % 5]);
      end
    for (int l = 0; l < 32; l++) q.push_back(b1[l]);
    for (int a = 0; a < 25 * (32 / c2p); a++)
      for (int l = 0; l < 32 * c2p; l++) begin
        int g, hw;
        g = a % (32 / c2p); hw = a / (32 / c2p);
        q.push_back(k2[l / c2p][g * c2p + l % c2p][hw / 5][hw % 5]);
      end
    for (int l = 0; l < 32; l++) q.push_back(b2[l]);
    for (int a = 0; a < (192 / f1p) * 1152; a++)
      for (int l = 0; l < f1p; l++) q.push_back(w1[(a / 1152) * f1p + l][a % 1152]);
    for (int l = 0; l < 192; l++) q.push_back(bf1[l]);
    for (int a = 0; a < (48 / f2p) * 192; a++)
      for (int l = 0; l < f2p; l++) q.push_back(w2[(a / 192) * f2p + l][a % 192]);
    for (int l = 0; l < 48; l++) q.push_back(bf2[l]);
    for (int a = 0; a < (10 / f3p) * 48; a++)
      for (int l = 0; l < f3p; l++) q.push_back(w3[(a / 48) * f3p + l][a % 48]);
    for (int l = 0; l < 10; l++) q.push_back(bf3[l]);
  endfunction

  // forward pass: scores of fc3 and the label
  function automatic int forward(const ref d16 img [24][24][3], ref d16 scores [10]);
    d16 c1 [32][24][24];
    d16 p1 [32][12][12];
    d16 c2 [32][12][12];
    d16 v1 [1152];
    d16 h1 [192];
    d16 h2 [48];
    a48 acc;
    int best;
    for (int co = 0; co < n32; co++)
      for (int x = 0; x < n24; x++)
        for (int y = 0; y < n24; y++) begin
          acc = a48'(b1[co]) <<< 8;
          for (int ci = 0; ci < n3; ci++)
            for (int h = 0; h < n5; h++)
              for (int w = 0; w < n5; w++) begin
                int m, n;
                m = x + h - 2; n = y + w - 2;
                if (m >= 0 && m < n24 && n >= 0 && n < n24)
                  acc += a48'(int'(k1[co][ci][h][w]) * int'(img[m][n][ci]));
              end
          c1[co][x][y] = rq(acc);
        end
    for (int c = 0; c < n32; c++)
      for (int x = 0; x < n12; x++)
        for (int y = 0; y < n12; y++) begin
          d16 mx;
          mx = c1[c][2 * x][2 * y];
          for (int h = 0; h < n2; h++)
            for (int w = 0; w < n2; w++) if (c1[c][2 * x + h][2 * y + w] > mx) mx = c1[c][2 * x + h][2 * y + w];
          p1[c][x][y] = norm((mx > 0) ? mx : 16'sd0);
        end
    for (int co = 0; co < n32; co++)
      for (int x = 0; x < n12; x++)
        for (int y = 0; y < n12; y++) begin
          acc = a48'(b2[co]) <<< 8;
          for (int ci = 0; ci < n32; ci++)
            for (int h = 0; h < n5; h++)
              for (int w = 0; w < n5; w++) begin
                int m, n;
                m = x + h - 2; n = y + w - 2;
                if (m >= 0 && m < n12 && n >= 0 && n < n12)
                  acc += a48'(int'(k2[co][ci][h][w]) * int'(p1[ci][m][n]));
              end
          c2[co][x][y] = rq(acc);
        end
    for (int c = 0; c < n32; c++)
      for (int x = 0; x < n6; x++)
        for (int y = 0; y < n6; y++) begin
          d16 mx;
          mx = c2[c][2 * x][2 * y];
          for (int h = 0; h < n2; h++)
            for (int w = 0; w < n2; w++) if (c2[c][2 * x + h][2 * y + w] > mx) mx = c2[c][2 * x + h][2 * y + w];
          v1[(x * 6 + y) * 32 + c] = norm((mx > 0) ? mx : 16'sd0);
        end
    for (int o = 0; o < n192; o++) begin
      d16 r;
      acc = a48'(bf1[o]) <<< 8;
      for (int i = 0; i < n1152; i++) acc += a48'(int'(w1[o][i]) * int'(v1[i]));
      r = rq(acc);
      h1[o] = (r > 0) ? r : 16'sd0;
    end
    for (int o = 0; o < n48; o++) begin
      d16 r;
      acc = a48'(bf2[o]) <<< 8;
      for (int i = 0; i < n192; i++) acc += a48'(int'(w2[o][i]) * int'(h1[i]));
      r = rq(acc);
      h2[o] = (r > 0) ? r : 16'sd0;
    end
    best = 0;
    for (int o = 0; o < n10; o++) begin
      acc = a48'(bf3[o]) <<< 8;
      for (int i = 0; i < n48; i++) acc += a48'(int'(w3[o][i]) * int'(h2[i]));
      scores[o] = rq(acc);
      if (scores[o] > scores[best]) best = o;
    end
    return best;
  endfunction

endpackage
