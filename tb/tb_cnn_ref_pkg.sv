// tb_cnn_ref_pkg: bit-accurate reference model of the quantised network,
// written from the arithmetic rules and independent of the RTL structure.
//
// Values are held as plain integers scaled by their fixed-point format:
// an n-bit value with m integer bits has n-m-1 fraction bits. A product is
// exact; it is rescaled to the 2n-bit accumulator format of the layer
// (2n-m_out-1 fraction bits) by floor division or by multiplication with
// clamping; every addition is clamped to the 2n-bit range; the final 2n-bit
// sum keeps its top n bits (floor division by 2^n). Window sums use the
// pairing ((p0+p1)+(p2+p3))+((p4+p5)+(p6+p7))+p8, and a neuron of a fully
// connected layer adds its window sums to the bias in input order.
// The parameter set is drawn with $urandom from a seed.
package tb_cnn_ref_pkg;

  class cnn_model;
    int n;
    int m_in = 0, m_w = 1, m_c1 = 4, m_c2 = 5, m_f1 = 6, m_f2 = 8;
    int img   [28][28];
    int c1w   [2][9];   int c1b [2];
    int c2w   [4][9];   int c2b [4];
    int f1w   [20][144]; int f1b [20];
    int f2w   [10][20];  int f2b [10];
    int pool1 [2][14][14];
    int pool2 [4][6][6];
    int fc1   [20];
    int fc2   [10];
    int cls;
    int n_relu_clip = 0, n_pad = 0, n_clamp = 0;   // events seen by the model

    function new(int bits);
      n = bits;
    endfunction

    function longint clamp(longint v, int w);
      longint hi, lo;
      hi = (longint'(1) <<< (w - 1)) - 1;
      lo = -(longint'(1) <<< (w - 1));
      if (v > hi) begin n_clamp++; return hi; end
      if (v < lo) begin n_clamp++; return lo; end
      return v;
    endfunction

    // floor(v * 2^(to_frac - from_frac)) clamped to 2n bits
    function longint rescale(longint v, int from_frac, int to_frac);
      longint r;
      if (to_frac >= from_frac) r = clamp(v * (longint'(1) <<< (to_frac - from_frac)), 2 * n);
      else r = v >>> (from_frac - to_frac);
      return r;
    endfunction

    function longint add(longint a, longint b);
      return clamp(a + b, 2 * n);
    endfunction

    function longint tree9(longint p[9]);
      return add(add(add(add(p[0], p[1]), add(p[2], p[3])),
                     add(add(p[4], p[5]), add(p[6], p[7]))), p[8]);
    endfunction

    function longint window(int x[9], int w[9], int m_i, int m_o);
      longint p[9];
      int pf, af;
      pf = (n - 1 - m_i) + (n - 1 - m_w);
      af = 2 * n - 1 - m_o;
      for (int k = 0; k < 9; k++) p[k] = rescale(longint'(x[k]) * longint'(w[k]), pf, af);
      return tree9(p);
    endfunction

    function longint bias2n(int b, int m_o);
      return rescale(longint'(b), n - 1 - m_w, 2 * n - 1 - m_o);
    endfunction

    function int to_n(longint acc);
      return int'(acc >>> n);
    endfunction

    function int relu(int v);
      if (v < 0) n_relu_clip++;
      return (v < 0) ? 0 : v;
    endfunction

    function int rnd(int lo, int hi); // uniform in [lo, hi]
      return lo + int'($urandom % (hi - lo + 1));
    endfunction

    // random image with a bright blob and random weights of about +-0.6
    function void randomize_all();
      int one, wr, br;
      one = (1 << (n - 1)) - 1;            // largest pixel code (m = 0)
      wr  = 1 << (n - 3);                  // 0.5 in weight format (m = 1)
      br  = 1 << (n - 5);                  // 0.125
      for (int r = 0; r < 28; r++)
        for (int c = 0; c < 28; c++)
          img[r][c] = (r > 5 && r < 22 && c > 8 && c < 20 && ($urandom % 3 != 0)) ? rnd(one / 2, one)
                                                                                  : (($urandom % 8 == 0) ? rnd(0, one) : 0);
      for (int f = 0; f < 2; f++) begin
        c1b[f] = rnd(-br, br);
        for (int k = 0; k < 9; k++) c1w[f][k] = rnd(-wr, wr + wr / 4);
      end
      for (int f = 0; f < 4; f++) begin
        c2b[f] = rnd(-br, br);
        for (int k = 0; k < 9; k++) c2w[f][k] = rnd(-wr, wr + wr / 4);
      end
      for (int j = 0; j < 20; j++) begin
        f1b[j] = rnd(-br, br);
        for (int i = 0; i < 144; i++) f1w[j][i] = rnd(-wr / 2, wr / 2);
      end
      for (int j = 0; j < 10; j++) begin
        f2b[j] = rnd(-br, br);
        for (int i = 0; i < 20; i++) f2w[j][i] = rnd(-wr, wr);
      end
    endfunction

    function void run();
      int x[9];
      int conv1 [2][28][28];
      int conv2 [4][12][12];
      longint acc;
      int best;
      // conv1: zero padded
      for (int f = 0; f < 2; f++)
        for (int r = 0; r < 28; r++)
          for (int c = 0; c < 28; c++) begin
            for (int k = 0; k < 9; k++) begin
              int rr, cc;
              rr = r + k / 3 - 1;
              cc = c + k % 3 - 1;
              if (rr < 0 || rr > 27 || cc < 0 || cc > 27) n_pad++;
              x[k] = (rr < 0 || rr > 27 || cc < 0 || cc > 27) ? 0 : img[rr][cc];
            end
            acc = add(bias2n(c1b[f], m_c1), window(x, c1w[f], m_in, m_c1));
            conv1[f][r][c] = relu(to_n(acc));
          end
      for (int f = 0; f < 2; f++)
        for (int r = 0; r < 14; r++)
          for (int c = 0; c < 14; c++) begin
            best = conv1[f][2*r][2*c];
            if (conv1[f][2*r][2*c+1]   > best) best = conv1[f][2*r][2*c+1];
            if (conv1[f][2*r+1][2*c]   > best) best = conv1[f][2*r+1][2*c];
            if (conv1[f][2*r+1][2*c+1] > best) best = conv1[f][2*r+1][2*c+1];
            pool1[f][r][c] = best;
          end
      // conv2: filter f reads pooled map f/2, unpadded
      for (int f = 0; f < 4; f++)
        for (int r = 0; r < 12; r++)
          for (int c = 0; c < 12; c++) begin
            for (int k = 0; k < 9; k++) x[k] = pool1[f / 2][r + k / 3][c + k % 3];
            acc = add(bias2n(c2b[f], m_c2), window(x, c2w[f], m_c1, m_c2));
            conv2[f][r][c] = relu(to_n(acc));
          end
      for (int f = 0; f < 4; f++)
        for (int r = 0; r < 6; r++)
          for (int c = 0; c < 6; c++) begin
            best = conv2[f][2*r][2*c];
            if (conv2[f][2*r][2*c+1]   > best) best = conv2[f][2*r][2*c+1];
            if (conv2[f][2*r+1][2*c]   > best) best = conv2[f][2*r+1][2*c];
            if (conv2[f][2*r+1][2*c+1] > best) best = conv2[f][2*r+1][2*c+1];
            pool2[f][r][c] = best;
          end
      // fc1: inputs in (map, row, column) order, nine at a time
      for (int j = 0; j < 20; j++) begin
        int w9[9];
        acc = bias2n(f1b[j], m_f1);
        for (int g = 0; g < 16; g++) begin
          for (int k = 0; k < 9; k++) begin
            int i;
            i = 9 * g + k;
            x[k]  = pool2[i / 36][(i % 36) / 6][i % 6];
            w9[k] = f1w[j][i];
          end
          acc = add(acc, window(x, w9, m_c2, m_f1));
        end
        fc1[j] = relu(to_n(acc));
      end
      // fc2: 20 inputs padded to 27 with zeros, no activation
      for (int j = 0; j < 10; j++) begin
        int w9[9];
        acc = bias2n(f2b[j], m_f2);
        for (int g = 0; g < 3; g++) begin
          for (int k = 0; k < 9; k++) begin
            int i;
            i = 9 * g + k;
            x[k]  = (i < 20) ? fc1[i] : 0;
            w9[k] = (i < 20) ? f2w[j][i] : 0;
          end
          acc = add(acc, window(x, w9, m_f1, m_f2));
        end
        fc2[j] = to_n(acc);
      end
      cls = 0;
      for (int j = 1; j < 10; j++) if (fc2[j] > fc2[cls]) cls = j;
    endfunction
  endclass

endpackage
