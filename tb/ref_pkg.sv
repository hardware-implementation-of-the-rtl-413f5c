// ref_pkg: plain sequential reference models of the six compression
// functions, used by the testbenches to compute expected results. They are
// written straight from the algorithm definitions, one operation at a time on
// word arrays, and share no code with the RTL. Word i of a packed vector is
// bits [32i+31:32i] (or [64i+63:64i]).
package ref_pkg;
  typedef logic [31:0] u32;
  typedef logic [63:0] u64;

  function automatic u32 rl(u32 x, int n);
    if (n == 0) return x;
    return (x << n) | (x >> (32 - n));
  endfunction
  function automatic u32 rr(u32 x, int n);
    return rl(x, (32 - n) % 32);
  endfunction
  function automatic u64 rl64(u64 x, int n);
    if (n == 0) return x;
    return (x << n) | (x >> (64 - n));
  endfunction

  // ------------------------------------------------------------ BMW-256
  function automatic u32 bs(int k, u32 x);
    u32 r;
    unique case (k)
      0: r = (x >> 1) ^ (x << 3) ^ rl(x, 4) ^ rl(x, 19);
      1: r = (x >> 1) ^ (x << 2) ^ rl(x, 8) ^ rl(x, 23);
      2: r = (x >> 2) ^ (x << 1) ^ rl(x, 12) ^ rl(x, 25);
      3: r = (x >> 2) ^ (x << 2) ^ rl(x, 15) ^ rl(x, 29);
      4: r = (x >> 1) ^ x;
      default: r = (x >> 2) ^ x;
    endcase
    return r;
  endfunction

  // Q_0..Q_31 (f0 and f1)
  function automatic logic [31:0][31:0] bmw_q(logic [15:0][31:0] m, logic [15:0][31:0] h);
    u32 d [16];
    u32 w [16];
    logic [31:0][31:0] q;
    for (int i = 0; i < 16; i++) d[i] = m[i] ^ h[i];
    w[0]  = d[5]  - d[7]  + d[10] + d[13] + d[14];
    w[1]  = d[6]  - d[8]  + d[11] + d[14] - d[15];
    w[2]  = d[0]  + d[7]  + d[9]  - d[12] + d[15];
    w[3]  = d[0]  - d[1]  + d[8]  - d[10] + d[13];
    w[4]  = d[1]  + d[2]  + d[9]  - d[11] - d[14];
    w[5]  = d[3]  - d[2]  + d[10] - d[12] + d[15];
    w[6]  = d[4]  - d[0]  - d[3]  - d[11] + d[13];
    w[7]  = d[1]  - d[4]  - d[5]  - d[12] - d[14];
    w[8]  = d[2]  - d[5]  - d[6]  + d[13] - d[15];
    w[9]  = d[0]  - d[3]  + d[6]  - d[7]  + d[14];
    w[10] = d[8]  - d[1]  - d[4]  - d[7]  + d[15];
    w[11] = d[8]  - d[0]  - d[2]  - d[5]  + d[9];
    w[12] = d[1]  + d[3]  - d[6]  - d[9]  + d[10];
    w[13] = d[2]  + d[4]  + d[7]  + d[10] + d[11];
    w[14] = d[3]  - d[5]  + d[8]  - d[11] - d[12];
    w[15] = d[12] - d[4]  - d[6]  - d[9]  + d[13];
    for (int j = 0; j < 16; j++) q[j] = bs(j % 5, w[j]);
    return bmw_expand(m, q[15:0]);
  endfunction

  // f1: Q_16..Q_31 from Q_0..Q_15 and the message; returns all 32 words
  function automatic logic [31:0][31:0] bmw_expand(logic [15:0][31:0] m, logic [15:0][31:0] qa);
    logic [31:0][31:0] q;
    int rot [7] = '{3, 7, 13, 16, 19, 23, 27};
    q = '0;
    q[15:0] = qa;
    for (int j = 16; j < 32; j++) begin
      u32 acc = m[(j - 16) % 16] + m[(j - 13) % 16] - m[(j - 6) % 16] + u32'(j) * 32'h05555555;
      if (j < 18) begin
        acc += bs(1, q[j-16]) + bs(2, q[j-15]) + bs(3, q[j-14]) + bs(0, q[j-13]);
        acc += bs(1, q[j-12]) + bs(2, q[j-11]) + bs(3, q[j-10]) + bs(0, q[j-9]);
        acc += bs(1, q[j-8])  + bs(2, q[j-7])  + bs(3, q[j-6])  + bs(0, q[j-5]);
        acc += bs(1, q[j-4])  + bs(2, q[j-3])  + bs(3, q[j-2])  + bs(0, q[j-1]);
      end else begin
        for (int p = 0; p < 7; p++) acc += q[j - 16 + 2*p] + rl(q[j - 15 + 2*p], rot[p]);
        acc += bs(4, q[j-2]) + bs(5, q[j-1]);
      end
      q[j] = acc;
    end
    return q;
  endfunction

  function automatic logic [15:0][31:0] bmw_f2(logic [15:0][31:0] m, logic [31:0][31:0] q);
    logic [15:0][31:0] h;
    u32 xl = 0, xh;
    int sh_hi [8] = '{5, -7, -5, -1, -3, 6, -4, -11};   // + left, - right on XH
    int sh_q  [8] = '{-5, 8, 5, 5, 0, -6, 6, 2};         // + left, - right on Q
    int sh_l  [8] = '{8, -6, 6, 4, -3, -4, -7, -2};      // on XL, for H_8..H_15
    for (int i = 16; i < 24; i++) xl ^= q[i];
    xh = xl;
    for (int i = 24; i < 32; i++) xh ^= q[i];
    for (int i = 0; i < 8; i++) begin
      u32 a = sh_hi[i] > 0 ? xh << sh_hi[i] : xh >> (-sh_hi[i]);
      u32 b = sh_q[i] >= 0 ? q[16+i] << sh_q[i] : q[16+i] >> (-sh_q[i]);
      h[i] = (a ^ b ^ m[i]) + (xl ^ q[24+i] ^ q[i]);
    end
    for (int i = 8; i < 16; i++) begin
      u32 c = sh_l[i-8] > 0 ? xl << sh_l[i-8] : xl >> (-sh_l[i-8]);
      h[i] = rl(h[(i - 4) % 8], i + 1) + (xh ^ q[16+i] ^ m[i]) + (c ^ q[i == 8 ? 23 : i + 7] ^ q[i]);
    end
    return h;
  endfunction

  // ------------------------------------------------------------ Luffa-256
  function automatic logic [7:0][31:0] lf_x2(logic [7:0][31:0] a);
    logic [7:0][31:0] b;
    for (int i = 7; i >= 1; i--) b[i] = a[i-1];
    b[0] = a[7];
    b[1] ^= a[7];
    b[3] ^= a[7];
    b[4] ^= a[7];
    return b;
  endfunction

  function automatic logic [2:0][7:0][31:0] lf_mi(logic [2:0][7:0][31:0] h, logic [7:0][31:0] m);
    logic [7:0][31:0] t = lf_x2(h[0] ^ h[1] ^ h[2]);
    logic [7:0][31:0] mm = m;
    for (int j = 0; j < 3; j++) begin
      h[j] = h[j] ^ t ^ mm;
      mm = lf_x2(mm);
    end
    return h;
  endfunction

  function automatic logic [7:0][31:0] lf_step(logic [7:0][31:0] x, int j, int r);
    int sbox [16] = '{7, 13, 11, 10, 12, 4, 8, 3, 5, 15, 6, 0, 9, 1, 2, 14};
    u32 c0 [3][8] = '{
      '{32'h303994a6, 32'hc0e65299, 32'h6cc33a12, 32'hdc56983e, 32'h1e00108f, 32'h7800423d, 32'h8f5b7882, 32'h96e1db12},
      '{32'hb6de10ed, 32'h70f47aae, 32'h0707a3d4, 32'h1c1e8f51, 32'h707a3d45, 32'haeb28562, 32'hbaca1589, 32'h40a46f3e},
      '{32'hfc20d9d2, 32'h34552e25, 32'h7ad8818f, 32'h8438764a, 32'hbb6de032, 32'hedb780c8, 32'hd9847356, 32'ha2c78434}};
    u32 c4 [3][8] = '{
      '{32'he0337818, 32'h441ba90d, 32'h7f34d442, 32'h9389217f, 32'he5a8bce6, 32'h5274baf4, 32'h26889ba7, 32'h9a226e9d},
      '{32'h01685f3d, 32'h05a17cf4, 32'hbd09caca, 32'hf4272b28, 32'h144ae5cc, 32'hfaa7ae2b, 32'h2e48f1c1, 32'hb923c704},
      '{32'he25e72c1, 32'he623bb72, 32'h5c58a4a4, 32'h1e38e2e7, 32'h78e38b9d, 32'h27586719, 32'h36eda57f, 32'h703aace7}};
    int grp [2][4] = '{'{0, 1, 2, 3}, '{5, 6, 7, 4}};
    for (int g = 0; g < 2; g++)
      for (int l = 0; l < 32; l++) begin
        int v = 0, s;
        for (int b = 0; b < 4; b++) v |= int'(x[grp[g][b]][l]) << b;
        s = sbox[v];
        for (int b = 0; b < 4; b++) x[grp[g][b]][l] = s[b];
      end
    for (int k = 0; k < 4; k++) begin
      u32 a = x[k], b = x[k+4];
      b ^= a; a = rl(a, 2) ^ b; b = rl(b, 14) ^ a; a = rl(a, 10) ^ b; b = rl(b, 1);
      x[k] = a; x[k+4] = b;
    end
    x[0] ^= c0[j][r];
    x[4] ^= c4[j][r];
    return x;
  endfunction

  function automatic logic [7:0][31:0] lf_perm(logic [7:0][31:0] x, int j, int steps);
    for (int k = 4; k < 8; k++) x[k] = rl(x[k], j);
    for (int r = 0; r < steps; r++) x = lf_step(x, j, r);
    return x;
  endfunction

  function automatic logic [2:0][7:0][31:0] luffa_ref(logic [2:0][7:0][31:0] h, logic [7:0][31:0] m, int steps);
    logic [2:0][7:0][31:0] x = lf_mi(h, m);
    for (int j = 0; j < 3; j++) x[j] = lf_perm(x[j], j, steps);
    return x;
  endfunction

  // ------------------------------------------------------------ Threefish / Skein-256
  function automatic int tf_rot(int d, int i);
    int r [8][2] = '{'{14, 16}, '{52, 57}, '{23, 40}, '{5, 37}, '{25, 33}, '{46, 12}, '{58, 22}, '{32, 32}};
    return r[d % 8][i];
  endfunction

  function automatic logic [3:0][63:0] tf_round(logic [3:0][63:0] v, int d);
    u64 t;
    v[0] = v[0] + v[1]; v[1] = rl64(v[1], tf_rot(d, 0)) ^ v[0];
    v[2] = v[2] + v[3]; v[3] = rl64(v[3], tf_rot(d, 1)) ^ v[2];
    t = v[1]; v[1] = v[3]; v[3] = t;
    return v;
  endfunction

  function automatic logic [3:0][63:0] tf_subkey(logic [3:0][63:0] key, logic [1:0][63:0] tw, int s);
    u64 k [5];
    u64 t [3];
    logic [3:0][63:0] y;
    k[4] = 64'h1BD11BDAA9FC1A22;
    for (int i = 0; i < 4; i++) begin k[i] = key[i]; k[4] ^= key[i]; end
    t[0] = tw[0]; t[1] = tw[1]; t[2] = tw[0] ^ tw[1];
    for (int i = 0; i < 4; i++) y[i] = k[(s + i) % 5];
    y[1] += t[s % 3];
    y[2] += t[(s + 1) % 3];
    y[3] += u64'(s);
    return y;
  endfunction

  // UBI block: E_(key,tweak)(msg) ^ msg
  function automatic logic [3:0][63:0] skein_ref(logic [3:0][63:0] key, logic [1:0][63:0] tw,
                                                 logic [3:0][63:0] msg, int rounds);
    logic [3:0][63:0] v = msg, sk;
    for (int d = 0; d < rounds; d++) begin
      if (d % 4 == 0) begin
        sk = tf_subkey(key, tw, d / 4);
        for (int i = 0; i < 4; i++) v[i] += sk[i];
      end
      v = tf_round(v, d);
    end
    sk = tf_subkey(key, tw, rounds / 4);
    for (int i = 0; i < 4; i++) v[i] = (v[i] + sk[i]) ^ msg[i];
    return v;
  endfunction

  // ------------------------------------------------------------ Shabal-256
  // returns {C', B', A'} as 44 words: A 0-11, B 12-27, C 28-43
  function automatic logic [43:0][31:0] shabal_ref(logic [11:0][31:0] a, logic [15:0][31:0] b,
                                                   logic [15:0][31:0] c, logic [15:0][31:0] m, u64 w);
    u32 A [12];
    u32 B [16];
    u32 C [16];
    logic [43:0][31:0] o;
    for (int i = 0; i < 12; i++) A[i] = a[i];
    for (int i = 0; i < 16; i++) begin B[i] = rl(b[i] + m[i], 17); C[i] = c[i]; end
    A[0] ^= w[31:0];
    A[1] ^= w[63:32];
    for (int j = 0; j < 3; j++)
      for (int i = 0; i < 16; i++) begin
        int k = (i + 16 * j) % 12;
        u32 v5 = rl(A[(k + 11) % 12], 15) * 5;
        A[k] = ((A[k] ^ v5 ^ C[(8 - i + 16) % 16]) * 3) ^ B[(i + 13) % 16] ^ (B[(i + 9) % 16] & ~B[(i + 6) % 16]) ^ m[i];
        B[i] = ~(rl(B[i], 1) ^ A[k]);
      end
    for (int j = 0; j < 36; j++) A[j % 12] += C[(j + 3) % 16];
    for (int i = 0; i < 12; i++) o[i] = A[i];
    for (int i = 0; i < 16; i++) begin o[12 + i] = C[i] - m[i]; o[28 + i] = B[i]; end
    return o;
  endfunction

  // ------------------------------------------------------------ BLAKE-32
  function automatic logic [7:0][31:0] blake_ref(logic [7:0][31:0] h, logic [15:0][31:0] m,
                                                 logic [3:0][31:0] s, logic [1:0][31:0] t, int rounds);
    u32 c [16] = '{32'h243F6A88, 32'h85A308D3, 32'h13198A2E, 32'h03707344, 32'hA4093822, 32'h299F31D0,
                   32'h082EFA98, 32'hEC4E6C89, 32'h452821E6, 32'h38D01377, 32'hBE5466CF, 32'h34E90C6C,
                   32'hC0AC29B7, 32'hC97C50DD, 32'h3F84D5B5, 32'hB5470917};
    int sg [10][16] = '{
      '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15},
      '{14, 10, 4, 8, 9, 15, 13, 6, 1, 12, 0, 2, 11, 7, 5, 3},
      '{11, 8, 12, 0, 5, 2, 15, 13, 10, 14, 3, 6, 7, 1, 9, 4},
      '{7, 9, 3, 1, 13, 12, 11, 14, 2, 6, 5, 10, 4, 0, 15, 8},
      '{9, 0, 5, 7, 2, 4, 10, 15, 14, 1, 11, 12, 6, 8, 3, 13},
      '{2, 12, 6, 10, 0, 11, 8, 3, 4, 13, 7, 5, 15, 14, 1, 9},
      '{12, 5, 1, 15, 14, 13, 4, 10, 0, 7, 6, 3, 9, 2, 8, 11},
      '{13, 11, 7, 14, 12, 1, 3, 9, 5, 0, 15, 4, 8, 6, 2, 10},
      '{6, 15, 14, 9, 11, 3, 0, 8, 12, 2, 13, 7, 1, 4, 10, 5},
      '{10, 2, 8, 4, 7, 6, 1, 5, 15, 11, 9, 14, 3, 12, 13, 0}};
    int gi [8][4] = '{'{0, 4, 8, 12}, '{1, 5, 9, 13}, '{2, 6, 10, 14}, '{3, 7, 11, 15},
                      '{0, 5, 10, 15}, '{1, 6, 11, 12}, '{2, 7, 8, 13}, '{3, 4, 9, 14}};
    u32 v [16];
    logic [7:0][31:0] o;
    for (int i = 0; i < 8; i++) v[i] = h[i];
    for (int i = 0; i < 4; i++) v[8 + i] = s[i] ^ c[i];
    v[12] = t[0] ^ c[4]; v[13] = t[0] ^ c[5]; v[14] = t[1] ^ c[6]; v[15] = t[1] ^ c[7];
    for (int r = 0; r < rounds; r++)
      for (int i = 0; i < 8; i++) begin
        int a = gi[i][0], b = gi[i][1], cc = gi[i][2], d = gi[i][3];
        int p0 = sg[r % 10][2*i], p1 = sg[r % 10][2*i + 1];
        v[a] = v[a] + v[b] + (m[p0] ^ c[p1]); v[d] = rr(v[d] ^ v[a], 16);
        v[cc] = v[cc] + v[d];                  v[b] = rr(v[b] ^ v[cc], 12);
        v[a] = v[a] + v[b] + (m[p1] ^ c[p0]); v[d] = rr(v[d] ^ v[a], 8);
        v[cc] = v[cc] + v[d];                  v[b] = rr(v[b] ^ v[cc], 7);
      end
    for (int i = 0; i < 8; i++) o[i] = h[i] ^ s[i % 4] ^ v[i] ^ v[i + 8];
    return o;
  endfunction

  // random fill helpers
  function automatic logic [63:0][31:0] rnd_words();
    logic [63:0][31:0] r;
    for (int i = 0; i < 64; i++) r[i] = $urandom;
    return r;
  endfunction
endpackage
