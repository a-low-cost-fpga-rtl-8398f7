// secure_cipher_ref_pkg -- reference model of the Secure Cipher for the
// testbenches.
//
// Written independently of the RTL: the key schedule works on explicit 2-D
// bit and byte arrays instead of packed-vector reshaping functions, SB1 (the
// AES S-box) is built from exponent/logarithm tables over the generator 3
// instead of from inversion by squaring, and the rounds are written as plain
// assignments. Only the published constants (fixed matrices FM1..FM4 and the
// tables SB2..SB4) are taken from secure_cipher_pkg. ref_decrypt inverts the
// rounds and lets the testbenches check round trips.
package secure_cipher_ref_pkg;
  import secure_cipher_pkg::*;

  typedef bit [31:0] rk_t [5];

  // ---------------------------------------------------------------- S-boxes
  function automatic bit [7:0] xtime3(bit [7:0] a);
    return a ^ {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic bit [7:0] ref_aes_sbox(bit [7:0] x);
    bit [7:0] expt [256];
    int       logt [256];
    bit [7:0] v = 8'h01;
    bit [7:0] inv, s;
    for (int i = 0; i < 255; i++) begin
      expt[i] = v;
      logt[v] = i;
      v = xtime3(v);
    end
    inv = (x == 0) ? 8'h00 : expt[(255 - logt[x]) % 255];
    // affine map, bit by bit
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8]
             ^ bit'((8'h63 >> i) & 1);
    return s;
  endfunction

  function automatic bit [7:0] ref_sbox(int id, bit [7:0] sel);
    int row = sel[7:6] * 4 + sel[1:0];
    int col = sel[5:2];
    case (id)
      1: return ref_aes_sbox(8'(row * 16 + col));
      2: return SB2_TABLE[row*16 + col];
      3: return SB3_TABLE[row*16 + col];
      default: return SB4_TABLE[row*16 + col];
    endcase
  endfunction

  // ------------------------------------------------------------ F and rounds
  function automatic bit [31:0] ref_f(bit [31:0] x);
    bit [31:0] y;
    for (int n = 0; n < 4; n++) begin
      bit [7:0] b = x[31-8*n -: 8];
      bit [7:0] r = b;
      for (int s = 0; s < n; s++) r = {r[6:0], r[7]};
      y[31-8*n -: 8] = ref_sbox(n + 1, r);
    end
    return y;
  endfunction

  function automatic bit [127:0] ref_round(bit [127:0] x, bit [31:0] k);
    bit [31:0] a = x[127:96], b = x[95:64], c = x[63:32], d = x[31:0];
    bit [31:0] l = ~(a ^ k);
    bit [31:0] r = ~(d ^ k);
    return {l, ref_f(l) ^ c, ref_f(r) ^ b, r};
  endfunction

  function automatic bit [127:0] ref_unround(bit [127:0] y, bit [31:0] k);
    bit [31:0] l = y[127:96], m1 = y[95:64], m2 = y[63:32], r = y[31:0];
    return {~(l ^ k), m2 ^ ref_f(r), m1 ^ ref_f(l), ~(r ^ k)};
  endfunction

  function automatic bit [127:0] ref_encrypt(bit [127:0] x, rk_t k, int rounds = 5);
    for (int i = 0; i < rounds; i++) x = ref_round(x, k[i]);
    return x;
  endfunction

  function automatic bit [127:0] ref_decrypt(bit [127:0] y, rk_t k, int rounds = 5);
    for (int i = rounds - 1; i >= 0; i--) y = ref_unround(y, k[i]);
    return y;
  endfunction

  // ------------------------------------------------------------ key schedule
  typedef bit mat48_t [4][8];
  typedef int bmat_t  [4][4];

  function automatic mat48_t to_mat(bit [31:0] w);
    mat48_t m;
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 8; k++) m[r][k] = w[31 - (8*r + k)];
    return m;
  endfunction

  function automatic mat48_t mat_shift_row(mat48_t m);
    mat48_t o;
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 8; k++) o[r][k] = m[r][(k + r) % 8];
    return o;
  endfunction

  function automatic mat48_t mat_col_fill(mat48_t m);
    bit s [32];
    mat48_t o;
    for (int n = 0; n < 32; n++) s[n] = m[n/8][n%8];
    for (int k = 0; k < 8; k++)
      for (int r = 0; r < 4; r++) o[r][k] = s[4*k + r];
    return o;
  endfunction

  function automatic bmat_t fm_multiply(mat48_t e, int m);
    bmat_t p;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        int acc = 0;
        for (int a = 0; a < 8; a++) acc += int'(e[i][a]) * int'(FM[m][j][a]);
        p[i][j] = acc % 256;
      end
    return p;
  endfunction

  function automatic rk_t ref_keygen(bit [127:0] key);
    mat48_t c [4];
    rk_t    k;
    for (int m = 0; m < 4; m++)
      c[m] = mat_col_fill(mat_shift_row(to_mat(key[127 - 32*m -: 32])));
    for (int m = 0; m < 4; m++) begin
      mat48_t d, e;
      bmat_t  p, g;
      bit     s [128];
      bit [31:0] out;
      for (int r = 0; r < 4; r++)
        for (int q = 0; q < 8; q++) d[r][q] = ~(c[m][r][q] ^ c[(m+1)%4][r][q]);
      e = mat_shift_row(mat_col_fill(d));
      p = fm_multiply(e, m);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) g[i][j] = p[i][(j + i) % 4];
      for (int n = 0; n < 128; n++) s[n] = ((g[n/32][(n/8)%4] >> (7 - n%8)) & 1) != 0;
      for (int q = 0; q < 32; q++) begin
        bit par = s[4*q] ^ s[4*q+1] ^ s[4*q+2] ^ s[4*q+3];
        out[31 - q] = (m % 2 == 1) ? ~par : par;
      end
      k[m] = out;
    end
    k[4] = k[0] ^ k[1] ^ k[2] ^ k[3];
    return k;
  endfunction

endpackage
