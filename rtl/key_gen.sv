// key_gen -- the Secure Cipher key generation block.
//
// Expands a 128-bit key into five 32-bit round keys. The key is cut into
// four 32-bit chunks (chunk 1 = key[127:96]); branch m (1..4) then computes
//   a_m = shift_row(chunk_m)                 4x8 bits, row r rotated by r
//   c_m = column-wise arrangement of a_m
//   d_m = c_m xnor c_(m+1)                   branch 4 pairs with c_1
//   e_m = shift_row(column-wise arrangement of d_m)
//   g_m = shift_row(e_m x FM_m)              4x4 bytes, row i rotated by i
//   K_m = reduction over the four rows of the column-wise 4x32
//         arrangement of g_m: XOR for K1 and K3, XNOR for K2 and K4
// and K5 = K1 xor K2 xor K3 xor K4. The sequence of steps, the XNOR pairing,
// the fixed matrices and the XOR/XNOR choice per branch are the cipher's.
// How "shift row" and "arranged column-wise" act on the bits (see
// secure_cipher_pkg), the bit order and the row-wise reduction are this
// design's reading of them.
//
// Interface: key (128 bits) in; round_key[0..4] (32 bits each, index 0 = K1)
// out. Combinational.
module key_gen
  import secure_cipher_pkg::*;
(
  input  block_t key,
  output word_t  round_key [5]
);

  word_t  col_m [NUM_KEY_BRANCHES];   // c_m
  word_t  rk_m  [NUM_KEY_BRANCHES];   // K1..K4

  for (genvar m = 0; m < NUM_KEY_BRANCHES; m++) begin : g_branch
    word_t  d, e;
    block_t prod, g, h;

    assign col_m[m] = col_arrange_4x8(shift_row_4x8(key[127-32*m -: 32]));
    assign d        = col_m[m] ~^ col_m[(m + 1) % NUM_KEY_BRANCHES];
    assign e        = shift_row_4x8(col_arrange_4x8(d));

    fixed_matrix_mult #(.FM_SEL(m + 1)) u_fm (
      .rs  (e),
      .fmo (prod)
    );

    assign g = shift_row_4x4(prod);
    assign h = col_arrange_4x32(g);

    if (m % 2 == 0) begin : g_xor
      assign rk_m[m] = h[127:96] ^ h[95:64] ^ h[63:32] ^ h[31:0];
    end else begin : g_xnor
      assign rk_m[m] = ~(h[127:96] ^ h[95:64] ^ h[63:32] ^ h[31:0]);
    end

    assign round_key[m] = rk_m[m];
  end

  assign round_key[4] = rk_m[0] ^ rk_m[1] ^ rk_m[2] ^ rk_m[3];

endmodule
