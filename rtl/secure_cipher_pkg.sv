// secure_cipher_pkg -- types, constants and bit-matrix helpers shared by the
// Secure Cipher key generator and encryption datapath.
//
// Conventions used throughout the design (all MSB first):
//  * A 32-bit word seen as a 4x8 bit matrix holds element (r,k) in bit
//    31-(8r+k): row 0 is the most significant byte, column 0 its MSB.
//  * A 128-bit value seen as a 4x4 byte matrix holds byte (i,j) in bits
//    [127-8(4i+j) -: 8]; seen as a 4x32 bit matrix, element (r,k) is bit
//    127-(32r+k).
//  * "Arranging column-wise" refills a matrix of the same shape column by
//    column with the elements of the source read row by row.
//  * "Shift row" rotates row r left by r elements (AES style).
// The fixed matrices FM1..FM4 and the substitution boxes SB2..SB4 are the
// cipher's published constants. SB1 is the AES S-box and is computed here
// from its definition (multiplicative inverse in GF(2^8) followed by the AES
// affine map) instead of being listed. The SB4 entry at row 7, column 15 is
// 8'h00 by this design's choice; every other entry is the cipher's.
package secure_cipher_pkg;

  localparam int NUM_ROUNDS_DEFAULT = 5;   // encryption rounds
  localparam int NUM_KEY_BRANCHES   = 4;   // key generation branches (K1..K4)

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // Fixed 8x4 matrices, stored as printed: FM[m][j][a] is FM_m(a, j)
  // (printed row j, column a), m = 0..3 for FM1..FM4.
  typedef byte_t [0:3][0:7] fm_t;
  localparam fm_t [0:3] FM = '{
    '{'{8'd128, 8'd64,  8'd32,  8'd16,  8'd8,   8'd4,   8'd2,   8'd1  },
      '{8'd64,  8'd32,  8'd16,  8'd8,   8'd4,   8'd2,   8'd1,   8'd128},
      '{8'd32,  8'd16,  8'd8,   8'd4,   8'd2,   8'd1,   8'd128, 8'd64 },
      '{8'd16,  8'd8,   8'd4,   8'd2,   8'd1,   8'd128, 8'd64,  8'd32 }},
    '{'{8'd8,   8'd4,   8'd2,   8'd1,   8'd128, 8'd64,  8'd32,  8'd16 },
      '{8'd4,   8'd2,   8'd1,   8'd128, 8'd64,  8'd32,  8'd16,  8'd8  },
      '{8'd2,   8'd1,   8'd128, 8'd64,  8'd32,  8'd16,  8'd8,   8'd4  },
      '{8'd1,   8'd128, 8'd64,  8'd32,  8'd16,  8'd8,   8'd4,   8'd2  }},
    '{'{8'd128, 8'd32,  8'd64,  8'd8,   8'd16,  8'd1,   8'd4,   8'd2  },
      '{8'd64,  8'd128, 8'd8,   8'd1,   8'd32,  8'd4,   8'd2,   8'd16 },
      '{8'd1,   8'd16,  8'd4,   8'd32,  8'd128, 8'd8,   8'd64,  8'd2  },
      '{8'd32,  8'd2,   8'd128, 8'd4,   8'd16,  8'd64,  8'd1,   8'd8  }},
    '{'{8'd2,   8'd16,  8'd64,  8'd128, 8'd1,   8'd32,  8'd4,   8'd8  },
      '{8'd64,  8'd1,   8'd4,   8'd16,  8'd32,  8'd128, 8'd16,  8'd2  },
      '{8'd1,   8'd128, 8'd32,  8'd16,  8'd4,   8'd2,   8'd64,  8'd8  },
      '{8'd4,   8'd1,   8'd128, 8'd32,  8'd64,  8'd8,   8'd16,  8'd2  }}
  };

  // One 256-entry look-up table of bytes, entry 0 first.
  typedef byte_t [0:255] lut256_t;
  typedef lut256_t sbox_table_t;

  // SB2: entry 16*row + column, rows 0..15 top to bottom
  localparam sbox_table_t SB2_TABLE = '{
    8'h04, 8'h93, 8'h80, 8'hC9, 8'h24, 8'hBC, 8'h5F, 8'h88, 8'hE5, 8'h47, 8'h0F, 8'h81, 8'h5E, 8'h90, 8'h6D, 8'h34,
    8'h75, 8'h38, 8'h4C, 8'h0B, 8'h1C, 8'h80, 8'h8E, 8'hDB, 8'h92, 8'h74, 8'hB4, 8'hC4, 8'h2D, 8'hE9, 8'hA6, 8'hF1,
    8'h0C, 8'hD8, 8'h07, 8'hB3, 8'h3A, 8'h6A, 8'h07, 8'h4C, 8'hF0, 8'hC5, 8'h77, 8'h68, 8'hF4, 8'hB7, 8'h6D, 8'h5D,
    8'hD9, 8'h36, 8'hCC, 8'h87, 8'h81, 8'h26, 8'hE5, 8'h27, 8'hB7, 8'h96, 8'h82, 8'h6B, 8'hE1, 8'h92, 8'hD6, 8'h10,
    8'h9B, 8'hAA, 8'h3F, 8'hC0, 8'h1D, 8'hE0, 8'h89, 8'h92, 8'h60, 8'hF3, 8'h0E, 8'hA1, 8'h9B, 8'hD1, 8'hBE, 8'hEC,
    8'hAC, 8'hA5, 8'h73, 8'h90, 8'h93, 8'h69, 8'h80, 8'hD5, 8'hA1, 8'h65, 8'h23, 8'hAF, 8'h81, 8'hE5, 8'hC5, 8'h32,
    8'h72, 8'hFE, 8'hBD, 8'h5B, 8'hCD, 8'hBF, 8'h3D, 8'h53, 8'hDE, 8'hE7, 8'h72, 8'h21, 8'h8F, 8'hB3, 8'hB1, 8'h05,
    8'h2A, 8'h4E, 8'h6F, 8'h0F, 8'h5E, 8'h62, 8'hBF, 8'hA0, 8'h61, 8'h36, 8'h6D, 8'h49, 8'h62, 8'h89, 8'hAB, 8'hE8,
    8'h74, 8'h67, 8'hAF, 8'h2A, 8'h78, 8'hA8, 8'hFC, 8'hA7, 8'hE5, 8'h24, 8'h0F, 8'h05, 8'h59, 8'h7B, 8'h6F, 8'hEC,
    8'h8F, 8'hEA, 8'h25, 8'hD5, 8'h7C, 8'hDA, 8'h78, 8'h34, 8'h54, 8'hB0, 8'hEB, 8'hA9, 8'h30, 8'hED, 8'h60, 8'h35,
    8'hCD, 8'h38, 8'h60, 8'h68, 8'h60, 8'h47, 8'hAD, 8'h60, 8'hB2, 8'hA1, 8'h8A, 8'hDE, 8'hCF, 8'h75, 8'h88, 8'hC7,
    8'h36, 8'hEC, 8'h12, 8'h24, 8'h5C, 8'hCC, 8'hC2, 8'hA1, 8'hF6, 8'hAC, 8'hBB, 8'hEF, 8'hC2, 8'h28, 8'h7A, 8'h13,
    8'hB9, 8'hCA, 8'h5F, 8'h35, 8'h80, 8'h30, 8'h71, 8'h34, 8'h54, 8'h25, 8'h75, 8'hE5, 8'hA1, 8'h66, 8'h44, 8'h3C,
    8'hD4, 8'h57, 8'hD7, 8'hFF, 8'h0B, 8'h74, 8'hDF, 8'hF2, 8'h37, 8'hE8, 8'h80, 8'hCA, 8'hA6, 8'hD4, 8'hC8, 8'h3F,
    8'h9B, 8'h32, 8'h69, 8'h3A, 8'hE3, 8'hDA, 8'hB2, 8'hB0, 8'hDC, 8'h13, 8'h70, 8'h50, 8'hA0, 8'h98, 8'h9E, 8'hB6,
    8'h4A, 8'hE6, 8'h20, 8'h24, 8'hB8, 8'h42, 8'hC5, 8'h1F, 8'h8A, 8'h6B, 8'h2F, 8'hCB, 8'h8A, 8'h95, 8'h88, 8'h91
  };

  // SB3: entry 16*row + column, rows 0..15 top to bottom
  localparam sbox_table_t SB3_TABLE = '{
    8'h82, 8'h89, 8'h7F, 8'h11, 8'hA5, 8'h4A, 8'h41, 8'h41, 8'h75, 8'h64, 8'h42, 8'hCC, 8'h14, 8'h83, 8'h6C, 8'h6D,
    8'hA5, 8'h1B, 8'hA9, 8'h22, 8'hC8, 8'h5F, 8'hC4, 8'h9F, 8'hB2, 8'hFB, 8'h89, 8'h1D, 8'hD5, 8'hE1, 8'h80, 8'h12,
    8'h15, 8'h4C, 8'hE2, 8'h55, 8'h12, 8'h79, 8'h07, 8'h2C, 8'hB8, 8'h00, 8'h39, 8'hD7, 8'h7E, 8'hA1, 8'h13, 8'h49,
    8'h88, 8'h48, 8'hB5, 8'hF1, 8'h72, 8'h8F, 8'h50, 8'h28, 8'h07, 8'h71, 8'hE4, 8'hC1, 8'h53, 8'h0A, 8'h27, 8'h79,
    8'hEE, 8'hC8, 8'h79, 8'h88, 8'h77, 8'h24, 8'h44, 8'hDB, 8'h65, 8'h30, 8'h73, 8'h7B, 8'hDE, 8'h14, 8'h23, 8'h85,
    8'hDD, 8'h35, 8'hB6, 8'h51, 8'h86, 8'hD7, 8'h1E, 8'hB3, 8'h21, 8'h89, 8'hEB, 8'hBC, 8'h31, 8'h34, 8'hAB, 8'hC2,
    8'h1F, 8'h58, 8'h0D, 8'hFA, 8'hB4, 8'hA4, 8'h97, 8'h46, 8'h0C, 8'hBF, 8'h96, 8'h9A, 8'h7B, 8'hD3, 8'hDB, 8'hA4,
    8'h23, 8'hA5, 8'h36, 8'h76, 8'h69, 8'h52, 8'hE2, 8'h1D, 8'hDE, 8'h2F, 8'h53, 8'hEC, 8'hE6, 8'hF7, 8'h54, 8'h29,
    8'hBA, 8'h7D, 8'h59, 8'h4E, 8'h4E, 8'h15, 8'hB3, 8'h07, 8'hA9, 8'hAF, 8'hC7, 8'hA3, 8'hE4, 8'hDE, 8'h3A, 8'h1A,
    8'h97, 8'h27, 8'hD9, 8'h01, 8'h35, 8'h9B, 8'h19, 8'h1B, 8'h49, 8'h74, 8'hDB, 8'h7C, 8'hD6, 8'h30, 8'hED, 8'hFE,
    8'hB1, 8'h29, 8'hD1, 8'hE0, 8'h86, 8'hF0, 8'h5D, 8'h61, 8'hA9, 8'hB3, 8'hC2, 8'hC0, 8'hFF, 8'h53, 8'hFE, 8'h1D,
    8'h9B, 8'hA3, 8'h3A, 8'hEE, 8'h59, 8'h92, 8'h48, 8'h92, 8'h26, 8'hA8, 8'hB3, 8'hCE, 8'hF6, 8'hB0, 8'h45, 8'h59,
    8'h49, 8'h7F, 8'h2C, 8'hAA, 8'hC1, 8'h75, 8'hAA, 8'h6D, 8'hC7, 8'h41, 8'hEF, 8'hD0, 8'hCA, 8'hDD, 8'h95, 8'h7D,
    8'h10, 8'hA3, 8'h43, 8'hC3, 8'hBC, 8'hCA, 8'h88, 8'h00, 8'hAE, 8'h8D, 8'h72, 8'hD4, 8'h45, 8'h41, 8'h2E, 8'h39,
    8'h9D, 8'h5B, 8'hE0, 8'h80, 8'hAB, 8'h38, 8'hAD, 8'hD1, 8'h22, 8'h48, 8'h15, 8'hA6, 8'h65, 8'hC1, 8'h37, 8'h16,
    8'hD4, 8'h5C, 8'h45, 8'h82, 8'h80, 8'hCB, 8'h65, 8'h50, 8'h05, 8'h56, 8'hDC, 8'hF0, 8'h68, 8'hBD, 8'h86, 8'h6F
  };

  // SB4: entry 16*row + column, rows 0..15 top to bottom
  localparam sbox_table_t SB4_TABLE = '{
    8'h96, 8'h9D, 8'h79, 8'h6E, 8'h11, 8'h77, 8'h9F, 8'h67, 8'hBB, 8'hEF, 8'h10, 8'h37, 8'h17, 8'h98, 8'h1A, 8'hD8,
    8'hA6, 8'h4B, 8'h0F, 8'h75, 8'h3C, 8'hB2, 8'hCE, 8'hD8, 8'h61, 8'h29, 8'h15, 8'h56, 8'h8E, 8'hA3, 8'hF8, 8'h45,
    8'h84, 8'h94, 8'h0D, 8'hB0, 8'hA1, 8'h4A, 8'h41, 8'h61, 8'hE5, 8'h59, 8'hD7, 8'hDE, 8'hF1, 8'h5E, 8'hD1, 8'h09,
    8'h70, 8'hB4, 8'h87, 8'hAF, 8'hC9, 8'hCA, 8'hDA, 8'h02, 8'h0F, 8'h7D, 8'h1C, 8'h2C, 8'hF9, 8'h45, 8'h02, 8'hFB,
    8'hDE, 8'h2E, 8'h31, 8'h2C, 8'h69, 8'hF8, 8'hCB, 8'hA3, 8'hB1, 8'h7C, 8'h6D, 8'hA0, 8'h14, 8'hEC, 8'h5B, 8'hC6,
    8'h95, 8'h52, 8'hC2, 8'h6A, 8'h48, 8'h6A, 8'h71, 8'hBE, 8'h82, 8'h79, 8'h56, 8'hCD, 8'h2C, 8'hB8, 8'h21, 8'hDC,
    8'h55, 8'h24, 8'h97, 8'h88, 8'h3A, 8'hCA, 8'h0B, 8'h34, 8'h91, 8'hE0, 8'h6D, 8'h98, 8'h44, 8'h11, 8'hFE, 8'h9D,
    8'h57, 8'h25, 8'h98, 8'hC1, 8'hD3, 8'h54, 8'hCF, 8'h5D, 8'h58, 8'h33, 8'h88, 8'h40, 8'h16, 8'h01, 8'hD9, 8'h00,
    8'h80, 8'h97, 8'h03, 8'hFC, 8'h83, 8'hEF, 8'h07, 8'hC8, 8'h3A, 8'h5A, 8'h0C, 8'hBC, 8'hD5, 8'h6D, 8'hC4, 8'hC2,
    8'hC1, 8'hEB, 8'h55, 8'h36, 8'hA5, 8'hBD, 8'hB6, 8'hA2, 8'h1F, 8'h4D, 8'h45, 8'hA8, 8'h54, 8'h26, 8'hEF, 8'h7C,
    8'h2C, 8'h15, 8'h37, 8'h1F, 8'h0D, 8'h62, 8'h88, 8'h46, 8'h85, 8'h21, 8'hFA, 8'hF0, 8'h19, 8'hB7, 8'h8C, 8'h68,
    8'hD8, 8'hD3, 8'h69, 8'h3B, 8'h0D, 8'hBA, 8'hFE, 8'h7E, 8'h10, 8'h25, 8'h80, 8'hD8, 8'hBE, 8'h5D, 8'h34, 8'hD7,
    8'hD0, 8'h41, 8'h8F, 8'h7B, 8'hD4, 8'h08, 8'hC5, 8'hE7, 8'h31, 8'h14, 8'h17, 8'h2C, 8'h5C, 8'h5E, 8'hA7, 8'h9D,
    8'hE0, 8'hF3, 8'h79, 8'h23, 8'h44, 8'h02, 8'h0B, 8'h5C, 8'h6E, 8'hA7, 8'h5B, 8'hD5, 8'hCD, 8'h81, 8'h63, 8'h4C,
    8'hB9, 8'h3E, 8'h7A, 8'h39, 8'h17, 8'hCA, 8'h08, 8'hE1, 8'h06, 8'h2B, 8'hE7, 8'h99, 8'hF7, 8'hF3, 8'h95, 8'h1C,
    8'hE7, 8'h04, 8'h31, 8'hDF, 8'h2F, 8'h3A, 8'h57, 8'h8A, 8'h99, 8'hFC, 8'h9D, 8'hAB, 8'h31, 8'hF7, 8'h8E, 8'h6F
  };

  // ---------------------------------------------------------------- AES S-box
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic byte_t gf_inv(byte_t a);
    // a^254 = a^-1 in GF(2^8) (0 maps to 0); 254 = 2+4+8+...+128.
    byte_t sq = a;
    byte_t r  = 8'h01;
    for (int i = 1; i < 8; i++) begin
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  function automatic byte_t aes_sbox_value(byte_t a);
    byte_t b = gf_inv(a);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]}
             ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  // Table of substitution box `id` (1..4), indexed by 16*row + column.
  function automatic sbox_table_t sbox_table(int id);
    sbox_table_t t;
    case (id)
      2:       t = SB2_TABLE;
      3:       t = SB3_TABLE;
      4:       t = SB4_TABLE;
      default: for (int i = 0; i < 256; i++) t[i] = aes_sbox_value(byte_t'(i));
    endcase
    return t;
  endfunction

  // SBOX addressing: row = {b7,b6,b1,b0}, column = b5..b2.
  function automatic byte_t sbox_index(byte_t sel);
    return {sel[7:6], sel[1:0], sel[5:2]};
  endfunction

  // Rotate a byte left by n bits.
  function automatic byte_t rotl8(byte_t v, int n);
    return byte_t'((v << n) | (v >> (8 - n)));
  endfunction

  // ---------------------------------------------- fixed matrix multiplication
  // Table of column j of fixed matrix m: entry v = sum over a of
  // v[7-a] * FM_m(a, j), modulo 256.
  function automatic lut256_t fm_lut(int m, int j);
    lut256_t t;
    for (int v = 0; v < 256; v++) begin
      byte_t acc = '0;
      for (int a = 0; a < 8; a++)
        if (v[7-a]) acc = acc + FM[m][j][a];
      t[v] = acc;
    end
    return t;
  endfunction

  // -------------------------------------------------------- matrix reshaping
  // 4x8 bit matrix: rotate row r left by r bits.
  function automatic word_t shift_row_4x8(word_t w);
    word_t o;
    for (int r = 0; r < 4; r++)
      o[31-8*r -: 8] = rotl8(w[31-8*r -: 8], r);
    return o;
  endfunction

  // 4x8 bit matrix refilled column by column from its row-major bit stream.
  function automatic word_t col_arrange_4x8(word_t w);
    word_t o;
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 8; k++)
        o[31-(8*r+k)] = w[31-(4*k+r)];
    return o;
  endfunction

  // 4x4 byte matrix: rotate row i left by i bytes.
  function automatic block_t shift_row_4x4(block_t b);
    block_t o;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        o[127-8*(4*i+j) -: 8] = b[127-8*(4*i+((j+i)%4)) -: 8];
    return o;
  endfunction

  // 4x32 bit matrix refilled column by column from its row-major bit stream.
  function automatic block_t col_arrange_4x32(block_t b);
    block_t o;
    for (int r = 0; r < 4; r++)
      for (int k = 0; k < 32; k++)
        o[127-(32*r+k)] = b[127-(4*k+r)];
    return o;
  endfunction

endpackage
