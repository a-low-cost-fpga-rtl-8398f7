// fixed_matrix_mult -- multiplication of a 4x8 bit matrix by a fixed 8x4 byte
// matrix, done with look-up tables instead of multipliers.
//
// Element (i,j) of the 4x4 byte result is
//   FMo(i,j) = sum over a = 0..7 of RS(i,a) * FM(a,j)   (modulo 256)
// where RS(i,a) is a bit. Because the only operand that varies is the 8-bit
// row RS(i,:), each column j of the product is a 256-entry table addressed
// by that row; the four tables are computed at elaboration from the fixed
// matrix and each is read once per row, 16 reads in all. FM_SEL picks which
// of the cipher's four fixed matrices FM1..FM4 is used. The LUT structure and
// the matrices are the cipher's; reading each printed 4x8 matrix as the
// transpose of the 8x4 FM and summing modulo 256 are this design's reading.
//
// Interface: rs (32 bits, 4x8 bit matrix, row 0 in [31:24], column 0 = MSB)
// in; fmo (128 bits, 4x4 bytes, FMo(0,0) in [127:120], row-major) out.
// Combinational.
module fixed_matrix_mult
  import secure_cipher_pkg::*;
#(
  parameter int FM_SEL = 1       // fixed matrix FM1..FM4
) (
  input  word_t  rs,
  output block_t fmo
);

  initial assert (FM_SEL >= 1 && FM_SEL <= 4)
    else $error("fixed_matrix_mult: FM_SEL must be 1..4");

  for (genvar j = 0; j < 4; j++) begin : g_col
    localparam lut256_t LUT = fm_lut(FM_SEL - 1, j);
    for (genvar i = 0; i < 4; i++) begin : g_row
      assign fmo[127-8*(4*i+j) -: 8] = LUT[rs[31-8*i -: 8]];
    end
  end

endmodule
