// sbox -- one of the four Secure Cipher substitution boxes (SB1..SB4).
//
// A 16x16 table of bytes. The selection byte b is split as in the cipher
// definition: its two most significant and two least significant bits form
// the row number {b7,b6,b1,b0}, the middle four bits b5..b2 the column
// number. Example: 8'b1100_0011 selects row 15, column 0, which in SB1 is
// 8'h8C. SB1 is the AES S-box; SB2..SB4 are the cipher's own tables (see
// secure_cipher_pkg). Taking the two outer bit pairs as the high half of the
// row number is this design's reading; the table contents and the row/column
// split follow the cipher definition.
//
// Interface: sel (8 bits) in, dout (8 bits) out. Purely combinational: a
// 256-entry read-only look-up table fixed at elaboration.
module sbox
  import secure_cipher_pkg::*;
#(
  parameter int SBOX_ID = 1      // which table, 1..4
) (
  input  byte_t sel,
  output byte_t dout
);

  localparam sbox_table_t TABLE = sbox_table(SBOX_ID);

  initial assert (SBOX_ID >= 1 && SBOX_ID <= 4)
    else $error("sbox: SBOX_ID must be 1..4");

  assign dout = TABLE[sbox_index(sel)];

endmodule
