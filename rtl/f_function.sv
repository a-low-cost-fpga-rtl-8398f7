// f_function -- the F function of the Secure Cipher round.
//
// The 32-bit input is cut into four bytes. Byte n (n = 0 is the most
// significant byte) is rotated left by n bits (LS-0 .. LS-3) and used as the
// selection byte of substitution box SBOX(n+1); the four SBOX outputs are
// concatenated in the same order to give the 32-bit result. Treating the
// "left shift" as a rotation, so that every SBOX entry stays reachable, and
// taking the most significant byte as the first one are this design's
// choices; the structure is the cipher's.
//
// Interface: din (32 bits) in, dout (32 bits) out. Combinational.
module f_function
  import secure_cipher_pkg::*;
(
  input  word_t din,
  output word_t dout
);

  for (genvar n = 0; n < 4; n++) begin : g_lane
    byte_t shifted;
    assign shifted = rotl8(din[31-8*n -: 8], n);
    sbox #(.SBOX_ID(n + 1)) u_sbox (
      .sel  (shifted),
      .dout (dout[31-8*n -: 8])
    );
  end

endmodule
