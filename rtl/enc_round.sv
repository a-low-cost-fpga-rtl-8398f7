// enc_round -- one Secure Cipher encryption round.
//
// The 128-bit state is four 32-bit words W0..W3, W0 the most significant.
// The two outer words are XNORed with the 32-bit round key Kr; each result
// goes to the output unchanged and also through the F function, whose result
// is XORed into the opposite inner word, the inner words crossing over:
//   y0 = W0 xnor Kr            y3 = W3 xnor Kr
//   y1 = F(y0) xor W2          y2 = F(y3) xor W1
// The round is invertible without inverting F (W0 = y0 xnor Kr,
// W2 = y1 xor F(y0), and so on). Word order (W0 = most significant) is this
// design's choice; the data flow is the cipher's.
//
// Interface: din (128 bits), rk (32 bits) in; dout (128 bits) out.
// Combinational.
module enc_round
  import secure_cipher_pkg::*;
(
  input  block_t din,
  input  word_t  rk,
  output block_t dout
);

  word_t w0, w1, w2, w3;
  word_t y0, y3, f0, f3;

  assign {w0, w1, w2, w3} = din;

  assign y0 = w0 ~^ rk;
  assign y3 = w3 ~^ rk;

  f_function u_f_left  (.din(y0), .dout(f0));
  f_function u_f_right (.din(y3), .dout(f3));

  assign dout = {y0, f0 ^ w2, f3 ^ w1, y3};

endmodule
