// encrypt_unrolled -- the fully loop-unrolled Secure Cipher encryption block.
//
// NUM_ROUNDS copies of enc_round are chained so that the output of round r
// is the input of round r+1; round r (1-based) uses round key K_Rr. The
// plaintext enters round 1 and the output of the last round is the
// ciphertext, with nothing added before or after the rounds. There is no
// register between rounds: the whole block is one combinational path, as in
// the cipher's full-unroll implementation, so one block can be encrypted per
// clock of a surrounding register stage.
//
// Interface: plaintext (128 bits) and round_key[0..NUM_ROUNDS-1] (32 bits
// each, index 0 = K_R1) in; ciphertext (128 bits) out.
module encrypt_unrolled
  import secure_cipher_pkg::*;
#(
  parameter int NUM_ROUNDS = NUM_ROUNDS_DEFAULT
) (
  input  block_t plaintext,
  input  word_t  round_key [NUM_ROUNDS],
  output block_t ciphertext
);

  block_t state [NUM_ROUNDS + 1];

  assign state[0] = plaintext;

  for (genvar r = 0; r < NUM_ROUNDS; r++) begin : g_round
    enc_round u_round (
      .din  (state[r]),
      .rk   (round_key[r]),
      .dout (state[r+1])
    );
  end

  assign ciphertext = state[NUM_ROUNDS];

endmodule
