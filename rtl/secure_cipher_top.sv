// secure_cipher_top -- Secure Cipher encryptor: key generation plus the
// fully unrolled five-round encryption block between two register stages.
//
// Each clock with in_valid high, the 128-bit key and plaintext are captured.
// In the following cycle the key generation block expands the captured key
// into the round keys K1..K5 and the unrolled rounds encrypt the captured
// block, all in one combinational path; the ciphertext is registered at the
// end of that cycle. Latency is therefore 2 clocks from in_valid to
// out_valid and a new block (with its own key, if wanted) can be accepted
// every clock. The key generator and the rounds follow the cipher; the two
// register stages, the valid flags and the reset are this design's own, since
// the cipher is specified as a single combinational path.
//
// Interface: clk, rst_n (asynchronous, active low; clears the valid flags
// only), in_valid, key[127:0], plaintext[127:0] in; out_valid,
// ciphertext[127:0] out.
module secure_cipher_top
  import secure_cipher_pkg::*;
#(
  parameter int NUM_ROUNDS = NUM_ROUNDS_DEFAULT
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t key,
  input  block_t plaintext,
  output logic   out_valid,
  output block_t ciphertext
);

  // The key generator produces five round keys; more rounds would need more.
  initial assert (NUM_ROUNDS >= 1 && NUM_ROUNDS <= 5)
    else $error("secure_cipher_top: NUM_ROUNDS must be 1..5");

  logic   s1_valid;
  block_t s1_key, s1_text;
  word_t  rk_all [5];
  word_t  rk [NUM_ROUNDS];
  block_t ct;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      s1_key  <= key;
      s1_text <= plaintext;
    end
  end

  key_gen u_key_gen (
    .key       (s1_key),
    .round_key (rk_all)
  );

  for (genvar r = 0; r < NUM_ROUNDS; r++) begin : g_rk
    assign rk[r] = rk_all[r];
  end

  encrypt_unrolled #(.NUM_ROUNDS(NUM_ROUNDS)) u_encrypt (
    .plaintext  (s1_text),
    .round_key  (rk),
    .ciphertext (ct)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;
  end

  always_ff @(posedge clk) begin
    if (s1_valid) ciphertext <= ct;
  end

endmodule
