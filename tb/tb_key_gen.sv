// tb_key_gen -- self-checking testbench for the key generation block.
//
// Random keys are compared with the reference key schedule, and K5 is also
// checked to be the XOR of K1..K4. The all-zero key is worked out by hand:
// every XNOR gives ones, so each multiplication sees all-ones rows; FM1..FM3
// then give 8'hFF everywhere (K1 = K3 = 0 after XOR, K2 = all ones after
// XNOR), while FM4's second column sums to 263 mod 256 = 8'h07, whose odd
// nibble parity clears bits 28, 22, 8 and 2 of K4 = 32'hEFBFFEFB, so
// K5 = 32'h10400104.
module tb_key_gen;
  import secure_cipher_pkg::*;
  import secure_cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  block_t key;
  word_t  rk [5];

  key_gen dut (.key(key), .round_key(rk));

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: key %h got %h expected %h", what, key, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = '0; #1;
    check("zero key K1", rk[0], 32'h0000_0000);
    check("zero key K2", rk[1], 32'hFFFF_FFFF);
    check("zero key K3", rk[2], 32'h0000_0000);
    check("zero key K4", rk[3], 32'hEFBF_FEFB);
    check("zero key K5", rk[4], 32'h1040_0104);
    for (int i = 0; i < 2000; i++) begin
      rk_t k;
      key = {$urandom, $urandom, $urandom, $urandom};
      #1;
      k = ref_keygen(key);
      for (int r = 0; r < 5; r++) check($sformatf("K%0d", r + 1), rk[r], k[r]);
      check("K5 = xor of K1..K4", rk[4], rk[0] ^ rk[1] ^ rk[2] ^ rk[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
