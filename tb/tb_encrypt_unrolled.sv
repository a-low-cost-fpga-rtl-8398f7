// tb_encrypt_unrolled -- self-checking testbench for the five unrolled rounds.
//
// Random plaintexts and round keys: the ciphertext must match the reference
// model and decrypt back to the plaintext. A directed check swaps two round
// keys, which must change the ciphertext (each round uses its own key, in
// order). The block is combinational, so the result is checked one time step
// after the inputs change.
module tb_encrypt_unrolled;
  import secure_cipher_pkg::*;
  import secure_cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  block_t pt, ct;
  word_t  rk [5];
  rk_t    k;

  encrypt_unrolled dut (.plaintext(pt), .round_key(rk), .ciphertext(ct));

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    for (int i = 0; i < 1000; i++) begin
      pt = {$urandom, $urandom, $urandom, $urandom};
      for (int r = 0; r < 5; r++) begin
        k[r]  = $urandom;
        rk[r] = k[r];
      end
      #1;
      check("encrypt", ct, ref_encrypt(pt, k));
      check("round trip", ref_decrypt(ct, k), pt);
    end
    begin
      block_t c0;
      word_t  t;
      c0 = ct;
      t = rk[1]; rk[1] = rk[3]; rk[3] = t;
      #1;
      checks++;
      if (ct == c0 && rk[1] != rk[3]) begin
        failures++;
        $display("FAIL round key order has no effect");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
