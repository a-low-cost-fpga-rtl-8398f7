// tb_enc_round -- self-checking testbench for one encryption round.
//
// Random state and round key are compared with the reference round; every
// output is also run through the reference inverse round to check that the
// plaintext comes back. Directed checks: the outer words must equal
// W0 xnor Kr and W3 xnor Kr, and an all-zero state with an all-ones key
// gives outer words of zero and inner words F(0) (the XNOR of 0 and 1 is 0).
module tb_enc_round;
  import secure_cipher_pkg::*;
  import secure_cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  block_t din, dout;
  word_t  rk;

  enc_round dut (.din(din), .rk(rk), .dout(dout));

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
    din = '0; rk = '1; #1;
    check("zero state, ones key", dout, {32'h0, ref_f(32'h0), ref_f(32'h0), 32'h0});
    for (int i = 0; i < 2000; i++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      rk  = $urandom;
      #1;
      check("round", dout, ref_round(din, rk));
      check("outer words", {dout[127:96], dout[31:0]}, {~(din[127:96] ^ rk), ~(din[31:0] ^ rk)});
      check("inverse", ref_unround(dout, rk), din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
