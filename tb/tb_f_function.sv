// tb_f_function -- self-checking testbench for the F function.
//
// Drives directed and random 32-bit inputs and compares the output with the
// reference model. Directed cases: an input whose four bytes are all
// 8'hC3 (rotations 8'hC3, 8'h87, 8'h0F, 8'h1E) worked out by hand from the
// tables, and single-byte inputs that show each byte reaches its own SBOX
// through its own rotation.
module tb_f_function;
  import secure_cipher_pkg::*;
  import secure_cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  word_t din, dout;

  f_function dut (.din(din), .dout(dout));

  task automatic check(string what, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: in %h got %h expected %h", what, din, got, exp);
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
    // byte 0: C3 -> row 15 col 0 of SB1 = 8C
    // byte 1: C3 rotl 1 = 87 = 10_0001_11 -> row 11 col 1 of SB2 = EC
    // byte 2: C3 rotl 2 = 0F = 00_0011_11 -> row 3  col 3 of SB3 = F1
    // byte 3: C3 rotl 3 = 1E = 00_0111_10 -> row 2  col 7 of SB4 = 61
    din = 32'hC3C3_C3C3; #1; check("hand vector", dout, 32'h8CEC_F161);
    for (int n = 0; n < 4; n++) begin
      din = 32'h0000_0001 << (8 * (3 - n)); #1;
      check($sformatf("byte %0d lane", n), dout, ref_f(din));
    end
    for (int i = 0; i < 2000; i++) begin
      din = $urandom; #1;
      check("random", dout, ref_f(din));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
