// tb_fixed_matrix_mult -- self-checking testbench for the LUT-based fixed
// matrix multiplication with each of FM1..FM4.
//
// Every 8-bit row value is applied to all four rows at once and the sixteen
// result bytes are compared with a sum of products computed by the reference
// model. Hand-derived checks: with FM1 the first result column equals the
// row itself (its column is 128,64,...,1) and the second is the row rotated
// right by one; with FM4, whose second column holds 16 twice, selecting both
// 16 entries gives 32.
module tb_fixed_matrix_mult;
  import secure_cipher_pkg::*;
  import secure_cipher_ref_pkg::*;

  int checks = 0, failures = 0;
  word_t  rs;
  block_t fmo [4];

  for (genvar m = 0; m < 4; m++) begin : g_fm
    fixed_matrix_mult #(.FM_SEL(m + 1)) dut (.rs(rs), .fmo(fmo[m]));
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: rs %h got %0d expected %0d", what, rs, got, exp);
    end
  endtask

  function automatic int byte_at(block_t b, int i, int j);
    return int'(b[127 - 8*(4*i + j) -: 8]);
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      byte_t b;
      b  = byte_t'(v);
      rs = {b, b, b, b}; #1;
      check("FM1 column 0 is identity", byte_at(fmo[0], 2, 0), v);
      check("FM1 column 1 is rotate", byte_at(fmo[0], 1, 1), int'({b[0], b[7:1]}));
      for (int m = 0; m < 4; m++) begin
        bmat_t p;
        p = fm_multiply(to_mat(rs), m);
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            check($sformatf("FM%0d (%0d,%0d)", m + 1, i, j), byte_at(fmo[m], i, j), p[i][j]);
      end
    end
    // FM4 column 1: entries a=3 and a=6 are both 16
    rs = {8'b0001_0010, 24'h0}; #1;
    check("FM4 repeated 16", byte_at(fmo[3], 0, 1), 32);
    // random, rows differ
    for (int n = 0; n < 500; n++) begin
      rs = $urandom; #1;
      for (int m = 0; m < 4; m++) begin
        bmat_t p;
        p = fm_multiply(to_mat(rs), m);
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++)
            check("random", byte_at(fmo[m], i, j), p[i][j]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
