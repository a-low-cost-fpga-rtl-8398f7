// tb_image_workload -- runs the security workloads of the cipher through
// secure_cipher_top.
//
// 1. Image encryption: a 256x256 8-bit grey-scale test image is generated
//    (smooth gradients plus two flat discs, so that it has a peaked histogram
//    and strongly correlated neighbours like a photograph) and encrypted as
//    4096 128-bit blocks (16 pixels per block, row-major) under one key, one
//    block per clock. Every ciphertext is checked against the reference
//    model. The round structure passes the two outer words through XNORs
//    with the round keys only, and K5 = K1^K2^K3^K4 makes the five keys
//    cancel, so the outer words of every ciphertext must be the complement
//    of the plaintext's: this is checked for every block. The histogram
//    (chi-square, 255 degrees of freedom) and the correlation of horizontally
//    adjacent pixels are printed for the plain image, the whole encrypted
//    image and the pixels of the two inner words; the inner-word pixels must
//    be nearly uncorrelated (|r| < 0.1). Every operation of the cipher works
//    on the bytes of a word lane by lane, so an inner ciphertext byte depends
//    only on the same byte lane of the four plaintext words; the number of
//    grey levels this leaves is printed, not checked.
// 2. Strict avalanche criterion: 1000 variations, each flipping one random
//    bit of the key (even variations) or of the plaintext (odd variations).
//    The mean fraction of changed ciphertext bits is printed. Checked: a flip
//    in an inner plaintext word changes exactly one ciphertext bit (inner
//    words are only ever XORed with F outputs of the outer words), and a key
//    flip never changes the outer ciphertext words; a plaintext flip changes
//    nothing outside its own byte lane of the four words.
module tb_image_workload;
  import secure_cipher_pkg::*;
  import secure_cipher_ref_pkg::*;

  localparam int W = 256, H = 256;
  localparam int NBLK = W * H / 16;
  localparam int NVAR = 1000;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   in_valid = 1'b0;
  block_t key = '0, plaintext = '0;
  logic   out_valid;
  block_t ciphertext;

  int     checks = 0, failures = 0;
  byte_t  img [W*H];
  byte_t  enc [W*H];

  secure_cipher_top dut (
    .clk, .rst_n, .in_valid, .key, .plaintext, .out_valid, .ciphertext
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NBLK + 4 * NVAR + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Correlation of horizontally adjacent pixels; with inner_only, only pairs
  // that both lie in the two inner words of a block (bytes 4..11).
  function automatic real corr_h(const ref byte_t p [W*H], input bit inner_only);
    real sx = 0, sy = 0, sxx = 0, syy = 0, sxy = 0, n = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x + 1 < W; x++) begin
        real a, b;
        if (inner_only && !(x % 16 >= 4 && x % 16 < 11)) continue;
        a = real'(p[y*W + x]);
        b = real'(p[y*W + x + 1]);
        sx += a; sy += b; sxx += a*a; syy += b*b; sxy += a*b; n += 1;
      end
    return (n*sxy - sx*sy) / ($sqrt(n*sxx - sx*sx) * $sqrt(n*syy - sy*sy));
  endfunction

  task automatic encrypt_one(block_t k, block_t p, output block_t c);
    @(negedge clk);
    key = k; plaintext = p; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    @(posedge clk); #1;
    c = ciphertext;
  endtask

  initial begin
    block_t img_key = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210;
    rk_t    k;
    int     hist [256];
    real    chi, c_plain, c_enc;
    int     out_idx = 0;

    // ---- test image
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = (x + y) / 2;
        if ((x-80)*(x-80) + (y-90)*(y-90) < 40*40)   v = 200;
        if ((x-170)*(x-170) + (y-160)*(y-160) < 50*50) v = 30;
        img[y*W + x] = byte_t'(v);
      end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- stream the image, one block per clock
    fork
      begin
        for (int b = 0; b < NBLK; b++) begin
          @(negedge clk);
          in_valid = 1'b1;
          key = img_key;
          for (int i = 0; i < 16; i++) plaintext[127-8*i -: 8] = img[16*b + i];
        end
        @(negedge clk);
        in_valid = 1'b0;
      end
      begin
        while (out_idx < NBLK) begin
          @(posedge clk); #1;
          if (out_valid) begin
            for (int i = 0; i < 16; i++) enc[16*out_idx + i] = ciphertext[127-8*i -: 8];
            out_idx++;
          end
        end
      end
    join

    k = ref_keygen(img_key);
    for (int b = 0; b < NBLK; b++) begin
      block_t p, c;
      for (int i = 0; i < 16; i++) begin
        p[127-8*i -: 8] = img[16*b + i];
        c[127-8*i -: 8] = enc[16*b + i];
      end
      checks++;
      if (c != ref_encrypt(p, k)) begin
        failures++;
        $display("FAIL image block %0d", b);
      end
    end

    // outer words are the complement of the plaintext words
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 16; i++)
        if (i < 4 || i >= 12) begin
          checks++;
          if (enc[16*b + i] != ~img[16*b + i]) begin
            failures++;
            $display("FAIL outer byte %0d of block %0d is not complemented", i, b);
          end
        end

    foreach (hist[i]) hist[i] = 0;
    foreach (enc[i]) hist[enc[i]]++;
    chi = 0;
    foreach (hist[i]) chi += (real'(hist[i]) - 256.0) ** 2 / 256.0;
    c_plain = corr_h(img, 0);
    c_enc   = corr_h(enc, 0);
    $display("image: whole encrypted image: chi-square %0.1f, adjacent correlation %0.4f (plain %0.4f)",
             chi, c_enc, c_plain);
    foreach (hist[i]) hist[i] = 0;
    foreach (enc[i]) if (i % 16 >= 4 && i % 16 < 12) hist[enc[i]]++;
    chi = 0;
    foreach (hist[i]) chi += (real'(hist[i]) - 128.0) ** 2 / 128.0;
    c_enc = corr_h(enc, 1);
    $display("image: inner-word pixels: chi-square %0.1f, adjacent correlation %0.4f", chi, c_enc);
    begin
      int used = 0;
      foreach (hist[i]) if (hist[i] != 0) used++;
      $display("image: inner-word pixels use %0d of 256 grey levels", used);
    end
    checks++; if (!(c_plain > 0.9)) begin failures++; $display("FAIL test image not correlated"); end
    checks++; if (!(c_enc < 0.1 && c_enc > -0.1)) begin failures++; $display("FAIL inner-word pixels correlated"); end

    // ---- strict avalanche criterion
    begin
      real    sum_key = 0, sum_pt = 0;
      int     n_key = 0, n_pt = 0, n_inner = 0;
      for (int v = 0; v < NVAR; v++) begin
        block_t k0, p0, k1, p1, c0, c1;
        int     bitpos;
        k0 = {$urandom, $urandom, $urandom, $urandom};
        p0 = {$urandom, $urandom, $urandom, $urandom};
        bitpos = $urandom_range(0, 127);
        k1 = k0; p1 = p0;
        if (v % 2 == 0) k1[bitpos] = ~k1[bitpos];
        else            p1[bitpos] = ~p1[bitpos];
        encrypt_one(k0, p0, c0);
        encrypt_one(k1, p1, c1);
        checks++;
        if (c1 != ref_encrypt(p1, ref_keygen(k1))) begin
          failures++;
          $display("FAIL avalanche variation %0d", v);
        end
        if (v % 2 == 0) begin
          checks++;
          if ({c0[127:96], c0[31:0]} != {c1[127:96], c1[31:0]}) begin
            failures++;
            $display("FAIL key flip changed an outer ciphertext word");
          end
        end else if (bitpos >= 32 && bitpos < 96) begin
          checks++;
          n_inner++;
          if ($countones(c0 ^ c1) != 1) begin
            failures++;
            $display("FAIL inner plaintext flip changed %0d bits", $countones(c0 ^ c1));
          end
        end
        if (v % 2 == 1) begin
          // every operation is lane-wise: only the flipped bit's byte lane
          // of the four words may change
          block_t lane_mask;
          lane_mask = {4{32'hFF00_0000 >> (8 * ((127 - bitpos) % 32 / 8))}};
          checks++;
          if (((c0 ^ c1) & ~lane_mask) != '0) begin
            failures++;
            $display("FAIL plaintext flip left its byte lane");
          end
        end
        if (v % 2 == 0) begin sum_key += real'($countones(c0 ^ c1)) / 128.0; n_key++; end
        else            begin sum_pt  += real'($countones(c0 ^ c1)) / 128.0; n_pt++;  end
      end
      $display("avalanche: key bit flips %0.2f %%, plaintext bit flips %0.2f %%, mean %0.2f %%",
               100.0 * sum_key / n_key, 100.0 * sum_pt / n_pt,
               100.0 * (sum_key + sum_pt) / (n_key + n_pt));
      checks++;
      if (n_inner == 0) begin
        failures++;
        $display("FAIL no inner-word plaintext flip was tried");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
