// tb_secure_cipher_top -- end-to-end testbench of the Secure Cipher encryptor
// at its default parameters.
//
// Streams blocks into secure_cipher_top with a random valid pattern and
// random keys and checks every ciphertext against the reference model, and
// every ciphertext's decryption against its plaintext. Each accepted block
// is stamped with its cycle; its result must appear exactly 2 clocks later,
// so the test also checks the latency and that one block per clock is
// sustained. It counts how often each mechanism of the design occurred and
// fails any that never did: blocks accepted on consecutive clocks, a key
// change between consecutive blocks, a key reused across blocks, an idle
// clock, and a reset in the middle of a stream (blocks in flight are then
// dropped and must not appear).
module tb_secure_cipher_top;
  import secure_cipher_pkg::*;
  import secure_cipher_ref_pkg::*;

  localparam int NBLOCKS = 3000;

  typedef struct {
    block_t pt;
    block_t key;
    longint due;
  } exp_t;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   in_valid = 1'b0;
  block_t key = '0, plaintext = '0;
  logic   out_valid;
  block_t ciphertext;

  int     checks = 0, failures = 0;
  longint cycle = 0;
  exp_t   pending [$];
  int     n_back_to_back = 0, n_key_change = 0, n_key_reuse = 0;
  int     n_idle = 0, n_reset = 0, n_out = 0;

  secure_cipher_top dut (
    .clk, .rst_n, .in_valid, .key, .plaintext, .out_valid, .ciphertext
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at cycle %0d: got %h expected %h", what, cycle, got, exp);
    end
  endtask

  task automatic count_mech(string what, int n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (20 * NBLOCKS) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: sample just after each rising edge.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    #1;
    if (rst_n && out_valid) begin
      n_out++;
      checks++;
      if (pending.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        exp_t e;
        rk_t  k;
        e = pending.pop_front();
        if (e.due != cycle) begin
          failures++;
          $display("FAIL latency: output at cycle %0d, due %0d", cycle, e.due);
        end
        k = ref_keygen(e.key);
        check("ciphertext", ciphertext, ref_encrypt(e.pt, k));
        check("decrypts to plaintext", ref_decrypt(ciphertext, k), e.pt);
      end
    end else if (rst_n && pending.size() > 0 && pending[0].due <= cycle) begin
      checks++;
      failures++;
      $display("FAIL missing output due at cycle %0d", pending[0].due);
      void'(pending.pop_front());
    end
  end

  initial begin
    int     sent = 0;
    logic   prev_valid = 1'b0;
    block_t prev_key = '0;
    logic   have_prev = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (sent < NBLOCKS) begin
      @(negedge clk);
      if (sent == NBLOCKS / 2) begin
        // reset in the middle of a stream, with blocks in flight
        in_valid = 1'b1;
        key = {$urandom, $urandom, $urandom, $urandom};
        plaintext = {$urandom, $urandom, $urandom, $urandom};
        @(negedge clk);
        rst_n = 1'b0;
        in_valid = 1'b0;
        pending.delete();
        n_reset++;
        sent++;
        @(negedge clk);
        rst_n = 1'b1;
        prev_valid = 1'b0;
        continue;
      end
      in_valid = ($urandom_range(0, 99) < 75);
      if (in_valid) begin
        if (!have_prev || $urandom_range(0, 3) == 0)
          key = {$urandom, $urandom, $urandom, $urandom};
        plaintext = {$urandom, $urandom, $urandom, $urandom};
        if (have_prev && key != prev_key) n_key_change++;
        if (have_prev && key == prev_key) n_key_reuse++;
        if (prev_valid) n_back_to_back++;
        pending.push_back('{pt: plaintext, key: key, due: cycle + 2});
        prev_key = key;
        have_prev = 1'b1;
        sent++;
      end else begin
        n_idle++;
      end
      prev_valid = in_valid;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (pending.size() != 0) begin
      failures++;
      $display("FAIL %0d blocks never came out", pending.size());
    end
    count_mech("blocks on consecutive clocks", n_back_to_back);
    count_mech("key change between blocks", n_key_change);
    count_mech("key reused across blocks", n_key_reuse);
    count_mech("idle clock", n_idle);
    count_mech("reset mid-stream", n_reset);
    $display("blocks out %0d", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
