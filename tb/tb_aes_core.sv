// tb_aes_core: checks the AES core in both directions for all three key
// lengths. It uses the FIPS-197 example vectors (appendix B, and C.1, C.2,
// C.3 for 128, 192 and 256-bit keys), then random keys and blocks compared
// with the reference model, including a decrypt of every ciphertext. It also
// checks that done comes exactly 1 + Nr clocks after start (11, 13, 15) and
// that start is ignored before the key is ready.
module tb_aes_core;
  import aes_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic key_load = 1'b0, key_ready, start = 1'b0, decrypt = 1'b0, ready, done;
  key_t key = '0;
  key_len_e key_len = KEY_128;
  int exp_lat = 11;
  block_t din = '0, dout;
  int checks = 0, failures = 0;

  aes_core dut (.clk, .rst_n, .key_load, .key, .key_len, .key_ready, .start, .decrypt, .din,
                .ready, .done, .dout);

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic set_key(input key_t k, input key_len_e kl);
    @(negedge clk); key = k; key_len = kl; key_load = 1'b1;
    exp_lat = (kl == KEY_128) ? 11 : (kl == KEY_192) ? 13 : 15;
    @(negedge clk); key_load = 1'b0;
    while (!key_ready) @(negedge clk);
  endtask

  // Run one block; returns the result and the start-to-done clock count.
  task automatic run(input logic dec, input block_t d, output block_t r, output int cyc);
    while (!ready) @(negedge clk);
    decrypt = dec; din = d; start = 1'b1;
    @(negedge clk); start = 1'b0; din = '0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    r = dout;
  endtask

  task automatic check_block(input logic dec, input block_t d, input block_t exp, input string what);
    block_t r;
    int cyc;
    run(dec, d, r, cyc);
    check(r, exp, what);
    checks++;
    if (cyc != exp_lat) begin failures++; $display("FAIL %s latency %0d", what, cyc); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // start while no key has been expanded must be ignored
    @(negedge clk); start = 1'b1; din = '1;
    @(negedge clk); start = 1'b0;
    repeat (17) begin
      checks++;
      if (done) begin failures++; $display("FAIL start accepted without key"); end
      @(negedge clk);
    end

    set_key({128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0}, KEY_128);
    check_block(1'b0, 128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32, "FIPS B enc");
    check_block(1'b1, 128'h3925841d02dc09fbdc118597196a0b32, 128'h3243f6a8885a308d313198a2e0370734, "FIPS B dec");
    set_key({128'h000102030405060708090a0b0c0d0e0f, 128'h0}, KEY_128);
    check_block(1'b0, 128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "FIPS C.1 enc");
    check_block(1'b1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h00112233445566778899aabbccddeeff, "FIPS C.1 dec");
    set_key({192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0}, KEY_192);
    check_block(1'b0, 128'h00112233445566778899aabbccddeeff, 128'hdda97ca4864cdfe06eaf70a0ec0d7191, "FIPS C.2 enc");
    check_block(1'b1, 128'hdda97ca4864cdfe06eaf70a0ec0d7191, 128'h00112233445566778899aabbccddeeff, "FIPS C.2 dec");
    set_key(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, KEY_256);
    check_block(1'b0, 128'h00112233445566778899aabbccddeeff, 128'h8ea2b7ca516745bfeafc49904b496089, "FIPS C.3 enc");
    check_block(1'b1, 128'h8ea2b7ca516745bfeafc49904b496089, 128'h00112233445566778899aabbccddeeff, "FIPS C.3 dec");

    for (int t = 0; t < 9; t++) begin
      key_t k;
      key_len_e kl;
      int nk;
      block_t p, c;
      kl = key_len_e'(t % 3);
      nk = (kl == KEY_128) ? 4 : (kl == KEY_192) ? 6 : 8;
      k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      for (int b = 32*nk; b < 256; b++) k[255 - b] = 1'b0;
      set_key(k, kl);
      for (int b = 0; b < 4; b++) begin
        p = {$urandom, $urandom, $urandom, $urandom};
        c = aes_ref_pkg::encrypt(k, nk, p);
        check_block(1'b0, p, c, $sformatf("rand enc %0d.%0d", t, b));
        check_block(1'b1, c, p, $sformatf("rand dec %0d.%0d", t, b));
        c = {$urandom, $urandom, $urandom, $urandom};
        check_block(1'b1, c, aes_ref_pkg::decrypt(k, nk, c), $sformatf("rand ref dec %0d.%0d", t, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
