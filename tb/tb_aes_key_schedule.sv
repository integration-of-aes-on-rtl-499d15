// tb_aes_key_schedule: checks the key expansion for all three key lengths.
// Known values: the FIPS-197 appendix A examples (first, second and last
// round keys for the 128-bit key 2b7e1516..., the last word of the 192-bit
// and 256-bit examples). Random keys of each length are compared round key by
// round key with the reference model. It also checks that key_ready rises
// exactly 11, 13 and 14 clocks after key_load and that nr reports 10, 12, 14.
module tb_aes_key_schedule;
  import aes_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic key_load = 1'b0, key_ready;
  key_t key = '0;
  key_len_e key_len = KEY_128;
  logic [3:0] nr;
  block_t rk;
  logic [3:0] rk_idx = '0;
  int checks = 0, failures = 0;

  aes_key_schedule dut (.clk, .rst_n, .key_load, .key, .key_len, .key_ready, .nr, .rk_idx, .rk);

  task automatic check(input logic [127:0] got, input logic [127:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic load_and_wait(input key_t k, input key_len_e kl);
    int cycles, exp_cyc, exp_nr;
    @(negedge clk); key = k; key_len = kl; key_load = 1'b1;
    @(negedge clk); key_load = 1'b0;
    cycles = 1;
    while (!key_ready) begin @(negedge clk); cycles++; end
    exp_cyc = (kl == KEY_128) ? 11 : (kl == KEY_192) ? 13 : 14;
    exp_nr  = (kl == KEY_128) ? 10 : (kl == KEY_192) ? 12 : 14;
    checks++;
    if (cycles != exp_cyc || nr != 4'(exp_nr)) begin
      failures++;
      $display("FAIL key length %0d: ready after %0d, nr %0d", kl, cycles, nr);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] ref_rk [15];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    load_and_wait({128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0}, KEY_128);
    rk_idx = 4'd0;  #1 check(rk, 128'h2b7e151628aed2a6abf7158809cf4f3c, "128 rk0");
    rk_idx = 4'd1;  #1 check(rk, 128'ha0fafe1788542cb123a339392a6c7605, "128 rk1");
    rk_idx = 4'd10; #1 check(rk, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "128 rk10");
    load_and_wait({192'h8e73b0f7da0e6452c810f32b809079e562f8ead2522c6b7b, 64'h0}, KEY_192);
    rk_idx = 4'd12; #1 check(128'(rk[31:0]), 128'h01002202, "192 w51");
    load_and_wait(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4, KEY_256);
    rk_idx = 4'd14; #1 check(128'(rk[31:0]), 128'h706c631e, "256 w59");
    for (int t = 0; t < 12; t++) begin
      key_t k;
      key_len_e kl;
      int nk;
      kl = key_len_e'(t % 3);
      nk = (kl == KEY_128) ? 4 : (kl == KEY_192) ? 6 : 8;
      k = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      for (int b = 32*nk; b < 256; b++) k[255 - b] = 1'b0;
      load_and_wait(k, kl);
      aes_ref_pkg::expand(k, nk, ref_rk);
      for (int r = 0; r <= nk + 6; r++) begin
        rk_idx = 4'(r); #1;
        check(rk, ref_rk[r], $sformatf("key %0d (nk %0d) rk%0d", t, nk, r));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
