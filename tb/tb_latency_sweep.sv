// tb_latency_sweep: measures the tile's batch latency for 100 to 300
// requests in steps of 25 (one request = one 128-bit block), at default
// parameters, over an ideal network at 100 MHz. Each batch is checked against
// the reference AES model, and the latency must grow by exactly 29 clocks per
// added request (4 fetch + 21 tile + 4 write-back), i.e. linearly.
module tb_latency_sweep;
  import aes_pkg::*;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cmd_start = 1'b0, cmd_decrypt = 1'b0, busy, done, cmd_error;
  key_t cmd_key = '0;
  key_len_e cmd_key_len = KEY_128;
  logic [31:0] cmd_src = '0, cmd_dst = '0;
  logic [15:0] cmd_nblocks = '0;
  logic tx_valid, tx_ready, rx_valid, rx_ready, rx_drop;
  flit_t tx_flit, rx_flit;
  int checks = 0, failures = 0;

  aes_crypto_tile dut (.*);
  noc_mem_model u_ext (.clk, .rst_n, .in_valid(tx_valid), .in_ready(tx_ready), .in_flit(tx_flit),
                       .out_valid(rx_valid), .out_ready(rx_ready), .out_flit(rx_flit));

  initial begin
    #50000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_t key;
    int cyc, prev;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 300 * 16; a += 4) u_ext.mem[32'h1_0000 + a] = $urandom;
    key = {$urandom, $urandom, $urandom, $urandom, 128'h0};
    prev = -1;
    for (int n = 100; n <= 300; n += 25) begin
      @(negedge clk);
      cmd_start = 1'b1; cmd_key = key; cmd_src = 32'h1_0000; cmd_dst = 32'h2_0000;
      cmd_nblocks = 16'(n);
      @(negedge clk); cmd_start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      $display("requests %0d: latency %0d cycles = %0d ns", n, cyc, cyc * 10);
      for (int b = 0; b < n; b += 7) begin
        block_t p, c;
        for (int k = 0; k < 4; k++) begin
          p[127 - 32*k -: 32] = u_ext.mem[32'(32'h1_0000 + 16*b + 4*k)];
          c[127 - 32*k -: 32] = u_ext.mem[32'(32'h2_0000 + 16*b + 4*k)];
        end
        checks++;
        if (c !== aes_ref_pkg::encrypt(key, 4, p)) begin failures++; $display("FAIL n=%0d block %0d", n, b); end
      end
      if (prev >= 0) begin
        checks++;
        if (cyc - prev != 25 * 29) begin failures++; $display("FAIL step %0d", cyc - prev); end
      end
      prev = cyc;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
