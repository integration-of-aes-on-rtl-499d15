// tb_aes_crypto_tile: end-to-end test of the crypto tile at its default
// parameters, connected to a model of the NoC and external memory.
//
//   1. 100 blocks (requests) encrypted over an ideal network; the output in
//      external memory is compared with the reference AES model and the
//      latency is checked exactly: 29 clocks per block (4 to fetch its
//      words, 21 in the tile, 4 to write them back) plus 9 clocks of fixed
//      overhead (command capture, the network round trips through the NI
//      buffers at the end of fetch and of write-back, and the finish).
//   2. The ciphertext decrypted back under a congested network (refused
//      requests, random delays, reordered responses, flits for other tiles)
//      and compared with the original plaintext.
//   3. 192-bit and 256-bit keys (8 blocks each, ideal network, latency
//      29/31/33 clocks per block for 128/192/256-bit keys, core 11/13/15),
//      a zero-block command and a batch larger than the internal memory
//      (must raise cmd_error).
// Each mechanism is counted and must happen at least once.
module tb_aes_crypto_tile;
  import aes_pkg::*;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;   // 100 MHz

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

  int n_drop = 0, n_req_stall = 0, n_keylen = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid && rx_drop) n_drop++;
    if (dut.req_valid && !dut.req_ready) n_req_stall++;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic run_cmd(input logic dec, input key_t key, input int src, input int dst,
                         input int n, output int cycles);
    @(negedge clk);
    cmd_start = 1'b1; cmd_decrypt = dec; cmd_key = key; cmd_src = src; cmd_dst = dst;
    cmd_nblocks = 16'(n);
    @(negedge clk); cmd_start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  function automatic block_t ext_block(input int base, input int b);
    block_t r;
    for (int k = 0; k < 4; k++) begin
      logic [31:0] a;
      a = 32'(base + 16*b + 4*k);
      r[127 - 32*k -: 32] = u_ext.mem.exists(a) ? u_ext.mem[a] : 32'h0;
    end
    return r;
  endfunction

  initial begin
    #20000000;
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 100;
  localparam int PT = 32'h0001_0000, CT = 32'h0002_0000, RT = 32'h0003_0000;

  initial begin
    key_t key, key2;
    int cyc, budget;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < N * 16; a += 4) u_ext.mem[32'(PT + a)] = $urandom;
    key = {$urandom, $urandom, $urandom, $urandom, 128'h0};

    // 1. encryption, ideal network
    run_cmd(1'b0, key, PT, CT, N, cyc);
    for (int b = 0; b < N; b++) begin
      checks++;
      if (ext_block(CT, b) !== aes_ref_pkg::encrypt(key, 4, ext_block(PT, b)))
        fail($sformatf("enc block %0d", b));
    end
    budget = 29*N + 9;
    checks++;
    if (cyc != budget) fail($sformatf("latency %0d cycles, budget %0d", cyc, budget));
    $display("encrypt %0d blocks: %0d cycles = %0d ns at 100 MHz", N, cyc, cyc * 10);
    checks++;
    if (cmd_error) fail("error flag on a valid command");

    // 2. decryption under a congested network
    u_ext.stall_pct = 40; u_ext.max_delay = 8; u_ext.reorder = 1; u_ext.foreign_pct = 10;
    run_cmd(1'b1, key, CT, RT, N, cyc);
    $display("decrypt %0d blocks, congested: %0d cycles", N, cyc);
    for (int b = 0; b < N; b++) begin
      checks++;
      if (ext_block(RT, b) !== ext_block(PT, b)) fail($sformatf("roundtrip block %0d", b));
    end
    u_ext.stall_pct = 0; u_ext.max_delay = 1; u_ext.reorder = 0; u_ext.foreign_pct = 0;

    // 3. 192 and 256-bit keys
    for (int kl = 1; kl <= 2; kl++) begin
      int nk;
      nk = (kl == 1) ? 6 : 8;
      key2 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      if (kl == 1) key2[63:0] = '0;
      cmd_key_len = key_len_e'(kl);
      run_cmd(1'b0, key2, PT, CT, 8, cyc);
      checks++;
      if (cyc != (29 + 2*kl) * 8 + 9) fail($sformatf("key length %0d: latency %0d", kl, cyc));
      for (int b = 0; b < 8; b++) begin
        checks++;
        if (ext_block(CT, b) !== aes_ref_pkg::encrypt(key2, nk, ext_block(PT, b)))
          fail($sformatf("key length %0d block %0d", kl, b));
      end
      n_keylen++;
    end
    run_cmd(1'b0, key2, PT, CT, 0, cyc);
    checks++; if (cmd_error) fail("zero-block command flagged");
    run_cmd(1'b0, key2, PT, CT, 513, cyc);
    checks++; if (!cmd_error) fail("oversized batch not flagged");

    // mechanisms
    $display("NI back-pressure cycles %0d, refused flits %0d, reordered responses %0d, dropped foreign flits %0d",
             n_req_stall, u_ext.n_refused, u_ext.n_reordered, n_drop);
    checks++; if (n_req_stall == 0)       fail("NI back-pressure never happened");
    checks++; if (u_ext.n_refused == 0)   fail("NoC never refused a flit");
    checks++; if (u_ext.n_reordered == 0) fail("responses never reordered");
    checks++; if (n_drop == 0)            fail("no foreign flit dropped");
    checks++; if (n_keylen != 2)          fail("192/256-bit keys not both run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
