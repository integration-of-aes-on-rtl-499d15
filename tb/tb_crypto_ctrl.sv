// tb_crypto_ctrl: runs the controller with the real AES core and internal
// memory, and a model of the network side (external memory reached with
// request/response handshakes, random acceptance, random response delay and
// responses returned out of order). Each command's output in external
// memory is compared with the reference AES model. Also checked: that the
// AES core is started every 21 clocks once the batch is in internal memory
// (5 load + 1 start + 11 AES + 4 store), decrypt mode, a zero-block command
// and a batch too large for the internal memory (cmd_error). The round trip
// under the random network uses a 256-bit key.
module tb_crypto_ctrl;
  import aes_pkg::*;

  localparam int unsigned DEPTH = 256;   // small memory keeps the run short
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cmd_start = 1'b0, cmd_decrypt = 1'b0, busy, done, cmd_error;
  key_t cmd_key = '0;
  key_len_e cmd_key_len = KEY_128;
  logic [31:0] cmd_src = '0, cmd_dst = '0;
  logic [15:0] cmd_nblocks = '0;
  logic req_valid, req_ready, req_we;
  logic [31:0] req_addr, req_wdata;
  logic rsp_valid, rsp_ready, rsp_is_ack;
  logic [31:0] rsp_addr, rsp_data;
  logic mem_en, mem_we;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic aes_key_load, aes_start, aes_decrypt, aes_ready, aes_done;
  key_t aes_key;
  key_len_e aes_key_len;
  block_t aes_din, aes_dout;
  int checks = 0, failures = 0;

  crypto_ctrl #(.MEM_DEPTH(DEPTH)) dut (.*);
  aes_core u_aes (.clk, .rst_n, .key_load(aes_key_load), .key(aes_key), .key_len(aes_key_len), .key_ready(),
                  .start(aes_start), .decrypt(aes_decrypt), .din(aes_din),
                  .ready(aes_ready), .done(aes_done), .dout(aes_dout));
  int_mem #(.DEPTH(DEPTH)) u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
                                  .wdata(mem_wdata), .rdata(mem_rdata));

  // ---- network-side model ----
  logic [31:0] ext [int unsigned];
  typedef struct { logic ack; logic [31:0] addr, data; int due; } rsp_t;
  rsp_t pend [$];
  int cyc = 0;
  bit ideal = 0;          // always ready, one-clock responses, in order
  int idx_out = -1;

  logic rdy_q = 1'b0;
  assign req_ready  = ideal ? 1'b1 : rdy_q;
  assign rsp_valid  = (idx_out >= 0);
  assign rsp_is_ack = (idx_out >= 0) ? pend[idx_out].ack  : 1'b0;
  assign rsp_addr   = (idx_out >= 0) ? pend[idx_out].addr : '0;
  assign rsp_data   = (idx_out >= 0) ? pend[idx_out].data : '0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rsp_valid && rsp_ready) pend.delete(idx_out);
    if (req_valid && req_ready) begin
      rsp_t r;
      r.ack  = req_we;
      r.addr = req_addr;
      r.data = req_we ? 32'h0 : (ext.exists(req_addr) ? ext[req_addr] : 32'h0);
      if (req_we) ext[req_addr] = req_wdata;
      r.due  = cyc + (ideal ? 1 : 1 + $urandom % 6);
      pend.push_back(r);
    end
  end
  always @(negedge clk) begin
    rdy_q <= ($urandom % 4 != 0);
    idx_out = -1;
    // pick a due response; in non-ideal mode not always the oldest
    for (int i = 0; i < pend.size(); i++)
      if (pend[i].due <= cyc && (idx_out < 0 || (!ideal && $urandom % 2 == 0))) idx_out = i;
  end

  // ---- AES start spacing ----
  int last_start = -1, gaps = 0, bad_gaps = 0;
  always @(posedge clk) if (aes_start && aes_ready) begin
    if (last_start >= 0) begin
      gaps++;
      if (cyc - last_start != 21) bad_gaps++;
    end
    last_start <= cyc;
  end

  task automatic run_cmd(input logic dec, input key_t key, input int src, input int dst, input int n);
    @(negedge clk);
    cmd_start = 1'b1; cmd_decrypt = dec; cmd_key = key; cmd_src = src; cmd_dst = dst;
    cmd_nblocks = 16'(n);
    @(negedge clk); cmd_start = 1'b0;
    while (!done) @(negedge clk);
    last_start = -1;
  endtask

  task automatic check_batch(input logic dec, input key_t key, input int src, input int dst, input int n);
    int nk;
    nk = (cmd_key_len == KEY_128) ? 4 : (cmd_key_len == KEY_192) ? 6 : 8;
    for (int b = 0; b < n; b++) begin
      block_t in, out, exp;
      for (int k = 0; k < 4; k++) begin
        in[127 - 32*k -: 32]  = ext[32'(src + 16*b + 4*k)];
        out[127 - 32*k -: 32] = ext.exists(32'(dst + 16*b + 4*k)) ? ext[32'(dst + 16*b + 4*k)] : '0;
      end
      exp = dec ? aes_ref_pkg::decrypt(key, nk, in) : aes_ref_pkg::encrypt(key, nk, in);
      checks++;
      if (out !== exp) begin failures++; $display("FAIL block %0d got %h exp %h", b, out, exp); end
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key_t key;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 64 * 16; a += 4) ext[32'h1000 + a] = $urandom;

    // ideal network: check AES spacing
    ideal = 1;
    key = {$urandom, $urandom, $urandom, $urandom, 128'h0};
    run_cmd(1'b0, key, 32'h1000, 32'h8000, 8);
    check_batch(1'b0, key, 32'h1000, 32'h8000, 8);
    checks++;
    if (gaps != 7 || bad_gaps != 0) begin failures++; $display("FAIL AES spacing gaps=%0d bad=%0d", gaps, bad_gaps); end
    checks++;
    if (cmd_error) begin failures++; $display("FAIL error flag"); end

    // random network, 256-bit key, encrypt then decrypt back
    ideal = 0;
    cmd_key_len = KEY_256;
    key = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    run_cmd(1'b0, key, 32'h1000, 32'h8000, 64);
    check_batch(1'b0, key, 32'h1000, 32'h8000, 64);
    run_cmd(1'b1, key, 32'h8000, 32'hc000, 64);
    check_batch(1'b1, key, 32'h8000, 32'hc000, 64);
    for (int a = 0; a < 64 * 16; a += 4) begin
      checks++;
      if (ext[32'hc000 + a] !== ext[32'h1000 + a]) begin failures++; $display("FAIL roundtrip %0d", a); end
    end

    // zero blocks and an oversized batch
    run_cmd(1'b0, key, 32'h1000, 32'h8000, 0);
    checks++; if (cmd_error) begin failures++; $display("FAIL zero-block error"); end
    run_cmd(1'b0, key, 32'h1000, 32'h8000, DEPTH / 4 + 1);
    checks++; if (!cmd_error) begin failures++; $display("FAIL oversize not flagged"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
