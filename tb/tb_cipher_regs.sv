// tb_cipher_regs: fills the four registers word by word and checks the
// 128-bit view, loads whole blocks and checks the word view, and checks that
// a block load wins over a simultaneous word write. Values are random and
// compared with a model kept in the testbench.
module tb_cipher_regs;
  import aes_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr_en = 1'b0, blk_load = 1'b0;
  logic [1:0] wr_idx = '0, rd_idx = '0;
  word_t wr_word = '0, rd_word;
  block_t blk_in = '0, blk_out;
  word_t model [4];
  int checks = 0, failures = 0;

  cipher_regs dut (.clk, .rst_n, .wr_en, .wr_idx, .wr_word, .blk_load, .blk_in,
                   .rd_idx, .rd_word, .blk_out);

  task automatic check_all(input string what);
    checks++;
    if (blk_out !== {model[0], model[1], model[2], model[3]}) begin
      failures++;
      $display("FAIL %s block %h", what, blk_out);
    end
    for (int k = 0; k < 4; k++) begin
      rd_idx = 2'(k); #1;
      checks++;
      if (rd_word !== model[k]) begin
        failures++;
        $display("FAIL %s word %0d %h exp %h", what, k, rd_word, model[k]);
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) model[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_all("reset");
    for (int t = 0; t < 20; t++) begin
      // word writes, in a random order
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_idx = 2'($urandom); wr_word = $urandom;
        @(negedge clk);
        model[wr_idx] = wr_word;
        wr_en = 1'b0;
      end
      check_all($sformatf("words %0d", t));
      // block load, sometimes together with a word write
      @(negedge clk);
      blk_load = 1'b1; blk_in = {$urandom, $urandom, $urandom, $urandom};
      wr_en = (t % 2 == 1); wr_idx = 2'($urandom); wr_word = $urandom;
      @(negedge clk);
      for (int k = 0; k < 4; k++) model[k] = blk_in[127 - 32*k -: 32];
      blk_load = 1'b0; wr_en = 1'b0;
      check_all($sformatf("block %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
