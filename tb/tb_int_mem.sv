// tb_int_mem: writes random words to random addresses of the internal
// memory, reads them back and compares with a model array; checks the
// one-clock read latency and that rdata holds while the memory is idle or
// writing.
// Runs at the default depth.
module tb_int_mem;
  localparam int unsigned DEPTH = 2048;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic en = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [DEPTH];
  logic [31:0] prev;
  int checks = 0, failures = 0;

  int_mem dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      en = 1'b1; we = 1'b1; addr = AW'(a); wdata = $urandom;
      model[a] = wdata;
      @(negedge clk);
    end
    // random mix of reads and writes
    for (int t = 0; t < 4000; t++) begin
      prev = rdata;
      en = 1'b1; we = ($urandom % 3 == 0); addr = AW'($urandom); wdata = $urandom;
      @(negedge clk);
      if (we) begin
        model[addr] = wdata;
        // a write leaves the read port alone
        checks++;
        if (rdata !== prev) begin failures++; $display("FAIL rdata changed by a write"); end
      end
      else begin
        checks++;
        if (rdata !== model[addr]) begin
          failures++;
          $display("FAIL read %0d got %h exp %h", addr, rdata, model[addr]);
        end
        // rdata must hold while idle, whatever the address does
        prev = rdata;
        en = 1'b0; addr = AW'($urandom);
        @(negedge clk);
        checks++;
        if (rdata !== prev) begin failures++; $display("FAIL idle hold"); end
      end
    end
    // explicit hold check
    en = 1'b1; we = 1'b0; addr = 11'd5;
    @(negedge clk);
    en = 1'b0; addr = 11'd6;
    repeat (3) @(negedge clk);
    checks++;
    if (rdata !== model[5]) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
