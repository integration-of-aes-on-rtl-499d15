// tb_net_if: drives random memory requests into the network interface with a
// router that accepts flits at random, and random response flits from the
// router with a controller that accepts them at random. It checks every
// outgoing flit (coordinates, kind, address, data, order), every delivered
// response (kind, address, data, order), that flits for other tiles or of
// request kind are dropped, and that back-pressure occurs in both directions.
module tb_net_if;
  import noc_pkg::*;

  localparam logic [3:0] TX = 4'd1, TY = 4'd2, MX = 4'd0, MY = 4'd0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic req_valid = 1'b0, req_ready, req_we = 1'b0;
  logic [31:0] req_addr = '0, req_wdata = '0;
  logic rsp_valid, rsp_ready = 1'b0, rsp_is_ack;
  logic [31:0] rsp_addr, rsp_data;
  logic tx_valid, tx_ready = 1'b0, rx_valid = 1'b0, rx_ready, rx_drop;
  flit_t tx_flit, rx_flit = '0;
  int checks = 0, failures = 0;
  int req_stalls = 0, rx_stalls = 0, drops = 0;

  net_if #(.TILE_X(TX), .TILE_Y(TY), .MEM_X(MX), .MEM_Y(MY), .FIFO_DEPTH(4)) dut (.*);

  flit_t exp_tx [$];
  flit_t exp_rsp [$];
  localparam int N = 300;
  int sent_req = 0, sent_rx = 0, got_tx = 0, got_rsp = 0;
  bit req_fired = 0, rx_fired = 0, rx_was_drop = 0;

  // handshakes happen at the rising edge; the drivers act on the falling one
  always @(posedge clk) begin
    req_fired   <= req_valid && req_ready;
    rx_fired    <= rx_valid && rx_ready;
    rx_was_drop <= rx_drop;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // controller side: requests
  always @(negedge clk) if (rst_n) begin
    if (req_fired) begin
      flit_t f;
      f = '0;
      f.dst_x = MX; f.dst_y = MY; f.src_x = TX; f.src_y = TY;
      f.kind = req_we ? PKT_WR_REQ : PKT_RD_REQ;
      f.addr = req_addr; f.data = req_we ? req_wdata : '0;
      exp_tx.push_back(f);
      sent_req++;
      req_valid = 1'b0;
    end else if (req_valid) req_stalls++;
    if (!req_valid && sent_req < N && ($urandom % 4 != 0)) begin
      req_valid = 1'b1; req_we = 1'($urandom); req_addr = $urandom; req_wdata = $urandom;
    end
    rsp_ready = ($urandom % 3 != 0);
    tx_ready  = ($urandom % 3 == 0);
  end

  // router side: responses, some not for this tile
  always @(negedge clk) if (rst_n) begin
    if (rx_fired) begin
      if (rx_was_drop) drops++;
      else begin exp_rsp.push_back(rx_flit); sent_rx++; end
      rx_valid = 1'b0;
    end else if (rx_valid) rx_stalls++;
    if (!rx_valid && sent_rx < N && ($urandom % 3 != 0)) begin
      rx_flit = '0;
      rx_flit.dst_x = TX; rx_flit.dst_y = TY; rx_flit.src_x = MX; rx_flit.src_y = MY;
      rx_flit.kind = $urandom % 2 ? PKT_RD_RESP : PKT_WR_ACK;
      rx_flit.addr = $urandom; rx_flit.data = $urandom;
      case ($urandom % 8)
        0: rx_flit.dst_x = TX + 4'd1;
        1: rx_flit.kind  = PKT_RD_REQ;
        default: ;
      endcase
      rx_valid = 1'b1;
    end
  end

  // monitors at the clock edge
  always @(posedge clk) if (rst_n) begin
    if (tx_valid && tx_ready) begin
      checks++; got_tx++;
      if (exp_tx.size() == 0 || tx_flit !== exp_tx[0]) begin
        failures++; $display("FAIL tx flit %h", tx_flit);
      end
      if (exp_tx.size() != 0) void'(exp_tx.pop_front());
    end
    if (rsp_valid && rsp_ready) begin
      flit_t e;
      checks++; got_rsp++;
      if (exp_rsp.size() == 0) begin failures++; $display("FAIL unexpected rsp"); end
      else begin
        e = exp_rsp.pop_front();
        if (rsp_is_ack !== (e.kind == PKT_WR_ACK) || rsp_addr !== e.addr || rsp_data !== e.data) begin
          failures++; $display("FAIL rsp %h %h", rsp_addr, rsp_data);
        end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (got_tx == N && got_rsp == N);
    repeat (5) @(negedge clk);
    checks++;
    if (req_stalls == 0 || rx_stalls == 0 || drops == 0) begin
      failures++; $display("FAIL mechanisms: req_stalls=%0d rx_stalls=%0d drops=%0d", req_stalls, rx_stalls, drops);
    end
    $display("req stalls %0d, rx stalls %0d, dropped %0d", req_stalls, rx_stalls, drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
