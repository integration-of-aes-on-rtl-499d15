// net_if: the tile's network interface, sitting between the tile's controller
// and its NoC router.
//
// Towards the controller it offers a plain memory-request channel (valid/
// ready, write enable, byte address, write data) and a response channel
// (valid/ready, read data or write acknowledge, with the address it belongs
// to). Towards the router it sends and receives single-flit packets
// (noc_pkg::flit_t) with valid/ready flow control. Outgoing requests are
// stamped with this tile's mesh coordinates as source and the coordinates of
// the NoC-AXI interface as destination; incoming responses addressed to this
// tile are unpacked. Each direction has a FIFO_DEPTH-entry buffer, so a slow
// NoC back-pressures the controller (req_ready low) and a slow controller
// back-pressures the router (rx_ready low). A flit that is not a response or
// not addressed to this tile is consumed and reported on rx_drop.
// Timing: a request accepted in cycle t can leave on tx in cycle t+1; a
// response accepted from rx in cycle t is offered to the controller in t+1.
// The document gives the interface's role (flow control between router and
// tile); the packet format, buffering and depths are this design's.
module net_if
  import noc_pkg::*;
#(
  parameter logic [COORD_W-1:0] TILE_X     = 4'd1,
  parameter logic [COORD_W-1:0] TILE_Y     = 4'd2,
  parameter logic [COORD_W-1:0] MEM_X      = 4'd0,
  parameter logic [COORD_W-1:0] MEM_Y      = 4'd0,
  parameter int unsigned        FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // controller side
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  logic [31:0] req_addr,
  input  logic [31:0] req_wdata,
  output logic        rsp_valid,
  input  logic        rsp_ready,
  output logic        rsp_is_ack,
  output logic [31:0] rsp_addr,
  output logic [31:0] rsp_data,
  // router side
  output logic        tx_valid,
  input  logic        tx_ready,
  output flit_t       tx_flit,
  input  logic        rx_valid,
  output logic        rx_ready,
  input  flit_t       rx_flit,
  output logic        rx_drop
);

  flit_t req_flit, rsp_flit;
  logic  rx_ours, rx_fifo_ready;

  always_comb begin
    req_flit       = '0;
    req_flit.dst_x = MEM_X;
    req_flit.dst_y = MEM_Y;
    req_flit.src_x = TILE_X;
    req_flit.src_y = TILE_Y;
    req_flit.kind  = req_we ? PKT_WR_REQ : PKT_RD_REQ;
    req_flit.addr  = req_addr;
    req_flit.data  = req_we ? req_wdata : '0;
  end

  sync_fifo #(.W($bits(flit_t)), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk, .rst_n,
    .in_valid (req_valid), .in_ready (req_ready), .in_data (req_flit),
    .out_valid(tx_valid),  .out_ready(tx_ready),  .out_data(tx_flit)
  );

  assign rx_ours  = (rx_flit.dst_x == TILE_X) && (rx_flit.dst_y == TILE_Y) &&
                    (rx_flit.kind == PKT_RD_RESP || rx_flit.kind == PKT_WR_ACK);
  assign rx_ready = rx_ours ? rx_fifo_ready : 1'b1;
  assign rx_drop  = rx_valid && !rx_ours;

  sync_fifo #(.W($bits(flit_t)), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk, .rst_n,
    .in_valid (rx_valid && rx_ours), .in_ready (rx_fifo_ready), .in_data (rx_flit),
    .out_valid(rsp_valid),           .out_ready(rsp_ready),     .out_data(rsp_flit)
  );

  assign rsp_is_ack = (rsp_flit.kind == PKT_WR_ACK);
  assign rsp_addr   = rsp_flit.addr;
  assign rsp_data   = rsp_flit.data;

  // A request must stay put until it is taken.
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      req_valid && !req_ready |=> req_valid && $stable({req_we, req_addr, req_wdata});
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
