// aes_crypto_tile: the customized AES-based crypto tile, a node of a mesh
// many-core platform that encrypts or decrypts batches of 128-bit blocks
// held in external memory.
//
// Four units make up the tile, wired as in its block diagram: the network
// interface (net_if) to the NoC router, the state-machine controller
// (crypto_ctrl, which contains the four 32-bit block registers), the AES
// crypto-core (aes_core with its key schedule) and the internal memory
// (int_mem). The controller alone drives the memory, the core and the
// network interface, so no processor or DMA engine is needed.
//
// Interface: a command port (cmd_start pulse with key and key length
// (128, 192 or 256 bits), decrypt, source and
// destination byte addresses in external memory and a block count; busy,
// done pulse and cmd_error) and a NoC port of single-flit packets with
// valid/ready in both directions. External memory sits behind the NoC and the
// NoC-AXI interface at mesh position (MEM_X, MEM_Y); this tile is at
// (TILE_X, TILE_Y). The defaults place the tile and the NoC-AXI interface
// where the platform drawing shows them in its 3x3 mesh.
// Timing: per block, 5 clocks to load the registers, 1 to start the core,
// 11 in the core (13 / 15 with a 192 / 256-bit key), 4 to store; plus one
// clock per word to fetch and to write back when the NoC keeps up.
module aes_crypto_tile
  import aes_pkg::*;
  import noc_pkg::*;
#(
  parameter logic [COORD_W-1:0] TILE_X     = 4'd1,
  parameter logic [COORD_W-1:0] TILE_Y     = 4'd2,
  parameter logic [COORD_W-1:0] MEM_X      = 4'd0,
  parameter logic [COORD_W-1:0] MEM_Y      = 4'd0,
  parameter int unsigned        MEM_DEPTH  = 2048,
  parameter int unsigned        NI_DEPTH   = 4,
  parameter int unsigned        NBLK_W     = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              cmd_start,
  input  logic              cmd_decrypt,
  input  key_t              cmd_key,      // left-aligned: 128-bit key in [255:128]
  input  key_len_e          cmd_key_len,  // 128, 192 or 256-bit key
  input  logic [31:0]       cmd_src,
  input  logic [31:0]       cmd_dst,
  input  logic [NBLK_W-1:0] cmd_nblocks,
  output logic              busy,
  output logic              done,
  output logic              cmd_error,
  // NoC router port
  output logic              tx_valid,
  input  logic              tx_ready,
  output flit_t             tx_flit,
  input  logic              rx_valid,
  output logic              rx_ready,
  input  flit_t             rx_flit,
  output logic              rx_drop
);

  localparam int unsigned MEM_AW = $clog2(MEM_DEPTH);

  logic        req_valid, req_ready, req_we;
  logic [31:0] req_addr, req_wdata;
  logic        rsp_valid, rsp_ready, rsp_is_ack;
  logic [31:0] rsp_addr, rsp_data;

  logic              mem_en, mem_we;
  logic [MEM_AW-1:0] mem_addr;
  logic [31:0]       mem_wdata, mem_rdata;

  logic   aes_key_load, aes_start, aes_decrypt, aes_ready, aes_done;
  key_t     aes_key;
  key_len_e aes_key_len;
  block_t   aes_din, aes_dout;

  net_if #(
    .TILE_X(TILE_X), .TILE_Y(TILE_Y), .MEM_X(MEM_X), .MEM_Y(MEM_Y),
    .FIFO_DEPTH(NI_DEPTH)
  ) u_ni (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata,
    .rsp_valid, .rsp_ready, .rsp_is_ack, .rsp_addr, .rsp_data,
    .tx_valid, .tx_ready, .tx_flit, .rx_valid, .rx_ready, .rx_flit, .rx_drop
  );

  crypto_ctrl #(.MEM_DEPTH(MEM_DEPTH), .MEM_AW(MEM_AW), .NBLK_W(NBLK_W)) u_ctrl (
    .clk, .rst_n,
    .cmd_start, .cmd_decrypt, .cmd_key, .cmd_key_len, .cmd_src, .cmd_dst, .cmd_nblocks,
    .busy, .done, .cmd_error,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata,
    .rsp_valid, .rsp_ready, .rsp_is_ack, .rsp_addr, .rsp_data,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .aes_key_load, .aes_key, .aes_key_len, .aes_start, .aes_decrypt, .aes_din,
    .aes_ready, .aes_done, .aes_dout
  );

  aes_core u_aes (
    .clk, .rst_n,
    .key_load(aes_key_load), .key(aes_key), .key_len(aes_key_len), .key_ready(),
    .start(aes_start), .decrypt(aes_decrypt), .din(aes_din),
    .ready(aes_ready), .done(aes_done), .dout(aes_dout)
  );

  int_mem #(.DEPTH(MEM_DEPTH), .ADDR_W(MEM_AW)) u_mem (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr),
    .wdata(mem_wdata), .rdata(mem_rdata)
  );

endmodule
