// int_mem: the tile's internal memory, a single-port synchronous RAM of
// DEPTH 32-bit words.
//
// One access per clock: with en high, we selects a write of wdata to addr or
// a read of addr, whose data appears on rdata after the clock edge (one-cycle
// access, as the tile's controller expects). rdata holds its value while en
// is low. The document gives the memory's role but not its size or ports:
// the depth (2048 words = 8 KiB, room for 512 blocks) and the single port are
// this design's choices. Contents are not reset.
module int_mem #(
  parameter int unsigned DEPTH  = 2048,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [31:0]       wdata,
  output logic [31:0]       rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
