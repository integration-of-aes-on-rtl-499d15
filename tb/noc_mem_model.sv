// noc_mem_model: behavioural model, for testbenches only, of everything the
// crypto tile reaches through its NoC port: the mesh NoC, the NoC-AXI
// interface and the external memory behind it.
//
// Request flits from the tile are accepted when a random draw allows
// (STALL_PCT percent of cycles refuse), served from a word-addressed
// associative array, and answered after 1..MAX_DELAY clocks with a read
// response or write acknowledge addressed back to the requesting tile. With
// REORDER set, any due response may be sent first. With FOREIGN_PCT above
// zero, flits addressed to another tile are mixed in, which the tile must
// drop. Counters report how often each of these happened.
module noc_mem_model
  import noc_pkg::*;
#(
  parameter logic [COORD_W-1:0] MEM_X = 4'd0,
  parameter logic [COORD_W-1:0] MEM_Y = 4'd0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_flit,
  output logic  out_valid,
  input  logic  out_ready,
  output flit_t out_flit
);

  // run-time knobs, set by the testbench
  int stall_pct   = 0;
  int max_delay   = 1;
  bit reorder     = 0;
  int foreign_pct = 0;

  // statistics
  int n_req = 0, n_refused = 0, n_reordered = 0, n_foreign = 0, n_out_stall = 0;

  logic [31:0] mem [int unsigned];

  typedef struct { flit_t f; int due; } pend_t;
  pend_t pend [$];
  int cyc = 0;
  int sel = -1;
  bit sel_foreign = 0;
  flit_t foreign_flit;
  logic rdy = 1'b0;

  assign in_ready  = rdy;
  assign out_valid = (sel >= 0) || sel_foreign;
  assign out_flit  = sel_foreign ? foreign_flit : (sel >= 0 ? pend[sel].f : '0);

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (out_valid && out_ready) begin
      if (!sel_foreign) begin
        if (sel != 0) n_reordered++;
        pend.delete(sel);
      end
    end else if (out_valid) n_out_stall++;
    if (in_valid && !in_ready) n_refused++;
    if (in_valid && in_ready) begin
      pend_t p;
      n_req++;
      p.f       = '0;
      p.f.dst_x = in_flit.src_x;
      p.f.dst_y = in_flit.src_y;
      p.f.src_x = MEM_X;
      p.f.src_y = MEM_Y;
      p.f.addr  = in_flit.addr;
      if (in_flit.kind == PKT_WR_REQ) begin
        mem[in_flit.addr] = in_flit.data;
        p.f.kind = PKT_WR_ACK;
      end else begin
        p.f.kind = PKT_RD_RESP;
        p.f.data = mem.exists(in_flit.addr) ? mem[in_flit.addr] : 32'h0;
      end
      p.due = cyc + 1 + ((max_delay > 1) ? int'($urandom % max_delay) : 0);
      pend.push_back(p);
    end
  end

  always @(negedge clk) begin
    rdy <= (stall_pct == 0) || (int'($urandom % 100) >= stall_pct);
    if (!(out_valid && !out_ready)) begin   // hold an offered flit until taken
      sel = -1;
      sel_foreign = 0;
      if (foreign_pct > 0 && int'($urandom % 100) < foreign_pct) begin
        foreign_flit       = '0;
        foreign_flit.dst_x = 4'hf;
        foreign_flit.dst_y = 4'hf;
        foreign_flit.kind  = PKT_RD_RESP;
        foreign_flit.data  = $urandom;
        sel_foreign        = 1;
        n_foreign++;
      end else begin
        for (int i = 0; i < pend.size(); i++)
          if (pend[i].due <= cyc && (sel < 0 || (reorder && $urandom % 2 == 0))) sel = i;
      end
    end
  end

endmodule
