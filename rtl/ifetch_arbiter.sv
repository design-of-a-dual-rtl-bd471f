// ifetch_arbiter: the instruction fetch arbiter between the warp sub modules
// and the instruction cache.
//
// Every sub module with an active warp and an empty line buffer requests a
// fetch, but the instruction cache has a single request channel, so requests
// are served round-robin: the requester after the last served one wins, and
// inactive sub modules are skipped. The request channel carries ARVALID,
// ARADDR and CTXID (the warp number) and completes when the cache raises
// ARREADY; the chosen request is held, unchanged, until then (AXI-style
// valid/ready rule). accept[i] is high in the cycle sub module i's request
// completes.
//
// Responses (RVALID, RADDR, CTXID, 128-bit RDATA) have no ready signal and are
// always taken. They are passed on, in the same cycle, to one of two response
// ports: resp[0] to the even sub modules and resp[1] to the odd ones, chosen by
// the parity of CTXID; a sub module picks up the response bearing its number.
// Apart from their valid bits these ports are wired straight from the response
// inputs.
//
// The signal names, the 128-bit read width, the request count (one per warp)
// and the two response ports come from the reference design; the hold-until-ready rule
// and the parity split of the responses are this design's reading of them.
module ifetch_arbiter
  import ws_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // sub module side
  input  logic              req    [N],
  input  logic [PC_W-1:0]   addr   [N],
  output logic              accept [N],
  output resp_t             resp   [2],
  // instruction cache request channel
  output logic              arvalid,
  input  logic              arready,
  output logic [PC_W-1:0]   araddr,
  output logic [WID_W-1:0]  arctxid,
  // instruction cache response channel
  input  logic              rvalid,
  input  logic [PC_W-1:0]   raddr,
  input  logic [WID_W-1:0]  rctxid,
  input  logic [LINE_W-1:0] rdata
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [N-1:0]  req_v, gnt;
  logic [IW-1:0] gidx, sel, lock_idx;
  logic          any, locked;

  // while a request waits for ARREADY only it is offered to the round-robin
  // arbiter, so the grant cannot move and the pointer advances past it
  always_comb
    for (int k = 0; k < N; k++) req_v[k] = locked ? (lock_idx == IW'(k)) : req[k];

  rr_arbiter #(.N(N)) u_rr (
    .clk, .rst_n,
    .req(req_v), .advance(arready), .grant(gnt), .grant_idx(gidx), .any
  );

  assign sel     = gidx;
  assign arvalid = any;
  assign araddr  = addr[sel];
  assign arctxid = WID_W'(sel);

  always_comb
    for (int k = 0; k < N; k++) accept[k] = arvalid && arready && (sel == IW'(k));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked   <= 1'b0;
      lock_idx <= '0;
    end else if (arvalid && arready) begin
      locked   <= 1'b0;
    end else if (arvalid) begin
      locked   <= 1'b1;
      lock_idx <= sel;
    end
  end

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      resp[p].valid = rvalid && (rctxid[0] == p[0]);
      resp[p].ctxid = rctxid;
      resp[p].addr  = raddr;
      resp[p].data  = rdata;
    end
  end

  // a request, once presented, stays unchanged until the cache accepts it
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (arvalid && !arready) |=> (arvalid && $stable(araddr) && $stable(arctxid)))
    else $error("fetch request changed before ARREADY");
endmodule
