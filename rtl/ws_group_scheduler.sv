// ws_group_scheduler: the odd or the even warp scheduler.
//
// Warps are split by the parity of their number; each group has its own
// scheduler, so one odd and one even warp are issued in the same cycle
// (dual-warp issue). Among its N sub modules the scheduler picks, round-robin,
// the next one after the last issued warp that has an instruction ready
// (can0), skipping those that are inactive or stalled. If that warp also has a
// second, independent instruction ready (can1) and the SM can take two, both
// are issued (superscalar issue), so a group issues at most two instructions
// per cycle and the two groups together at most four.
//
// sm_ready / sm_dual_ready are the issuing condition of the SM behind the
// scheduler: room for one, or for two, instructions this cycle. grant and
// grant_dual are combinational and tell the chosen sub module to advance;
// slot0/slot1 (Instruction_0/1 of the odd scheduler, Instruction_2/3 of the
// even one) are registered, one cycle after the grant. pair_ok, registered with
// them, is the dependence test result of the issued warp (its second
// instruction was independent and could have gone too); it is high with slot0
// alone when the SM's dual-issue condition was not met.
//
// The group split, round-robin order and four-instruction total follow the
// reference design; the ready handshake with the SM is this design's choice.
module ws_group_scheduler
  import ws_pkg::*;
#(
  parameter int unsigned N      = 4,   // sub modules in the group
  parameter int unsigned PARITY = 1,   // 1: odd warps 1,3,5,.. 0: even warps 0,2,4,..
  parameter int unsigned NUM_SP = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              can0   [N],
  input  logic              can1   [N],
  input  logic [PC_W-1:0]   pc     [N],
  input  logic [INST_W-1:0] inst0  [N],
  input  logic [INST_W-1:0] inst1  [N],
  input  logic [NUM_SP-1:0] tmask  [N],
  input  logic              sm_ready,
  input  logic              sm_dual_ready,
  output logic              grant  [N],
  output logic              grant_dual,
  output issue_t            slot0,
  output issue_t            slot1,
  output logic              pair_ok
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [N-1:0]  req, gnt;
  logic [IW-1:0] gidx;
  logic          any;

  always_comb
    for (int k = 0; k < N; k++) req[k] = can0[k] && sm_ready;

  rr_arbiter #(.N(N)) u_rr (
    .clk, .rst_n,
    .req, .advance(1'b1), .grant(gnt), .grant_idx(gidx), .any
  );

  always_comb begin
    for (int k = 0; k < N; k++) grant[k] = gnt[k];
    grant_dual = any && can1[gidx] && sm_dual_ready;
  end

  logic [WID_W-1:0] gwarp;
  assign gwarp = WID_W'(2 * int'(gidx) + int'(PARITY));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot0   <= '0;
      slot1   <= '0;
      pair_ok <= 1'b0;
    end else begin
      pair_ok     <= any && can1[gidx];
      slot0.valid <= any;
      slot0.warp  <= gwarp;
      slot0.pc    <= pc[gidx];
      slot0.inst  <= inst0[gidx];
      slot0.tmask <= MAX_SP'(tmask[gidx]);
      slot1.valid <= grant_dual;
      slot1.warp  <= gwarp;
      slot1.pc    <= pc[gidx] + PC_W'(4);
      slot1.inst  <= inst1[gidx];
      slot1.tmask <= MAX_SP'(tmask[gidx]);
    end
  end
endmodule
