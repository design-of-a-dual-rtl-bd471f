// dual_warp_scheduler: the warp scheduler of one streaming multi-processor,
// with dual-warp, superscalar issue.
//
// NUM_WARPS sub modules (ws_sub_module) each track one warp. The host
// activates a warp by writing its thread mask and start PC (cfg_*). Active
// warps fetch their instructions, a 128-bit line of four at a time, through
// the instruction fetch arbiter (ifetch_arbiter), which serves them round-robin
// on the instruction cache's single request channel. Odd-numbered warps belong
// to the odd warp scheduler and even-numbered ones to the even warp scheduler
// (ws_group_scheduler); each picks one ready warp per cycle, round-robin, and
// issues one instruction or, when the two next instructions have no register
// dependence, two. Up to four instructions leave per cycle:
//   issue[0], issue[1]  Instruction_0/1, odd warp scheduler
//   issue[2], issue[3]  Instruction_2/3, even warp scheduler
// Each slot is valid for one cycle, one cycle after the scheduling decision.
// sm_ready[g]/sm_dual_ready[g] (g = 0 odd, 1 even) give the issuing condition
// of the SM for each scheduler; dep_ok[g], with the issue slots, passes each
// scheduler's dependence test result to the SM's dispatch logic. The SM reports, per register, when an issued
// instruction has read its operands (rd_rel, one entry per source operand) and
// written its result (wr_rel); these clear the dependence tables.
//
// The structure (eight sub modules, fetch arbiter, odd/even schedulers, four
// instruction outputs, round-robin) follows the reference design; the host and SM
// interfaces and the instruction format are this design's choices.
module dual_warp_scheduler
  import ws_pkg::*;
#(
  parameter int unsigned NUM_WARPS = 8,
  parameter int unsigned NUM_SP    = 8,
  parameter int unsigned NRD       = 8,
  parameter int unsigned NWR       = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // host
  input  logic              cfg_valid,
  input  logic [WID_W-1:0]  cfg_warp,
  input  logic [NUM_SP-1:0] cfg_tmask,
  input  logic [PC_W-1:0]   cfg_pc,
  output logic [NUM_WARPS-1:0] warp_active,
  // instruction cache
  output logic              ic_arvalid,
  input  logic              ic_arready,
  output logic [PC_W-1:0]   ic_araddr,
  output logic [WID_W-1:0]  ic_arctxid,
  input  logic              ic_rvalid,
  input  logic [PC_W-1:0]   ic_raddr,
  input  logic [WID_W-1:0]  ic_rctxid,
  input  logic [LINE_W-1:0] ic_rdata,
  // SM
  input  logic              sm_ready      [2],
  input  logic              sm_dual_ready [2],
  output issue_t            issue         [4],
  output logic              dep_ok        [2],
  input  rel_t              rd_rel        [NRD],
  input  rel_t              wr_rel        [NWR]
);
  localparam int unsigned NG = NUM_WARPS / 2;

  logic              ar_valid  [NUM_WARPS];
  logic [PC_W-1:0]   ar_addr   [NUM_WARPS];
  logic              ar_accept [NUM_WARPS];
  resp_t             resp      [2];
  logic              can0      [NUM_WARPS];
  logic              can1      [NUM_WARPS];
  logic [PC_W-1:0]   pc        [NUM_WARPS];
  logic [INST_W-1:0] inst0     [NUM_WARPS];
  logic [INST_W-1:0] inst1     [NUM_WARPS];
  logic [NUM_SP-1:0] tmask     [NUM_WARPS];
  logic              grant     [NUM_WARPS];
  logic              grant_dual[NUM_WARPS];

  for (genvar w = 0; w < NUM_WARPS; w++) begin : g_sub
    logic act;
    ws_sub_module #(.WARP_ID(w), .NUM_SP(NUM_SP), .NRD(NRD), .NWR(NWR)) u_sub (
      .clk, .rst_n,
      .cfg_valid (cfg_valid && cfg_warp == WID_W'(w)),
      .cfg_tmask, .cfg_pc,
      .active    (act),
      .tmask     (tmask[w]),
      .ar_valid  (ar_valid[w]),
      .ar_addr   (ar_addr[w]),
      .ar_accept (ar_accept[w]),
      .resp      (resp[w % 2]),
      .can0      (can0[w]),
      .can1      (can1[w]),
      .pc        (pc[w]),
      .inst0     (inst0[w]),
      .inst1     (inst1[w]),
      .grant     (grant[w]),
      .grant_dual(grant_dual[w]),
      .rd_rel, .wr_rel
    );
    assign warp_active[w] = act;
  end

  ifetch_arbiter #(.N(NUM_WARPS)) u_fetch (
    .clk, .rst_n,
    .req(ar_valid), .addr(ar_addr), .accept(ar_accept), .resp,
    .arvalid(ic_arvalid), .arready(ic_arready), .araddr(ic_araddr), .arctxid(ic_arctxid),
    .rvalid(ic_rvalid), .raddr(ic_raddr), .rctxid(ic_rctxid), .rdata(ic_rdata)
  );

  // g = 0: odd warp scheduler, g = 1: even warp scheduler
  for (genvar g = 0; g < 2; g++) begin : g_grp
    localparam int unsigned PAR = (g == 0) ? 1 : 0;
    logic              c0 [NG], c1 [NG], gr [NG];
    logic [PC_W-1:0]   p  [NG];
    logic [INST_W-1:0] i0 [NG], i1 [NG];
    logic [NUM_SP-1:0] tm [NG];
    logic              gd;
    for (genvar k = 0; k < NG; k++) begin : g_m
      assign c0[k] = can0 [2*k + PAR];
      assign c1[k] = can1 [2*k + PAR];
      assign p[k]  = pc   [2*k + PAR];
      assign i0[k] = inst0[2*k + PAR];
      assign i1[k] = inst1[2*k + PAR];
      assign tm[k] = tmask[2*k + PAR];
      assign grant     [2*k + PAR] = gr[k];
      assign grant_dual[2*k + PAR] = gd;
    end
    ws_group_scheduler #(.N(NG), .PARITY(PAR), .NUM_SP(NUM_SP)) u_grp (
      .clk, .rst_n,
      .can0(c0), .can1(c1), .pc(p), .inst0(i0), .inst1(i1), .tmask(tm),
      .sm_ready(sm_ready[g]), .sm_dual_ready(sm_dual_ready[g]),
      .grant(gr), .grant_dual(gd),
      .slot0(issue[2*g]), .slot1(issue[2*g + 1]), .pair_ok(dep_ok[g])
    );
  end
endmodule
