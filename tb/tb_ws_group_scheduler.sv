// tb_ws_group_scheduler: self-checking test of the odd/even warp scheduler.
//
// Part 1 replays the round-robin example of sixteen warps where warps 0, 3, 7,
// 10, 12 and 14 are inactive: an odd and an even scheduler of eight members
// each must issue warps 1+2, then 5+4, then 9+6, then 11+8, and then wrap.
// Part 2 drives a scheduler of the default size (four members) with random
// readiness and SM conditions and compares every grant and every registered
// issue slot with a round-robin reference model, one cycle later.
module tb_ws_group_scheduler;
  import ws_pkg::*;
  localparam int NSP = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- part 1: sixteen warps, two schedulers of eight
  localparam int N8 = 8;
  logic c0o [N8], c1o [N8], go [N8], c0e [N8], c1e [N8], ge [N8];
  logic [PC_W-1:0] pco [N8], pce [N8];
  logic [INST_W-1:0] i0o [N8], i1o [N8], i0e [N8], i1e [N8];
  logic [NSP-1:0] tmo [N8], tme [N8];
  logic gdo, gde;
  issue_t o0, o1, e0, e1;
  logic pko, pke, pk;
  logic rdy8;

  ws_group_scheduler #(.N(N8), .PARITY(1), .NUM_SP(NSP)) u_odd (
    .clk, .rst_n, .can0(c0o), .can1(c1o), .pc(pco), .inst0(i0o), .inst1(i1o), .tmask(tmo),
    .sm_ready(rdy8), .sm_dual_ready(1'b0), .grant(go), .grant_dual(gdo), .slot0(o0), .slot1(o1), .pair_ok(pko));
  ws_group_scheduler #(.N(N8), .PARITY(0), .NUM_SP(NSP)) u_even (
    .clk, .rst_n, .can0(c0e), .can1(c1e), .pc(pce), .inst0(i0e), .inst1(i1e), .tmask(tme),
    .sm_ready(rdy8), .sm_dual_ready(1'b0), .grant(ge), .grant_dual(gde), .slot0(e0), .slot1(e1), .pair_ok(pke));

  // ---------------- part 2: default size, random
  localparam int N = 4;
  logic c0 [N], c1 [N], gr [N];
  logic [PC_W-1:0] pc [N];
  logic [INST_W-1:0] i0 [N], i1 [N];
  logic [NSP-1:0] tm [N];
  logic gd, smr, smd;
  issue_t s0, s1;
  ws_group_scheduler #(.N(N), .PARITY(1), .NUM_SP(NSP)) dut (
    .clk, .rst_n, .can0(c0), .can1(c1), .pc, .inst0(i0), .inst1(i1), .tmask(tm),
    .sm_ready(smr), .sm_dual_ready(smd), .grant(gr), .grant_dual(gd), .slot0(s0), .slot1(s1), .pair_ok(pk));

  int exp_odd [5]  = '{1, 5, 9, 11, 13};
  int exp_even [5] = '{2, 4, 6, 8, 2};

  initial begin
    int n_dual, n_single_ready, n_skip, n_idle;
    bit inactive [16];
    n_dual = 0; n_single_ready = 0; n_skip = 0; n_idle = 0;
    foreach (inactive[w]) inactive[w] = 0;
    inactive[0] = 1; inactive[3] = 1; inactive[7] = 1;
    inactive[10] = 1; inactive[12] = 1; inactive[14] = 1;
    rdy8 = 0;
    for (int k = 0; k < N8; k++) begin
      c0o[k] = !inactive[2*k+1]; c1o[k] = 0; pco[k] = 32'h100 * (2*k+1); i0o[k] = 32'(2*k+1); i1o[k] = 0; tmo[k] = '1;
      c0e[k] = !inactive[2*k];   c1e[k] = 0; pce[k] = 32'h100 * (2*k);   i0e[k] = 32'(2*k);   i1e[k] = 0; tme[k] = '1;
    end
    for (int k = 0; k < N; k++) begin c0[k] = 0; c1[k] = 0; pc[k] = 0; i0[k] = 0; i1[k] = 0; tm[k] = 0; end
    smr = 0; smd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // the round-robin start is warp 1 (odd) and warp 2 (even): warp 0 is inactive
    rdy8 = 1;
    for (int t = 0; t < 5; t++) begin
      @(posedge clk); #1;
      check($sformatf("T%0d odd warp", t), o0.warp, exp_odd[t]);
      check($sformatf("T%0d odd valid", t), o0.valid, 1);
      check($sformatf("T%0d odd inst", t), o0.inst, exp_odd[t]);
      check($sformatf("T%0d odd pc", t), o0.pc, 32'h100 * exp_odd[t]);
      check($sformatf("T%0d even warp", t), e0.warp, exp_even[t]);
      check($sformatf("T%0d even inst", t), e0.inst, exp_even[t]);
      check("no second slot", o1.valid || e1.valid, 0);
    end
    rdy8 = 0;
    @(posedge clk); #1;
    check("SM not ready: nothing issued", o0.valid || e0.valid, 0);

    // part 2
    begin
      int last, exp_g;
      bit exp_d;
      last = N - 1;
      // dut pointer was at reset state, part 1 did not touch it
      for (int it = 0; it < 3000; it++) begin
        for (int k = 0; k < N; k++) begin
          c0[k] = ($urandom_range(0, 2) != 0);
          c1[k] = c0[k] && ($urandom_range(0, 1) == 1);
          pc[k] = $urandom; i0[k] = $urandom; i1[k] = $urandom; tm[k] = NSP'($urandom);
        end
        smr = ($urandom_range(0, 5) != 0);
        smd = smr && ($urandom_range(0, 2) != 0);
        #1;
        exp_g = -1;
        if (smr)
          for (int j = 1; j <= N; j++)
            if (exp_g < 0 && c0[(last + j) % N]) exp_g = (last + j) % N;
        if (exp_g >= 0 && exp_g != (last + 1) % N) n_skip++;
        if (exp_g < 0) n_idle++;
        exp_d = (exp_g >= 0) && c1[exp_g] && smd;
        if (exp_g >= 0 && c1[exp_g] && !smd) n_single_ready++;
        for (int k = 0; k < N; k++) check("grant", gr[k], exp_g == k);
        check("grant_dual", gd, exp_d);
        @(posedge clk); #1;
        check("slot0 valid", s0.valid, exp_g >= 0);
        check("slot1 valid", s1.valid, exp_d);
        check("pair_ok", pk, (exp_g >= 0) && c1[exp_g]);
        if (exp_g >= 0) begin
          check("slot0 warp", s0.warp, 2 * exp_g + 1);
          check("slot0 pc", s0.pc, pc[exp_g]);
          check("slot0 inst", s0.inst, i0[exp_g]);
          check("slot0 tmask", s0.tmask, tm[exp_g]);
          last = exp_g;
        end
        if (exp_d) begin
          n_dual++;
          check("slot1 warp", s1.warp, 2 * exp_g + 1);
          check("slot1 pc", s1.pc, pc[exp_g] + 4);
          check("slot1 inst", s1.inst, i1[exp_g]);
        end
      end
    end
    $display("dual=%0d single-by-SM=%0d skips=%0d idle=%0d", n_dual, n_single_ready, n_skip, n_idle);
    check("mechanisms exercised", n_dual > 0 && n_single_ready > 0 && n_skip > 0 && n_idle > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
