// tb_dual_warp_scheduler: end-to-end test of the dual-warp scheduler at its
// default size (eight warps, eight lanes).
//
// The testbench models the host, the instruction cache and the SM:
//  - host: activates seven warps at start and the eighth later, each with its
//    own program, start PC and thread mask;
//  - instruction cache: accepts requests with random ARREADY, answers in order
//    after a random latency with the 128-bit line at the requested address;
//  - SM: random issuing conditions per scheduler, and release of reserved
//    register entries (operand read, write-back) at random times.
// For every issued instruction it checks the slot (odd warps on 0/1, even on
// 2/3), that it is the next instruction of its warp in program order (jumps
// followed), its thread mask, and, against the testbench's own dependence
// counts, that it has no RAW/WAW/WAR hazard and that a pair issued together is
// independent. At the end every warp must have run to its exit having issued
// each of its instructions once. It counts the mechanisms of the design (dual
// issue, four instructions in a cycle, dependence stalls, pair splits, fetch
// contention and back-pressure, SM not ready, round-robin skips, jumps, exits,
// late activation, re-activation of a finished and drained warp) and fails if
// one never occurred.
module tb_dual_warp_scheduler;
  import ws_pkg::*;
  localparam int NW = 8, NSP = 8, NRD = 8, NWR = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cfg_valid;
  logic [WID_W-1:0] cfg_warp;
  logic [NSP-1:0] cfg_tmask;
  logic [PC_W-1:0] cfg_pc;
  logic [NW-1:0] warp_active;
  logic ic_arvalid, ic_arready, ic_rvalid;
  logic [PC_W-1:0] ic_araddr, ic_raddr;
  logic [WID_W-1:0] ic_arctxid, ic_rctxid;
  logic [LINE_W-1:0] ic_rdata;
  logic sm_ready [2], sm_dual_ready [2];
  issue_t issue [4];
  logic dep_ok [2];
  rel_t rd_rel [NRD];
  rel_t wr_rel [NWR];

  dual_warp_scheduler dut (.*);

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- programs: warp w lives at 0x1000*(w+1)
  localparam int PMAX = 200;
  logic [INST_W-1:0] prog [NW][PMAX];
  int plen [NW];
  int expect_n [NW];
  logic [NSP-1:0] wmask [NW];

  function automatic logic [PC_W-1:0] base(input int w);
    return PC_W'(32'h1000 * (w + 1));
  endfunction

  function automatic logic [INST_W-1:0] mem(input logic [PC_W-1:0] a);
    int w, i;
    w = int'(a >> 12) - 1;
    i = int'(a[11:0]) >> 2;
    if (w < 0 || w >= NW || i >= plen[w]) return enc_r(OP_NOP, 0, 0, 0);
    return prog[w][i];
  endfunction

  // ---------------- reference dependence state
  int mw [NW][NUM_REGS];
  int mr [NW][NUM_REGS];
  logic [PC_W-1:0] m_pc [NW];
  bit m_active [NW];
  int n_iss [NW];

  function automatic bit hazard(input int w, input dec_t d);
    if (d.rs1_v && mw[w][d.rs1] > 0) return 1;
    if (d.rs2_v && mw[w][d.rs2] > 0) return 1;
    if (d.rd_v && (mw[w][d.rd] > 0 || mr[w][d.rd] > 0)) return 1;
    return 0;
  endfunction

  function automatic bit pair_dep(input dec_t a, input dec_t b);
    if (a.rd_v && ((b.rs1_v && b.rs1 == a.rd) || (b.rs2_v && b.rs2 == a.rd) || (b.rd_v && b.rd == a.rd))) return 1;
    if (b.rd_v && ((a.rs1_v && a.rs1 == b.rd) || (a.rs2_v && a.rs2 == b.rd))) return 1;
    return 0;
  endfunction

  function automatic bit drained(input int w);
    for (int r = 0; r < NUM_REGS; r++) if (mw[w][r] > 0 || mr[w][r] > 0) return 0;
    for (int p = 0; p < NRD; p++) if (rd_prev[p].valid && rd_prev[p].warp == WID_W'(w)) return 0;
    for (int p = 0; p < NWR; p++) if (wr_prev[p].valid && wr_prev[p].warp == WID_W'(w)) return 0;
    return 1;
  endfunction

  task automatic reserve(input int w, input dec_t d);
    if (d.rd_v) mw[w][d.rd]++;
    if (d.rs1_v) mr[w][d.rs1]++;
    if (d.rs2_v) mr[w][d.rs2]++;
  endtask

  // ---------------- instruction cache model
  typedef struct { logic [PC_W-1:0] a; logic [WID_W-1:0] id; longint due; } ic_req_t;
  ic_req_t icq [$];
  longint cyc = 0;

  rel_t rd_prev [NRD];
  rel_t wr_prev [NWR];
  int n_react = 0;

  // ---------------- counters
  int n_dual = 0, n_quad = 0, n_dep_stall = 0, n_pair_split = 0, n_contend = 0, n_bp = 0;
  int n_not_ready = 0, n_skip = 0, n_jmp = 0, n_exit = 0, n_late = 0, n_both_groups = 0;
  int last_g [2] = '{-1, -1};
  int n_dispatch_single = 0;

  initial begin
    int act_order [8] = '{0, 1, 2, 3, 4, 5, 7, 6};
    int next_act;
    bit all_done;

    for (int w = 0; w < NW; w++) begin
      plen[w] = 120 + 8 * w + (w % 3);
      for (int i = 0; i < plen[w]; i++)
        prog[w][i] = enc_r(opcode_e'($urandom_range(1, 4)), REG_W'($urandom_range(0, 5)),
                           REG_W'($urandom_range(0, 5)), REG_W'($urandom_range(0, 5)));
      prog[w][5] = enc_jmp(base(w) + 4 * 9);   // skips 3 instructions
      prog[w][plen[w] - 1] = {OP_EXIT, 28'd0};
      expect_n[w] = plen[w] - 3;
      wmask[w] = NSP'($urandom_range(1, 255));
      for (int r = 0; r < NUM_REGS; r++) begin mw[w][r] = 0; mr[w][r] = 0; end
      m_active[w] = 0; n_iss[w] = 0; m_pc[w] = base(w);
    end
    cfg_valid = 0; cfg_warp = 0; cfg_tmask = 0; cfg_pc = 0;
    ic_arready = 0; ic_rvalid = 0; ic_raddr = 0; ic_rctxid = 0; ic_rdata = 0;
    for (int g = 0; g < 2; g++) begin sm_ready[g] = 0; sm_dual_ready[g] = 0; end
    for (int p = 0; p < NRD; p++) begin rd_rel[p] = '0; rd_prev[p] = '0; end
    for (int p = 0; p < NWR; p++) begin wr_rel[p] = '0; wr_prev[p] = '0; end
    next_act = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check("no warp active after reset", warp_active, 0);

    all_done = 0;
    while (!all_done) begin
      cyc++;
      // ---- 1. check what was issued (decided last cycle)
      for (int g = 0; g < 2; g++) begin
        issue_t s0, s1;
        s0 = issue[2*g]; s1 = issue[2*g + 1];
        if (s1.valid) check("slot1 only with slot0", s0.valid, 1);
        if (s1.valid) check("dependence result reported", dep_ok[g], 1);
        if (s0.valid && !s1.valid && dep_ok[g]) begin
          check("independent pair held back only by the SM", sm_dual_ready[g], 0);
          n_dispatch_single++;
        end
        if (s0.valid) begin
          int w;
          dec_t d0, d1;
          w = int'(s0.warp);
          check("warp parity matches scheduler", w % 2, (g == 0) ? 1 : 0);
          check("issued warp is active", m_active[w], 1);
          check("pc in program order", s0.pc, m_pc[w]);
          check("instruction word", s0.inst, mem(m_pc[w]));
          check("thread mask", s0.tmask, wmask[w]);
          d0 = decode(s0.inst);
          check("no hazard at issue", hazard(w, d0), 0);
          if (last_g[g] >= 0 && w != (last_g[g] + 2) % NW && w != last_g[g]) n_skip++;
          last_g[g] = w;
          n_iss[w]++;
          if (s1.valid) begin
            n_dual++;
            check("pair same warp", s1.warp, w);
            check("pair pc", s1.pc, m_pc[w] + 4);
            check("pair word", s1.inst, mem(m_pc[w] + 4));
            d1 = decode(s1.inst);
            check("pair independent", pair_dep(d0, d1), 0);
            check("no hazard second", hazard(w, d1), 0);
            n_iss[w]++;
          end
          reserve(w, d0);
          if (s1.valid) reserve(w, d1);
          if (d0.is_jmp) begin m_pc[w] = d0.target; n_jmp++; end
          else m_pc[w] = m_pc[w] + (s1.valid ? 8 : 4);
          if (d0.is_exit) begin m_active[w] = 0; n_exit++; end
        end
      end
      if (issue[0].valid && issue[1].valid && issue[2].valid && issue[3].valid) n_quad++;
      if (issue[0].valid && issue[2].valid) n_both_groups++;
      // ---- 2. releases driven last cycle now applied
      for (int p = 0; p < NWR; p++) if (wr_prev[p].valid) mw[wr_prev[p].warp][wr_prev[p].r]--;
      for (int p = 0; p < NRD; p++) if (rd_prev[p].valid) mr[rd_prev[p].warp][rd_prev[p].r]--;
      // ---- 3. observe stalls from the reference state
      for (int w = 0; w < NW; w++)
        if (m_active[w]) begin
          dec_t a, b;
          a = decode(mem(m_pc[w])); b = decode(mem(m_pc[w] + 4));
          if (hazard(w, a)) n_dep_stall++;
          else if (m_pc[w][3:2] != 2'd3 && !hazard(w, b) && pair_dep(a, b)) n_pair_split++;
        end
      begin
        int nreq;
        nreq = 0;
        for (int w = 0; w < NW; w++) nreq += dut.ar_valid[w];
        if (nreq > 1) n_contend++;
      end
      // ---- 4. drive the next cycle
      // host
      cfg_valid = 0;
      if (next_act == 8 && n_react == 0 && !m_active[0] && n_iss[0] == expect_n[0] && drained(0)) begin
        // warp 0 has finished and drained: run its program a second time
        cfg_valid = 1; cfg_warp = 0; cfg_tmask = wmask[0]; cfg_pc = base(0);
        m_active[0] = 1; m_pc[0] = base(0); expect_n[0] += plen[0] - 3; n_react++;
      end else if (next_act < 7 || (next_act == 7 && cyc == 300)) begin
        int w;
        w = act_order[next_act];
        cfg_valid = 1; cfg_warp = WID_W'(w); cfg_tmask = wmask[w]; cfg_pc = base(w);
        m_active[w] = 1; m_pc[w] = base(w);
        if (next_act == 7) n_late++;
        next_act++;
      end
      // SM issuing condition
      for (int g = 0; g < 2; g++) begin
        sm_ready[g] = ($urandom_range(0, 6) != 0);
        sm_dual_ready[g] = sm_ready[g] && ($urandom_range(0, 3) != 0);
        if (!sm_ready[g]) n_not_ready++;
      end
      // SM releases
      for (int p = 0; p < NRD; p++) rd_rel[p] = '0;
      for (int p = 0; p < NWR; p++) wr_rel[p] = '0;
      begin
        int pw, pr, w0;
        pw = 0; pr = 0; w0 = $urandom_range(0, NW - 1);
        for (int k = 0; k < NW; k++) begin
          int w;
          w = (w0 + k) % NW;
          for (int r = 0; r < 6; r++) begin
            if (mw[w][r] > 0 && pw < NWR && $urandom_range(0, 2) == 0) begin
              wr_rel[pw] = '{valid: 1, warp: WID_W'(w), r: REG_W'(r)}; pw++;
            end
            if (mr[w][r] > 0 && pr < NRD && $urandom_range(0, 1) == 0) begin
              rd_rel[pr] = '{valid: 1, warp: WID_W'(w), r: REG_W'(r)}; pr++;
            end
          end
        end
      end
      rd_prev = rd_rel; wr_prev = wr_rel;
      // instruction cache
      ic_arready = ($urandom_range(0, 2) != 0);
      ic_rvalid = 0;
      if (icq.size() > 0 && icq[0].due <= cyc) begin
        ic_req_t q;
        q = icq.pop_front();
        ic_rvalid = 1; ic_raddr = q.a; ic_rctxid = q.id;
        for (int k = 0; k < 4; k++) ic_rdata[k*32 +: 32] = mem(q.a + PC_W'(4 * k));
      end
      #1;
      if (ic_arvalid) begin
        check("fetch address is line aligned", ic_araddr[3:0], 0);
        if (ic_arready) icq.push_back('{a: ic_araddr, id: ic_arctxid, due: cyc + $urandom_range(1, 5)});
        else n_bp++;
      end
      @(posedge clk); #1;
      all_done = (next_act == 8) && (n_react == 1);
      for (int w = 0; w < NW; w++) if (m_active[w]) all_done = 0;
    end
    // drain the last releases and check the end state
    for (int p = 0; p < NRD; p++) rd_rel[p] = '0;
    for (int p = 0; p < NWR; p++) wr_rel[p] = '0;
    cfg_valid = 0;
    repeat (2) @(posedge clk); #1;
    check("all warps inactive", warp_active, 0);
    for (int w = 0; w < NW; w++) check($sformatf("warp %0d instruction count", w), n_iss[w], expect_n[w]);
    $display("cycles=%0d dual=%0d quad=%0d both-groups=%0d dep-stall=%0d pair-split=%0d contention=%0d backpressure=%0d",
             cyc, n_dual, n_quad, n_both_groups, n_dep_stall, n_pair_split, n_contend, n_bp);
    $display("dispatch-single=%0d re-activations=%0d", n_dispatch_single, n_react);
    $display("sm-not-ready=%0d rr-skips=%0d jumps=%0d exits=%0d late-activations=%0d",
             n_not_ready, n_skip, n_jmp, n_exit, n_late);
    check("dual issue seen", n_dual > 0, 1);
    check("four instructions in one cycle seen", n_quad > 0, 1);
    check("odd and even issue in one cycle seen", n_both_groups > 0, 1);
    check("dependence stall seen", n_dep_stall > 0, 1);
    check("pair split by dependence seen", n_pair_split > 0, 1);
    check("fetch contention seen", n_contend > 0, 1);
    check("cache back-pressure seen", n_bp > 0, 1);
    check("SM not ready seen", n_not_ready > 0, 1);
    check("dispatch declined an independent pair", n_dispatch_single > 0, 1);
    check("round-robin skip seen", n_skip > 0, 1);
    check("every jump taken", n_jmp, NW + 1);
    check("every exit seen", n_exit, NW + 1);
    check("re-activation seen", n_react, 1);
    check("late activation seen", n_late, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
