// tb_fig3_round_robin: the round-robin issue example, run through the whole
// scheduler.
//
// The scheduler is built with sixteen warps. Warps 0, 3, 7, 10, 12 and 14 are
// never activated; the other ten are activated with programs of independent
// instructions, and the model instruction cache answers every fetch. The SM
// holds both issuing conditions low until every active warp has its first
// line, then accepts one instruction per scheduler per cycle. The first four
// issue cycles must then be: odd 1 / even 2, odd 5 / even 4, odd 9 / even 6,
// odd 11 / even 8, and the inactive warps must never issue.
module tb_fig3_round_robin;
  import ws_pkg::*;
  localparam int NW = 16, NSP = 8, NRD = 8, NWR = 4;

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

  dual_warp_scheduler #(.NUM_WARPS(NW)) dut (.*);

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program of warp w at 0x1000*(w+1): ALU-immediate writes to distinct registers
  function automatic logic [INST_W-1:0] mem(input logic [PC_W-1:0] a);
    return enc_r(OP_ALUI, REG_W'(a[6:2]), 5'd31, 5'd0);
  endfunction

  // instruction cache model: one-cycle latency
  logic pend;
  logic [PC_W-1:0] pend_a;
  logic [WID_W-1:0] pend_id;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pend <= 1'b0;
    else begin
      pend <= ic_arvalid && ic_arready;
      pend_a <= ic_araddr;
      pend_id <= ic_arctxid;
    end
  always_comb begin
    ic_arready = 1'b1;
    ic_rvalid  = pend;
    ic_raddr   = pend_a;
    ic_rctxid  = pend_id;
    for (int k = 0; k < 4; k++) ic_rdata[k*32 +: 32] = mem(pend_a + PC_W'(4 * k));
  end

  int exp_odd [4]  = '{1, 5, 9, 11};
  int exp_even [4] = '{2, 4, 6, 8};
  bit inactive [NW];

  initial begin
    foreach (inactive[w]) inactive[w] = 0;
    inactive[0] = 1; inactive[3] = 1; inactive[7] = 1;
    inactive[10] = 1; inactive[12] = 1; inactive[14] = 1;
    cfg_valid = 0; cfg_warp = 0; cfg_tmask = 0; cfg_pc = 0;
    for (int g = 0; g < 2; g++) begin sm_ready[g] = 0; sm_dual_ready[g] = 0; end
    for (int p = 0; p < NRD; p++) rd_rel[p] = '0;
    for (int p = 0; p < NWR; p++) wr_rel[p] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // host activates the ten active warps, highest number first
    for (int w = NW - 1; w >= 0; w--)
      if (!inactive[w]) begin
        @(negedge clk);
        cfg_valid = 1; cfg_warp = WID_W'(w); cfg_tmask = '1; cfg_pc = PC_W'(32'h1000 * (w + 1));
      end
    @(negedge clk); cfg_valid = 0;
    // wait until every active warp can issue
    begin
      bit all_ready;
      all_ready = 0;
      while (!all_ready) begin
        @(negedge clk);
        all_ready = 1;
        for (int w = 0; w < NW; w++) if (!inactive[w] && !dut.can0[w]) all_ready = 0;
      end
    end
    for (int w = 0; w < NW; w++) check($sformatf("warp %0d active", w), warp_active[w], !inactive[w]);
    sm_ready[0] = 1; sm_ready[1] = 1;
    for (int t = 0; t < 4; t++) begin
      @(posedge clk); #1;
      check($sformatf("T%0d odd issues", t), issue[0].valid, 1);
      check($sformatf("T%0d odd warp", t), issue[0].warp, exp_odd[t]);
      check($sformatf("T%0d even issues", t), issue[2].valid, 1);
      check($sformatf("T%0d even warp", t), issue[2].warp, exp_even[t]);
      check($sformatf("T%0d single issue (dual not allowed)", t), issue[1].valid || issue[3].valid, 0);
      $display("T%0d: odd warp %0d, even warp %0d", t, issue[0].warp, issue[2].warp);
    end
    // keep running a while: inactive warps never issue
    repeat (60) begin
      @(posedge clk); #1;
      for (int s = 0; s < 4; s++)
        if (issue[s].valid) check("inactive warp never issues", inactive[issue[s].warp], 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
