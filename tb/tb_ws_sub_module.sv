// tb_ws_sub_module: self-checking test of one warp sub module.
//
// The testbench plays the fetch arbiter and instruction cache (random accept
// delay, random response latency, lines read from a generated program), the
// group scheduler (random single and dual grants) and the SM (random release of
// reserved register entries). It follows the program with its own PC, line
// buffer and dependence counts and checks, every cycle, the fetch request, the
// two presented instructions and the can0/can1 verdicts; at the end it checks
// that the warp ran to its exit and issued every instruction in order once.
module tb_ws_sub_module;
  import ws_pkg::*;
  localparam int NRD = 8, NWR = 4, ID = 5, NSP = 8, PLEN = 96;

  logic clk = 0, rst_n = 0;
  logic cfg_valid = 0;
  logic [NSP-1:0] cfg_tmask;
  logic [PC_W-1:0] cfg_pc;
  logic active, ar_valid, ar_accept, can0, can1, grant, grant_dual;
  logic [NSP-1:0] tmask;
  logic [PC_W-1:0] ar_addr, pc;
  logic [INST_W-1:0] inst0, inst1;
  resp_t resp;
  rel_t rd_rel [NRD];
  rel_t wr_rel [NWR];

  ws_sub_module #(.WARP_ID(ID), .NUM_SP(NSP), .NRD(NRD), .NWR(NWR)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [INST_W-1:0] prog [PLEN];
  localparam logic [PC_W-1:0] BASE = 32'h0000_0400;
  int mw [NUM_REGS];
  int mr [NUM_REGS];
  int n_issued = 0, n_dual = 0, n_stall = 0, n_jmp = 0, n_fetch = 0, n_pairblk = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [INST_W-1:0] mem(input logic [PC_W-1:0] a);
    int i;
    i = int'((a - BASE) >> 2);
    return (i >= 0 && i < PLEN) ? prog[i] : enc_r(OP_NOP, 0, 0, 0);
  endfunction

  function automatic bit model_ok(input dec_t d, input int head);
    if (d.rs1_v && (mw[d.rs1] > 0 || mr[d.rs1] + head > 7)) return 0;
    if (d.rs2_v && (mw[d.rs2] > 0 || mr[d.rs2] + head > 7)) return 0;
    if (d.rd_v && (mw[d.rd] > 0 || mr[d.rd] > 0)) return 0;
    return 1;
  endfunction

  function automatic bit model_pair(input dec_t a, input dec_t b);
    if (a.rd_v && ((b.rs1_v && b.rs1 == a.rd) || (b.rs2_v && b.rs2 == a.rd) || (b.rd_v && b.rd == a.rd))) return 1;
    if (b.rd_v && ((a.rs1_v && a.rs1 == b.rd) || (a.rs2_v && a.rs2 == b.rd))) return 1;
    return 0;
  endfunction

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h (t=%0t)", what, got, exp, $time);
    end
  endtask

  // cache / arbiter model state
  logic [PC_W-1:0] m_pc, m_tag;
  bit m_active, m_line_v, m_wait, m_done;
  int acc_delay, resp_delay;
  logic [PC_W-1:0] req_addr;
  bit exit_seen;

  initial begin
    // program: random ALU work on r0..r7, forward jumps, exit at the end
    for (int i = 0; i < PLEN; i++) begin
      int op;
      op = $urandom_range(1, 4);
      prog[i] = enc_r(opcode_e'(op), REG_W'($urandom_range(0, 7)), REG_W'($urandom_range(0, 7)), REG_W'($urandom_range(0, 7)));
    end
    prog[10] = enc_jmp(BASE + 4 * 17);      // jump to another line, mid-line
    prog[40] = enc_jmp(BASE + 4 * 42);      // jump inside the same line
    prog[PLEN - 1] = {OP_EXIT, 28'd0};

    for (int r = 0; r < NUM_REGS; r++) begin mw[r] = 0; mr[r] = 0; end
    ar_accept = 0; resp = '0; grant = 0; grant_dual = 0;
    for (int p = 0; p < NRD; p++) rd_rel[p] = '0;
    for (int p = 0; p < NWR; p++) wr_rel[p] = '0;
    cfg_tmask = 8'b1011_0100; cfg_pc = BASE;
    m_active = 0; m_line_v = 0; m_wait = 0; exit_seen = 0;
    acc_delay = 0; resp_delay = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check("inactive after reset", active, 0);
    check("no request when inactive", ar_valid, 0);
    cfg_valid = 1; @(posedge clk); #1; cfg_valid = 0;
    m_active = 1; m_pc = BASE;
    check("activated", active, 1);
    check("thread mask", tmask, cfg_tmask);
    check("start pc", pc, BASE);

    while (!exit_seen || m_active) begin
      bit hit, e0, e1, g, gd, acc;
      logic [PC_W-1:0] acc_addr;
      dec_t d0, d1;
      logic [INST_W-1:0] i0, i1;
      hit = m_line_v && (m_tag == {m_pc[PC_W-1:4], 4'b0});
      // --- fetch side
      check("ar_valid", ar_valid, m_active && !hit && !m_wait);
      if (ar_valid) check("ar_addr", ar_addr, {m_pc[PC_W-1:4], 4'b0});
      ar_accept = ar_valid && ($urandom_range(0, 2) == 0);
      acc = ar_valid && ar_accept;
      acc_addr = ar_addr;
      // --- issue side
      check("pc", pc, m_pc);
      i0 = mem(m_pc);
      i1 = (m_pc[3:2] == 2'd3) ? '0 : mem(m_pc + 4);
      d0 = decode(i0); d1 = decode(i1);
      e0 = m_active && hit && model_ok(d0, 2);
      e1 = e0 && m_pc[3:2] != 2'd3 && model_ok(d1, 4) && !model_pair(d0, d1)
           && !d0.is_jmp && !d0.is_exit && !d1.is_jmp && !d1.is_exit;
      check("can0", can0, e0);
      check("can1", can1, e1);
      if (hit) begin
        check("inst0", inst0, i0);
        if (m_pc[3:2] != 2'd3) check("inst1", inst1, i1);
      end
      if (m_active && hit && !e0) n_stall++;
      if (e0 && !e1 && model_pair(d0, d1)) n_pairblk++;
      g  = e0 && ($urandom_range(0, 3) != 0);
      gd = g && e1 && ($urandom_range(0, 3) != 0);
      grant = g; grant_dual = gd;
      // --- SM releases
      for (int p = 0; p < NRD; p++) rd_rel[p] = '0;
      for (int p = 0; p < NWR; p++) wr_rel[p] = '0;
      begin
        int pw, pr;
        pw = 0; pr = 0;
        for (int r = 0; r < 8; r++) begin
          if (mw[r] > 0 && pw < NWR && $urandom_range(0, 3) == 0) begin
            wr_rel[pw] = '{valid: 1, warp: WID_W'(ID), r: REG_W'(r)}; pw++;
          end
          if (mr[r] > 0 && pr < NRD && $urandom_range(0, 2) == 0) begin
            rd_rel[pr] = '{valid: 1, warp: WID_W'(ID), r: REG_W'(r)}; pr++;
          end
        end
      end
      // --- cache response
      resp = '0;
      if (m_wait && resp_delay == 0) begin
        resp.valid = 1; resp.ctxid = WID_W'(ID); resp.addr = req_addr;
        for (int k = 0; k < 4; k++) resp.data[k*32 +: 32] = mem(req_addr + 4 * k);
      end else if ($urandom_range(0, 4) == 0) begin
        // a response for another warp must be ignored
        resp.valid = 1; resp.ctxid = WID_W'(ID + 2); resp.addr = {m_pc[PC_W-1:4], 4'b0};
        resp.data = '1;
      end
      @(posedge clk); #1;
      // --- model update
      for (int p = 0; p < NWR; p++) if (wr_rel[p].valid) mw[wr_rel[p].r]--;
      for (int p = 0; p < NRD; p++) if (rd_rel[p].valid) mr[rd_rel[p].r]--;
      if (resp.valid && resp.ctxid == WID_W'(ID)) begin
        m_wait = 0; m_line_v = 1; m_tag = req_addr; resp_delay = -1;
      end else if (m_wait && resp_delay > 0) resp_delay--;
      if (acc) begin
        m_wait = 1; req_addr = acc_addr; resp_delay = $urandom_range(0, 6); n_fetch++;
      end
      if (g) begin
        n_issued++;
        if (d0.rd_v) mw[d0.rd]++;
        if (d0.rs1_v) mr[d0.rs1]++;
        if (d0.rs2_v) mr[d0.rs2]++;
        if (gd) begin
          n_issued++; n_dual++;
          if (d1.rd_v) mw[d1.rd]++;
          if (d1.rs1_v) mr[d1.rs1]++;
          if (d1.rs2_v) mr[d1.rs2]++;
        end
        if (d0.is_exit) begin m_active = 0; exit_seen = 1; end
        if (d0.is_jmp) begin m_pc = d0.target; n_jmp++; end
        else m_pc = m_pc + (gd ? 8 : 4);
      end
      grant = 0; grant_dual = 0; ar_accept = 0;
      #1;
      check("active", active, m_active);
    end
    // 96 words, jumps skip 6 + 1 words: 89 instructions
    check("instructions issued", n_issued, PLEN - 6 - 1);
    check("inactive after exit", active, 0);
    @(posedge clk); #1;
    check("no fetch after exit", ar_valid, 0);
    $display("issued=%0d dual=%0d stalls=%0d pair-blocked=%0d jumps=%0d fetches=%0d",
             n_issued, n_dual, n_stall, n_pairblk, n_jmp, n_fetch);
    check("mechanisms exercised", n_dual > 0 && n_stall > 0 && n_pairblk > 0 && n_jmp == 2 && n_fetch > 10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
