// tb_ws_scoreboard: self-checking test of the per-warp dependence tables.
//
// A reference model in the testbench keeps its own count of pending writes and
// pending operand reads per register and derives the expected issue verdicts
// (RAW, WAW, WAR, pair dependence, counter room) for random instruction pairs
// over a few registers, so hazards are frequent. Issues and releases are
// random; releases only ever return what was reserved. A directed sequence
// first checks each hazard kind by name. Releases for another warp id must be
// ignored.
module tb_ws_scoreboard;
  import ws_pkg::*;
  localparam int NRD = 8, NWR = 4, ID = 3;

  logic clk = 0, rst_n = 0, clear = 0;
  dec_t d0, d1;
  logic ok0, ok1, iss0, iss1;
  rel_t rd_rel [NRD];
  rel_t wr_rel [NWR];
  logic [NUM_REGS-1:0] wpend;
  logic rd_busy [NUM_REGS];

  ws_scoreboard #(.WARP_ID(ID), .NRD(NRD), .NWR(NWR)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int mw [NUM_REGS];
  int mr [NUM_REGS];
  int n_raw = 0, n_waw = 0, n_war = 0, n_pair = 0, n_dual = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dec_t mk(input int op, input int rd, input int rs1, input int rs2);
    return decode(enc_r(opcode_e'(op), REG_W'(rd), REG_W'(rs1), REG_W'(rs2)));
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

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic idle_rel();
    for (int p = 0; p < NRD; p++) rd_rel[p] = '0;
    for (int p = 0; p < NWR; p++) wr_rel[p] = '0;
  endtask

  // issue d0 (and d1) at the next edge, updating the model
  task automatic do_issue(input bit two);
    iss0 = 1; iss1 = two;
    @(posedge clk); #1;
    if (d0.rd_v) mw[d0.rd]++;
    if (d0.rs1_v) mr[d0.rs1]++;
    if (d0.rs2_v) mr[d0.rs2]++;
    if (two) begin
      if (d1.rd_v) mw[d1.rd]++;
      if (d1.rs1_v) mr[d1.rs1]++;
      if (d1.rs2_v) mr[d1.rs2]++;
    end
    iss0 = 0; iss1 = 0;
  endtask

  initial begin
    iss0 = 0; iss1 = 0; idle_rel();
    d0 = '0; d1 = '0;
    for (int r = 0; r < NUM_REGS; r++) begin mw[r] = 0; mr[r] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;

    // directed: r1 <- r2 + r3 in flight
    d0 = mk(OP_ALU, 1, 2, 3); d1 = mk(OP_ALU, 4, 5, 6); #1;
    check("empty table inst0", ok0, 1);
    check("independent pair", ok1, 1);
    do_issue(0);
    d0 = mk(OP_ALU, 7, 1, 8); #1; check("RAW blocked", ok0, 0);
    d0 = mk(OP_ALU, 1, 8, 9); #1; check("WAW blocked", ok0, 0);
    d0 = mk(OP_ALU, 2, 8, 9); #1; check("WAR blocked", ok0, 0);
    d0 = mk(OP_ST, 0, 9, 10); d1 = mk(OP_ALU, 11, 12, 13); #1;
    check("unrelated store", ok0, 1);
    d0 = mk(OP_ALU, 10, 12, 13); d1 = mk(OP_ALU, 14, 10, 13); #1;
    check("pair RAW first ok", ok0, 1); check("pair RAW blocked", ok1, 0);
    d1 = mk(OP_ALU, 12, 15, 16); #1; check("pair WAR blocked", ok1, 0);
    d1 = mk(OP_ALU, 10, 15, 16); #1; check("pair WAW blocked", ok1, 0);
    // release for another warp is ignored
    wr_rel[0] = '{valid: 1, warp: WID_W'(ID + 1), r: 1};
    @(posedge clk); #1; idle_rel();
    d0 = mk(OP_ALU, 7, 1, 8); #1; check("foreign release ignored", ok0, 0);
    // write-back of r1 frees the RAW, operand reads free the WAR
    wr_rel[0] = '{valid: 1, warp: WID_W'(ID), r: 1};
    rd_rel[3] = '{valid: 1, warp: WID_W'(ID), r: 2};
    rd_rel[5] = '{valid: 1, warp: WID_W'(ID), r: 3};
    @(posedge clk); #1; idle_rel();
    mw[1]--; mr[2]--; mr[3]--;
    d0 = mk(OP_ALU, 7, 1, 8); #1; check("RAW freed", ok0, 1);
    d0 = mk(OP_ALU, 2, 8, 9); #1; check("WAR freed", ok0, 1);

    // random phase over registers 0..5
    for (int it = 0; it < 4000; it++) begin
      bit e0, e1;
      d0 = mk(1 + $urandom_range(0, 3), $urandom_range(0, 5), $urandom_range(0, 5), $urandom_range(0, 5));
      d1 = mk(1 + $urandom_range(0, 3), $urandom_range(0, 5), $urandom_range(0, 5), $urandom_range(0, 5));
      // random releases of reserved entries (at most one per register per kind)
      idle_rel();
      begin
        int pw, pr;
        pw = 0; pr = 0;
        for (int r = 0; r < 6; r++) begin
          if (mw[r] > 0 && pw < NWR && $urandom_range(0, 3) == 0) begin
            wr_rel[pw] = '{valid: 1, warp: WID_W'(ID), r: REG_W'(r)}; pw++;
          end
          if (mr[r] > 0 && pr < NRD && $urandom_range(0, 2) == 0) begin
            rd_rel[pr] = '{valid: 1, warp: WID_W'(ID), r: REG_W'(r)}; pr++;
          end
        end
      end
      #1;
      e0 = model_ok(d0, 2);
      e1 = model_ok(d1, 4) && !model_pair(d0, d1);
      check("ok0", ok0, e0);
      check("ok1", ok1, e1);
      if (!e0) begin
        if ((d0.rs1_v && mw[d0.rs1] > 0) || (d0.rs2_v && mw[d0.rs2] > 0)) n_raw++;
        if (d0.rd_v && mw[d0.rd] > 0) n_waw++;
        if (d0.rd_v && mr[d0.rd] > 0) n_war++;
      end
      if (e0 && !e1 && model_pair(d0, d1)) n_pair++;
      iss0 = e0 && ($urandom_range(0, 1) == 1);
      iss1 = iss0 && e1;
      if (iss1) n_dual++;
      @(posedge clk); #1;
      // apply releases then issues to the model
      for (int p = 0; p < NWR; p++) if (wr_rel[p].valid) mw[wr_rel[p].r]--;
      for (int p = 0; p < NRD; p++) if (rd_rel[p].valid) mr[rd_rel[p].r]--;
      if (iss0) begin
        if (d0.rd_v) mw[d0.rd]++;
        if (d0.rs1_v) mr[d0.rs1]++;
        if (d0.rs2_v) mr[d0.rs2]++;
      end
      if (iss1) begin
        if (d1.rd_v) mw[d1.rd]++;
        if (d1.rs1_v) mr[d1.rs1]++;
        if (d1.rs2_v) mr[d1.rs2]++;
      end
      iss0 = 0; iss1 = 0;
      for (int r = 0; r < 6; r++) begin
        check("wpend", wpend[r], mw[r] > 0);
        check("rd_busy", rd_busy[r], mr[r] > 0);
      end
    end
    idle_rel();
    // clear empties the tables
    clear = 1; @(posedge clk); #1; clear = 0;
    check("clear wpend", wpend == '0, 1);
    $display("hazards seen: raw=%0d waw=%0d war=%0d pair=%0d dual=%0d", n_raw, n_waw, n_war, n_pair, n_dual);
    check("all hazard kinds exercised", (n_raw > 0 && n_waw > 0 && n_war > 0 && n_pair > 0 && n_dual > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
