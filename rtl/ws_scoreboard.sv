// ws_scoreboard: the Write Dependency and Read Dependency tables of one warp,
// and the register-dependence test that decides whether the next instruction,
// and the one after it, may issue.
//
// Write Dependency holds one bit per register: set when an instruction that
// writes the register issues, cleared when the SM reports its write-back.
// Read Dependency holds one small counter per register: raised for each source
// operand of an issued instruction, lowered when the SM reports that operand
// read. The reference design shows both tables with 32 entries and says issue depends
// on the read/write register dependence; the use of a counter (rather than a
// bit) for reads, so that several in-flight readers of a register can be
// tracked, is this design's choice.
//
// Issue test (combinational, from the registered tables):
//   ok0: inst0 has no RAW (source pending write), no WAW (destination pending
//        write), no WAR (destination still to be read) and room in the read
//        counters of its sources.
//   ok1: the same for inst1, plus no RAW/WAW/WAR between inst0 and inst1, so
//        the pair may issue together (superscalar issue).
// iss0/iss1 update the tables at the next clock edge; releases arrive on
// rd_rel/wr_rel tagged with a warp id and are ignored unless it is WARP_ID.
module ws_scoreboard
  import ws_pkg::*;
#(
  parameter int unsigned WARP_ID = 0,
  parameter int unsigned NRD     = 8,   // read-release ports (2 per issue slot)
  parameter int unsigned NWR     = 4    // write-back ports (1 per issue slot)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,       // warp (re)activated: empty tables
  input  dec_t                d0,
  input  dec_t                d1,
  output logic                ok0,
  output logic                ok1,
  input  logic                iss0,
  input  logic                iss1,
  input  rel_t                rd_rel [NRD],
  input  rel_t                wr_rel [NWR],
  output logic [NUM_REGS-1:0] wpend,
  output logic                rd_busy [NUM_REGS]
);
  localparam logic [RCNT_W-1:0] RMAX = '1;
  logic [RCNT_W-1:0] rcnt [NUM_REGS];

  // room for `extra` more increments on register r
  function automatic logic room(input logic [RCNT_W-1:0] c, input int unsigned extra);
    return (int'(c) + extra) <= int'(RMAX);
  endfunction

  function automatic logic table_ok(input dec_t d, input int unsigned headroom);
    logic ok;
    ok = 1'b1;
    if (d.rs1_v && (wpend[d.rs1] || !room(rcnt[d.rs1], headroom))) ok = 1'b0;
    if (d.rs2_v && (wpend[d.rs2] || !room(rcnt[d.rs2], headroom))) ok = 1'b0;
    if (d.rd_v  && (wpend[d.rd]  || rcnt[d.rd] != '0))             ok = 1'b0;
    return ok;
  endfunction

  logic pair_dep;
  always_comb begin
    pair_dep = 1'b0;
    if (d0.rd_v && d1.rs1_v && d1.rs1 == d0.rd) pair_dep = 1'b1;  // RAW
    if (d0.rd_v && d1.rs2_v && d1.rs2 == d0.rd) pair_dep = 1'b1;  // RAW
    if (d0.rd_v && d1.rd_v  && d1.rd  == d0.rd) pair_dep = 1'b1;  // WAW
    if (d1.rd_v && d0.rs1_v && d0.rs1 == d1.rd) pair_dep = 1'b1;  // WAR
    if (d1.rd_v && d0.rs2_v && d0.rs2 == d1.rd) pair_dep = 1'b1;  // WAR
    ok0 = table_ok(d0, 2);
    ok1 = table_ok(d1, 4) && !pair_dep;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wpend <= '0;
      for (int r = 0; r < NUM_REGS; r++) rcnt[r] <= '0;
    end else if (clear) begin
      wpend <= '0;
      for (int r = 0; r < NUM_REGS; r++) rcnt[r] <= '0;
    end else begin
      for (int r = 0; r < NUM_REGS; r++) begin
        int inc, dec;
        logic wset, wclr;
        inc = 0; dec = 0; wset = 1'b0; wclr = 1'b0;
        if (iss0 && d0.rs1_v && d0.rs1 == REG_W'(r)) inc++;
        if (iss0 && d0.rs2_v && d0.rs2 == REG_W'(r)) inc++;
        if (iss1 && d1.rs1_v && d1.rs1 == REG_W'(r)) inc++;
        if (iss1 && d1.rs2_v && d1.rs2 == REG_W'(r)) inc++;
        if (iss0 && d0.rd_v && d0.rd == REG_W'(r)) wset = 1'b1;
        if (iss1 && d1.rd_v && d1.rd == REG_W'(r)) wset = 1'b1;
        for (int p = 0; p < NRD; p++)
          if (rd_rel[p].valid && rd_rel[p].warp == WID_W'(WARP_ID) && rd_rel[p].r == REG_W'(r)) dec++;
        for (int p = 0; p < NWR; p++)
          if (wr_rel[p].valid && wr_rel[p].warp == WID_W'(WARP_ID) && wr_rel[p].r == REG_W'(r)) wclr = 1'b1;
        rcnt[r]  <= RCNT_W'(int'(rcnt[r]) + inc - dec);
        wpend[r] <= (wpend[r] && !wclr) || wset;
      end
    end
  end

  always_comb
    for (int r = 0; r < NUM_REGS; r++) rd_busy[r] = (rcnt[r] != '0);

  // The SM may only release what an issued instruction reserved.
  for (genvar p = 0; p < NWR; p++) begin : g_chk
    a_wb_reserved: assert property (@(posedge clk) disable iff (!rst_n)
      (wr_rel[p].valid && wr_rel[p].warp == WID_W'(WARP_ID) && !clear) |-> wpend[wr_rel[p].r])
      else $error("write-back of register %0d with no pending write", wr_rel[p].r);
  end
endmodule
