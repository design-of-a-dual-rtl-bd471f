// ws_sub_module: the per-warp sub module of the warp scheduler.
//
// One instance exists per warp. It holds the warp's state as handed over by the
// host (active flag, thread mask, start PC), a program counter per stream
// processor lane (SP PC[0..7]), a pre-fetch controller with a one-line buffer
// of four instructions (RDATA[0..3]), the mux that presents the next two
// instructions Inst[0] and Inst[1], and the warp's dependence tables
// (ws_scoreboard).
//
// Fetch: while the warp is active and the line holding its PC is not in the
// buffer, it raises ar_valid with the 16-byte line address and holds it until
// the fetch arbiter reports ar_accept; it then waits for the response tagged
// with its own warp id (CTXID) and fills the buffer.
// Issue: can0 says Inst[0] may issue, can1 that Inst[1] may issue together with
// it (same line, neither is a jump or exit, and the dependence test passes).
// On grant the PC of every lane in the thread mask advances by one or two
// instructions (two when grant_dual), or jumps; an exit makes the warp
// inactive. The outputs are combinational from registered state; the effect of
// a grant is visible the next cycle.
//
// The reference design shows the SP PC table, the pre-fetch controller, the line
// buffer, the mux and the two tables inside a sub module; how they work is this
// design's choice: all lanes of the thread mask follow one PC (the reference design
// describes no divergence), the PC of the lowest active lane is the warp's PC,
// the buffer holds a single line and is refilled on a miss, and only a jump is
// resolved here.
module ws_sub_module
  import ws_pkg::*;
#(
  parameter int unsigned WARP_ID = 0,
  parameter int unsigned NUM_SP  = 8,
  parameter int unsigned NRD     = 8,
  parameter int unsigned NWR     = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // host activation
  input  logic              cfg_valid,
  input  logic [NUM_SP-1:0] cfg_tmask,
  input  logic [PC_W-1:0]   cfg_pc,
  output logic              active,
  output logic [NUM_SP-1:0] tmask,
  // instruction fetch
  output logic              ar_valid,
  output logic [PC_W-1:0]   ar_addr,
  input  logic              ar_accept,
  input  resp_t             resp,
  // issue
  output logic              can0,
  output logic              can1,
  output logic [PC_W-1:0]   pc,
  output logic [INST_W-1:0] inst0,
  output logic [INST_W-1:0] inst1,
  input  logic              grant,
  input  logic              grant_dual,
  // SM feedback
  input  rel_t              rd_rel [NRD],
  input  rel_t              wr_rel [NWR]
);
  logic [PC_W-1:0]   sp_pc [NUM_SP];
  logic [INST_W-1:0] rdata [LINE_INSTS];
  logic              line_valid;
  logic [PC_W-5:0]   line_tag;
  logic              resp_wait;

  // warp PC: that of the lowest lane in the thread mask
  always_comb begin
    pc = sp_pc[0];
    for (int l = NUM_SP - 1; l >= 0; l--)
      if (tmask[l]) pc = sp_pc[l];
  end

  logic       hit;
  logic [1:0] slot;
  dec_t       d0, d1;
  logic       ok0, ok1;
  assign hit  = line_valid && (line_tag == pc[PC_W-1:4]);
  assign slot = pc[3:2];

  always_comb begin
    inst0 = rdata[slot];
    inst1 = (slot == 2'd3) ? '0 : rdata[slot + 2'd1];
  end
  assign d0 = decode(inst0);
  assign d1 = decode(inst1);

  ws_scoreboard #(.WARP_ID(WARP_ID), .NRD(NRD), .NWR(NWR)) u_sb (
    .clk, .rst_n,
    .clear  (cfg_valid),
    .d0, .d1, .ok0, .ok1,
    .iss0   (grant && can0),
    .iss1   (grant && grant_dual && can1),
    .rd_rel, .wr_rel,
    .wpend  (),
    .rd_busy()
  );

  assign can0 = active && hit && ok0;
  assign can1 = can0 && (slot != 2'd3) && ok1 &&
                !d0.is_jmp && !d0.is_exit && !d1.is_jmp && !d1.is_exit;

  assign ar_valid = active && !hit && !resp_wait;
  assign ar_addr  = {pc[PC_W-1:4], 4'b0000};

  logic [PC_W-1:0] pc_next;
  always_comb begin
    if (d0.is_jmp)                pc_next = d0.target;
    else if (grant_dual && can1)  pc_next = pc + PC_W'(8);
    else                          pc_next = pc + PC_W'(4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active     <= 1'b0;
      tmask      <= '0;
      line_valid <= 1'b0;
      line_tag   <= '0;
      resp_wait  <= 1'b0;
      for (int l = 0; l < NUM_SP; l++) sp_pc[l] <= '0;
      for (int k = 0; k < LINE_INSTS; k++) rdata[k] <= '0;
    end else if (cfg_valid) begin
      active     <= 1'b1;
      tmask      <= cfg_tmask;
      line_valid <= 1'b0;
      resp_wait  <= 1'b0;
      for (int l = 0; l < NUM_SP; l++) sp_pc[l] <= cfg_pc;
    end else begin
      if (ar_valid && ar_accept) resp_wait <= 1'b1;
      if (resp_wait && resp.valid && resp.ctxid == WID_W'(WARP_ID)) begin
        resp_wait  <= 1'b0;
        line_valid <= 1'b1;
        line_tag   <= resp.addr[PC_W-1:4];
        for (int k = 0; k < LINE_INSTS; k++) rdata[k] <= resp.data[k*INST_W +: INST_W];
      end
      if (grant && can0) begin
        for (int l = 0; l < NUM_SP; l++)
          if (tmask[l] || (tmask == '0 && l == 0)) sp_pc[l] <= pc_next;
        if (d0.is_exit) active <= 1'b0;
      end
    end
  end

  // a grant is only given to a sub module that can issue
  a_grant: assert property (@(posedge clk) disable iff (!rst_n) grant |-> can0)
    else $error("warp %0d granted without a ready instruction", WARP_ID);
  a_dual: assert property (@(posedge clk) disable iff (!rst_n) (grant && grant_dual) |-> can1)
    else $error("warp %0d dual grant without a ready pair", WARP_ID);
endmodule
