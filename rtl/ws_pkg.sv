// ws_pkg: types and constants shared by the dual-warp scheduler.
//
// The scheduler follows the structure of a dual-warp SIMT front end: each warp
// has a sub module, warps are split into an odd and an even group, and each
// group issues up to two independent instructions per cycle. The reference design fixes
// the counts (8 warps, 8 stream processors, 32 dependence-table entries, a
// 128-bit instruction-cache read word). The instruction encoding below is this
// design's own: the reference design gives no instruction set, so a minimal 32-bit
// format carrying just what the scheduler must see (register operands, a jump
// and a warp-exit) is defined here.
//
// Encoding (32 bits):
//   [31:28] opcode   [27:23] rd   [22:18] rs1   [17:13] rs2   [12:0] immediate
//   OP_JMP uses [27:0] as the target word address (target byte address = {[27:0],2'b00}).
package ws_pkg;

  localparam int unsigned NUM_REGS   = 32;   // dependence table entries [0]..[31]
  localparam int unsigned REG_W      = 5;
  localparam int unsigned PC_W       = 32;   // byte address
  localparam int unsigned INST_W     = 32;
  localparam int unsigned LINE_INSTS = 4;    // RDATA[0..3]
  localparam int unsigned LINE_W     = INST_W * LINE_INSTS;  // 128-bit RDATA
  localparam int unsigned WID_W      = 4;    // warp id field, up to 16 warps
  localparam int unsigned MAX_SP     = 8;    // SP #0..#7, thread mask width
  localparam int unsigned RCNT_W     = 3;    // read-dependence counter width

  typedef enum logic [3:0] {
    OP_NOP  = 4'h0,
    OP_ALU  = 4'h1,   // rd <- rs1 op rs2
    OP_ALUI = 4'h2,   // rd <- rs1 op imm
    OP_LD   = 4'h3,   // rd <- mem[rs1 + imm]
    OP_ST   = 4'h4,   // mem[rs1 + imm] <- rs2
    OP_JMP  = 4'h5,   // pc <- target
    OP_EXIT = 4'h6    // warp finished
  } opcode_e;

  typedef struct packed {
    logic             rd_v;
    logic [REG_W-1:0] rd;
    logic             rs1_v;
    logic [REG_W-1:0] rs1;
    logic             rs2_v;
    logic [REG_W-1:0] rs2;
    logic             is_jmp;
    logic             is_exit;
    logic [PC_W-1:0]  target;
  } dec_t;

  // One issued instruction, as it leaves the odd or even warp scheduler.
  typedef struct packed {
    logic              valid;
    logic [WID_W-1:0]  warp;
    logic [PC_W-1:0]   pc;
    logic [INST_W-1:0] inst;
    logic [MAX_SP-1:0] tmask;
  } issue_t;

  // Release of one register entry by the SM (operand read done, or write-back).
  typedef struct packed {
    logic             valid;
    logic [WID_W-1:0] warp;
    logic [REG_W-1:0] r;
  } rel_t;

  // Instruction-cache response as routed to a group of sub modules.
  typedef struct packed {
    logic              valid;
    logic [WID_W-1:0]  ctxid;
    logic [PC_W-1:0]   addr;
    logic [LINE_W-1:0] data;
  } resp_t;

  function automatic dec_t decode(input logic [INST_W-1:0] i);
    dec_t d;
    d.rd     = i[27:23];
    d.rs1    = i[22:18];
    d.rs2    = i[17:13];
    d.target = {2'b00, i[27:0], 2'b00};
    d.rd_v = 1'b0; d.rs1_v = 1'b0; d.rs2_v = 1'b0;
    d.is_jmp = 1'b0; d.is_exit = 1'b0;
    unique case (i[31:28])
      OP_ALU:  begin d.rd_v = 1'b1; d.rs1_v = 1'b1; d.rs2_v = 1'b1; end
      OP_ALUI: begin d.rd_v = 1'b1; d.rs1_v = 1'b1; end
      OP_LD:   begin d.rd_v = 1'b1; d.rs1_v = 1'b1; end
      OP_ST:   begin d.rs1_v = 1'b1; d.rs2_v = 1'b1; end
      OP_JMP:  d.is_jmp = 1'b1;
      OP_EXIT: d.is_exit = 1'b1;
      default: ;
    endcase
    return d;
  endfunction

  function automatic logic [INST_W-1:0] enc_r(input opcode_e op, input logic [REG_W-1:0] rd,
                                               input logic [REG_W-1:0] rs1, input logic [REG_W-1:0] rs2);
    return {op, rd, rs1, rs2, 13'd0};
  endfunction

  function automatic logic [INST_W-1:0] enc_jmp(input logic [PC_W-1:0] target);
    return {OP_JMP, target[29:2]};
  endfunction

endpackage
