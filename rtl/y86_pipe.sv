// y86_pipe: five-stage pipelined Y86-64 processor with branch prediction.
//
// Stages fetch (F), decode (D), execute (E), memory (M) and writeback (W) are
// separated by the pipeline register banks F (predicted PC), D, E, M and W,
// each a pipe_reg with stall and bubble controls driven by hazard_ctl.
//
// Control hazards:
//   * jmp/call go to their immediate target; conditional jumps are predicted
//     taken. The jump's condition is evaluated in execute from the condition
//     codes. If it is false, the two wrongly fetched instructions (in D and E
//     next) are squashed by bubbles, and in the next cycle, with the jump in
//     memory, fetch uses the fall-through address carried in M_valA. A
//     mispredicted jump costs 3 cycles in total, a correctly predicted one 1.
//   * ret: fetch stalls and decode gets bubbles while a ret is in D, E or M;
//     when the ret reaches writeback its loaded return address (W_valM) is the
//     fetch PC. A ret costs 4 cycles in total.
//   * PC_CORRECT_AT_END = 1 selects the other arrangement of the PC update:
//     the F register holds the PC, and the two corrections are written into
//     it a cycle earlier (from the jump's condition in execute and from the
//     return address as memory reads it), even while fetch is stalled. The
//     fetch sequence and all cycle counts are the same.
// Data hazards: values are forwarded to the end of decode (fwd_unit); a load
// followed by a use of the loaded register stalls one cycle.
// Condition codes change in execute, memory in memory, registers in writeback.
//
// Interface: imem_we/imem_waddr/imem_wdata load the program (byte at a time);
// after rst the processor starts at address 0. stat is the status of the
// instruction in writeback and halted goes high when it is not AOK (halt or an
// error); the pipeline then freezes. An instruction with a bad status changes
// nothing, and no instruction after it does. dbg_sel/dbg_val read a register.
// The remaining outputs expose the condition codes, the fetch PC and per-cycle
// events (load/use stall, misprediction detected, ret bubble, a forwarded
// operand, a condition-code write, a fetch PC taken from the jump correction
// or from a ret) for observation.
//
// The stage split, prediction, squash, ret handling and both PC-update
// arrangements follow the pipeline description; the ISA encodings, memory
// sizes, status handling and the observation ports are this design's
// choices.
module y86_pipe
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024,
  parameter int unsigned DMEM_BYTES = 1024,
  parameter bit          PC_CORRECT_AT_END = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [63:0] imem_waddr,
  input  logic [7:0]  imem_wdata,
  input  reg_t        dbg_sel,
  output word_t       dbg_val,
  output stat_t       stat,
  output logic        halted,
  output word_t       fetch_pc,
  output logic        ev_load_use,
  output logic        ev_mispredict,
  output logic        ev_ret_bubble,
  output logic        ev_fwd,
  output logic        ev_cc_write,
  output logic        ev_pc_from_jump,
  output logic        ev_pc_from_ret,
  output cc_t         cc
);

  // ---------------- pipeline registers ----------------
  f_reg_t F_q, F_d;
  d_reg_t D_q, D_d;
  e_reg_t E_q, E_d;
  m_reg_t M_q, M_d;
  w_reg_t W_q, W_d;

  logic F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall, set_cc;
  logic load_use, mispredict, need_ret_bubble;

  logic F_fix_load;
  pipe_reg #(.T(f_reg_t), .DEFAULT(F_RESET)) u_F (
    .clk, .rst, .stall(F_stall && !F_fix_load), .bubble(1'b0), .d(F_d), .q(F_q));
  pipe_reg #(.T(d_reg_t), .DEFAULT(D_BUBBLE)) u_D (
    .clk, .rst, .stall(D_stall), .bubble(D_bubble), .d(D_d), .q(D_q));
  pipe_reg #(.T(e_reg_t), .DEFAULT(E_BUBBLE)) u_E (
    .clk, .rst, .stall(1'b0), .bubble(E_bubble), .d(E_d), .q(E_q));
  pipe_reg #(.T(m_reg_t), .DEFAULT(M_BUBBLE)) u_M (
    .clk, .rst, .stall(1'b0), .bubble(M_bubble), .d(M_d), .q(M_q));
  pipe_reg #(.T(w_reg_t), .DEFAULT(W_BUBBLE)) u_W (
    .clk, .rst, .stall(W_stall), .bubble(1'b0), .d(W_d), .q(W_q));

  // ---------------- fetch ----------------
  word_t       f_pc, f_pred_pc, f_valc, f_valp;
  logic [79:0] f_instr;
  logic        imem_error, mispredict_fix, ret_fix;
  stat_t       f_stat;
  icode_t      f_icode;
  logic [3:0]  f_ifun;
  reg_t        f_ra, f_rb;
  word_t       m_valm;
  logic        e_cnd;

  // corrections: from the M and W registers, or a cycle earlier from E and M
  pc_update #(.CORRECT_AT_END(PC_CORRECT_AT_END)) u_pc (
    .F_pc(F_q.pred_pc),
    .jmp_icode(PC_CORRECT_AT_END ? E_q.icode : M_q.icode),
    .jmp_cnd  (PC_CORRECT_AT_END ? e_cnd     : M_q.cnd),
    .jmp_vala (PC_CORRECT_AT_END ? E_q.vala  : M_q.vala),
    .ret_icode(PC_CORRECT_AT_END ? M_q.icode : W_q.icode),
    .ret_valm (PC_CORRECT_AT_END ? m_valm    : W_q.valm),
    .f_icode, .f_valc, .f_valp,
    .f_pc, .F_next(f_pred_pc), .mispredict_fix, .ret_fix, .fix_load(F_fix_load));

  imem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .pc(f_pc), .instr(f_instr), .imem_error);

  fetch_split u_split (
    .pc(f_pc), .instr(f_instr), .imem_error, .stat(f_stat), .icode(f_icode),
    .ifun(f_ifun), .ra(f_ra), .rb(f_rb), .valc(f_valc), .valp(f_valp));

  assign F_d.pred_pc = f_pred_pc;
  assign D_d = '{stat: f_stat, icode: f_icode, ifun: f_ifun, ra: f_ra, rb: f_rb,
                 valc: f_valc, valp: f_valp};
  assign fetch_pc = f_pc;

  // ---------------- decode ----------------
  reg_t  d_srca, d_srcb, d_dste, d_dstm;
  word_t d_rvala, d_rvalb, d_vala, d_valb;
  reg_t  e_dste;
  word_t e_vale;
  logic [2:0] vala_src, valb_src;

  always_comb begin
    case (D_q.icode)
      I_RRMOVQ, I_RMMOVQ, I_OPQ, I_PUSHQ: d_srca = D_q.ra;
      I_POPQ, I_RET:                      d_srca = REG_RSP;
      default:                            d_srca = REG_NONE;
    endcase
    case (D_q.icode)
      I_OPQ, I_RMMOVQ, I_MRMOVQ:          d_srcb = D_q.rb;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:     d_srcb = REG_RSP;
      default:                            d_srcb = REG_NONE;
    endcase
    case (D_q.icode)
      I_RRMOVQ, I_IRMOVQ, I_OPQ:          d_dste = D_q.rb;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:     d_dste = REG_RSP;
      default:                            d_dste = REG_NONE;
    endcase
    case (D_q.icode)
      I_MRMOVQ, I_POPQ:                   d_dstm = D_q.ra;
      default:                            d_dstm = REG_NONE;
    endcase
  end

  // an instruction with a bad status (here: a failed load) writes nothing
  logic w_ok;
  assign w_ok = (W_q.stat == S_AOK);

  regfile u_rf (
    .clk, .rst, .srca(d_srca), .srcb(d_srcb), .vala(d_rvala), .valb(d_rvalb),
    .dste(w_ok ? W_q.dste : REG_NONE), .vale(W_q.vale),
    .dstm(w_ok ? W_q.dstm : REG_NONE), .valm(W_q.valm),
    .dbg_sel, .dbg_val);

  fwd_unit u_fwd (
    .D_icode(D_q.icode), .D_valp(D_q.valp), .d_srca, .d_srcb, .d_rvala, .d_rvalb,
    .e_dste, .e_vale, .M_dstm(M_q.dstm), .m_valm, .M_dste(M_q.dste), .M_vale(M_q.vale),
    .W_dstm(W_q.dstm), .W_valm(W_q.valm), .W_dste(W_q.dste), .W_vale(W_q.vale),
    .d_vala, .d_valb, .vala_src, .valb_src);

  assign E_d = '{stat: D_q.stat, icode: D_q.icode, ifun: D_q.ifun, valc: D_q.valc,
                 vala: d_vala, valb: d_valb, dste: d_dste, dstm: d_dstm};

  // ---------------- execute ----------------
  word_t      alua, alub;
  logic [3:0] alufun;
  cc_t        new_cc;

  always_comb begin
    case (E_q.icode)
      I_RRMOVQ, I_OPQ:               alua = E_q.vala;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ:  alua = E_q.valc;
      I_CALL, I_PUSHQ:               alua = -64'sd8;
      I_RET, I_POPQ:                 alua = 64'd8;
      default:                       alua = '0;
    endcase
    case (E_q.icode)
      I_RMMOVQ, I_MRMOVQ, I_OPQ, I_CALL, I_PUSHQ, I_RET, I_POPQ: alub = E_q.valb;
      default:                       alub = '0;
    endcase
    alufun = (E_q.icode == I_OPQ) ? E_q.ifun : ALU_ADD;
  end

  alu u_alu (.fun(alufun), .a(alua), .b(alub), .vale(e_vale), .flags(new_cc));

  cond_codes u_cc (
    .clk, .rst, .set_cc, .new_cc, .ifun(E_q.ifun), .cc, .cnd(e_cnd));

  assign e_dste = (E_q.icode == I_RRMOVQ && !e_cnd) ? REG_NONE : E_q.dste;

  assign M_d = '{stat: E_q.stat, icode: E_q.icode, cnd: e_cnd, vale: e_vale,
                 vala: E_q.vala, dste: e_dste, dstm: E_q.dstm};

  // ---------------- memory ----------------
  word_t mem_addr;
  logic  mem_read, mem_write, dmem_error;
  stat_t m_stat;

  always_comb begin
    case (M_q.icode)
      I_RMMOVQ, I_PUSHQ, I_CALL, I_MRMOVQ: mem_addr = M_q.vale;
      I_POPQ, I_RET:                       mem_addr = M_q.vala;
      default:                             mem_addr = '0;
    endcase
    mem_read  = M_q.icode inside {I_MRMOVQ, I_POPQ, I_RET};
    mem_write = M_q.icode inside {I_RMMOVQ, I_PUSHQ, I_CALL};
  end

  dmem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .read(mem_read), .write(mem_write), .addr(mem_addr), .wdata(M_q.vala),
    .rdata(m_valm), .dmem_error);

  assign m_stat = dmem_error ? S_ADR : M_q.stat;

  assign W_d = '{stat: m_stat, icode: M_q.icode, vale: M_q.vale, valm: m_valm,
                 dste: M_q.dste, dstm: M_q.dstm};

  // ---------------- control ----------------
  hazard_ctl u_hz (
    .D_icode(D_q.icode), .E_icode(E_q.icode), .M_icode(M_q.icode), .E_dstm(E_q.dstm),
    .d_srca, .d_srcb, .e_cnd, .m_stat, .W_stat(W_q.stat),
    .F_stall, .D_stall, .D_bubble, .E_bubble, .M_bubble, .W_stall, .set_cc,
    .load_use, .mispredict, .need_ret_bubble);

  // ---------------- status and events ----------------
  assign stat          = W_q.stat;
  assign halted        = (W_q.stat != S_AOK);
  assign ev_load_use   = load_use;
  assign ev_mispredict = mispredict;
  assign ev_ret_bubble = need_ret_bubble && !load_use;
  assign ev_fwd        = (vala_src inside {3'd1, 3'd2, 3'd3, 3'd4, 3'd5}) ||
                         (valb_src != 3'd0);
  assign ev_cc_write   = set_cc;
  assign ev_pc_from_jump = mispredict_fix;
  assign ev_pc_from_ret  = ret_fix;

endmodule
