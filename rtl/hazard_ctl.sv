// hazard_ctl: pipeline control logic (stall_X / bubble_X for every pipeline
// register bank, and the condition-code write enable).
//
//   load/use hazard: a load (mrmovq, popq) in execute whose dstM is a source
//     of the instruction in decode. Stall F and D (decode repeats) and bubble
//     E (a nop goes on). Costs one cycle.
//   misprediction: a jXX in execute whose condition is false was predicted
//     taken, so the two instructions fetched after it are wrong guesses.
//     Bubble D and E ("squash"); the PC is corrected next cycle. Costs two
//     cycles.
//   ret: while a ret is in decode, execute or memory the return address is not
//     known. Stall F and bubble D, so decode receives nops until the ret's
//     load has been done. Costs three cycles.
//   halt / exception: an instruction with bad status in memory or writeback stops later state
//     changes: bubble M, stall W, and no condition-code write.
// A load/use hazard in decode takes priority over a ret bubble there (the ret
// must wait in decode). Combinational.
//
// The squash and ret-bubble rules follow the pipeline description; the
// load/use rule follows its stall example; the handling of halt and exceptions
// is this design's choice (a halt repeats its PC through pc_update).
module hazard_ctl
  import y86_pkg::*;
(
  input  icode_t D_icode,
  input  icode_t E_icode,
  input  icode_t M_icode,
  input  reg_t   E_dstm,
  input  reg_t   d_srca,
  input  reg_t   d_srcb,
  input  logic   e_cnd,
  input  stat_t  m_stat,
  input  stat_t  W_stat,
  output logic   F_stall,
  output logic   D_stall,
  output logic   D_bubble,
  output logic   E_bubble,
  output logic   M_bubble,
  output logic   W_stall,
  output logic   set_cc,
  output logic   load_use,
  output logic   mispredict,
  output logic   need_ret_bubble
);

  logic m_exc, w_exc;

  always_comb begin
    load_use = (E_icode inside {I_MRMOVQ, I_POPQ}) && (E_dstm != REG_NONE) &&
               (E_dstm == d_srca || E_dstm == d_srcb);
    mispredict      = (E_icode == I_JXX) && !e_cnd;
    need_ret_bubble = (D_icode == I_RET) || (E_icode == I_RET) || (M_icode == I_RET);
    m_exc = (m_stat != S_AOK);
    w_exc = (W_stat != S_AOK);

    F_stall  = load_use || need_ret_bubble;
    D_stall  = load_use;
    D_bubble = mispredict || (!load_use && need_ret_bubble);
    E_bubble = mispredict || load_use;
    M_bubble = m_exc || w_exc;
    W_stall  = w_exc;
    set_cc   = (E_icode == I_OPQ) && !m_exc && !w_exc;
  end

endmodule
