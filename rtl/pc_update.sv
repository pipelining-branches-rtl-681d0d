// pc_update: next-PC prediction and fetch-PC selection.
//
// Two muxes around the F register (which lives outside this module so that
// it can be stalled). Two arrangements give the same cycle-by-cycle fetch
// sequence and are selected by CORRECT_AT_END:
//
// CORRECT_AT_END = 0 (default): the F register holds the *predicted* PC and
// corrections are applied at the start of fetch, from the pipeline-register
// outputs of the instruction that needs them:
//   * f_pc = jmp_vala (fall-through address) when the conditional jump now in
//     memory was predicted taken but not taken; else ret_valm (the loaded
//     return address) when a ret is in writeback; else the F register.
//   * F_next = prediction for the instruction at f_pc.
// CORRECT_AT_END = 1: the F register holds the PC itself and corrections are
// made one cycle earlier, at the input of the register, from values computed
// in the current cycle (the jump's condition in execute, the return address
// as memory reads it):
//   * f_pc = the F register.
//   * F_next = jmp_vala when the jump in execute is not taken, else ret_valm
//     when a ret is in memory, else the prediction. fix_load then tells the
//     pipeline to load the F register even if fetch is stalled.
// The caller connects jmp_* and ret_* to the stage that matches the mode.
// With CORRECT_AT_END = 0, fix_load is constant 0.
//
// Prediction: the immediate valC for jmp/jXX/call (conditional jumps are
// predicted taken), else valP = pc + instruction length. A halt predicts its
// own PC, so fetch keeps repeating it until the halt reaches writeback.
// Repeating a PC for a load/use or ret stall is done by stalling the F
// register. Purely combinational.
//
// Both arrangements follow the PC-update description of the pipeline (predict
// from length and immediate, override by stalling, correct from the jump's and
// the ret's values); the first is the main one. Presenting them as one
// parameterised module is this design's choice.
module pc_update
  import y86_pkg::*;
#(
  parameter bit CORRECT_AT_END = 1'b0
) (
  input  word_t  F_pc,
  input  icode_t jmp_icode,
  input  logic   jmp_cnd,
  input  word_t  jmp_vala,
  input  icode_t ret_icode,
  input  word_t  ret_valm,
  input  icode_t f_icode,
  input  word_t  f_valc,
  input  word_t  f_valp,
  output word_t  f_pc,
  output word_t  F_next,
  output logic   mispredict_fix,
  output logic   ret_fix,
  output logic   fix_load
);

  word_t fix_pc, pred;
  logic  fix;

  always_comb begin
    mispredict_fix = (jmp_icode == I_JXX) && !jmp_cnd;
    ret_fix        = (ret_icode == I_RET);
    fix            = mispredict_fix || ret_fix;
    fix_pc         = mispredict_fix ? jmp_vala : ret_valm;

    f_pc = (!CORRECT_AT_END && fix) ? fix_pc : F_pc;

    if (f_icode == I_HALT)                   pred = f_pc;
    else if (f_icode inside {I_JXX, I_CALL}) pred = f_valc;
    else                                     pred = f_valp;

    F_next   = (CORRECT_AT_END && fix) ? fix_pc : pred;
    fix_load = CORRECT_AT_END && fix;
  end

endmodule
