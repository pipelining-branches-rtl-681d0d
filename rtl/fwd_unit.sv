// fwd_unit: decode-stage operand selection and forwarding.
//
// For each source register read in decode, compare its index with every
// destination that an older, not yet written-back instruction will write, and
// take the value from the youngest one (the most recent version):
//   execute  e_dstE / e_valE   (ALU result being computed)
//   memory   M_dstM / m_valM   (value being loaded)
//   memory   M_dstE / M_valE
//   writeback W_dstM / W_valM
//   writeback W_dstE / W_valE
// otherwise the register-file value. Operand A of call and jXX is instead the
// incremented PC (D_valP), which the pipeline carries in valA. Forwarding is
// done to the end of the decode stage. The *_src outputs say which source was
// used (for statistics). Purely combinational.
//
// Forwarding to decode with most-recent-wins priority follows the pipeline
// description; the exact source list is the standard one for this pipeline.
module fwd_unit
  import y86_pkg::*;
(
  input  icode_t D_icode,
  input  word_t  D_valp,
  input  reg_t   d_srca,
  input  reg_t   d_srcb,
  input  word_t  d_rvala,
  input  word_t  d_rvalb,
  input  reg_t   e_dste,
  input  word_t  e_vale,
  input  reg_t   M_dstm,
  input  word_t  m_valm,
  input  reg_t   M_dste,
  input  word_t  M_vale,
  input  reg_t   W_dstm,
  input  word_t  W_valm,
  input  reg_t   W_dste,
  input  word_t  W_vale,
  output word_t  d_vala,
  output word_t  d_valb,
  output logic [2:0] vala_src,  // 0 regfile, 1 e_valE, 2 m_valM, 3 M_valE, 4 W_valM, 5 W_valE, 6 valP
  output logic [2:0] valb_src
);

  function automatic logic [2:0] pick(reg_t src);
    if (src == REG_NONE)    return 3'd0;
    if (src == e_dste)      return 3'd1;
    if (src == M_dstm)      return 3'd2;
    if (src == M_dste)      return 3'd3;
    if (src == W_dstm)      return 3'd4;
    if (src == W_dste)      return 3'd5;
    return 3'd0;
  endfunction

  function automatic word_t value(logic [2:0] s, word_t rf);
    case (s)
      3'd1:    return e_vale;
      3'd2:    return m_valm;
      3'd3:    return M_vale;
      3'd4:    return W_valm;
      3'd5:    return W_vale;
      3'd6:    return D_valp;
      default: return rf;
    endcase
  endfunction

  always_comb begin
    vala_src = (D_icode inside {I_CALL, I_JXX}) ? 3'd6 : pick(d_srca);
    valb_src = pick(d_srcb);
    d_vala   = value(vala_src, d_rvala);
    d_valb   = value(valb_src, d_rvalb);
  end

endmodule
