// tb_fwd_unit: checks operand forwarding to decode. Each random case gives the
// pending destinations values and frequently makes several of them name the
// source register; the unit must return the youngest (execute, then memory
// load, memory ALU result, writeback load, writeback ALU result), else the
// register-file value, and valP for call/jXX operand A. Includes the
// "addq %r8,%r9 ; addq %r9,%r8" case, where 1700 must be forwarded.
module tb_fwd_unit;
  import y86_pkg::*;
  icode_t D_icode;
  word_t D_valp, d_rvala, d_rvalb, e_vale, m_valm, M_vale, W_valm, W_vale, d_vala, d_valb;
  reg_t d_srca, d_srcb, e_dste, M_dstm, M_dste, W_dstm, W_dste;
  logic [2:0] vala_src, valb_src;
  int checks = 0, failures = 0;

  fwd_unit dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(reg_t s, word_t rf);
    if (s == REG_NONE) return rf;
    // youngest first
    if (s == e_dste) return e_vale;
    if (s == M_dstm) return m_valm;
    if (s == M_dste) return M_vale;
    if (s == W_dstm) return W_valm;
    if (s == W_dste) return W_vale;
    return rf;
  endfunction

  function automatic reg_t rreg();
    return reg_t'(($urandom % 4 == 0) ? 15 : $urandom % 4);   // small set: many matches
  endfunction

  initial begin
    word_t ea, eb;
    // worked example: %r9 is being written by the add in execute
    D_icode = I_OPQ; D_valp = 0; d_srca = 4'd9; d_srcb = 4'd8; d_rvala = 900; d_rvalb = 800;
    e_dste = 4'd9; e_vale = 1700; M_dstm = REG_NONE; M_dste = REG_NONE; W_dstm = REG_NONE;
    W_dste = REG_NONE; m_valm = 0; M_vale = 0; W_valm = 0; W_vale = 0; #1;
    checks++; if (d_vala != 1700 || d_valb != 800) begin failures++; $display("FAIL example"); end
    repeat (5000) begin
      D_icode = icode_t'($urandom % 12); D_valp = {$urandom, $urandom};
      d_srca = rreg(); d_srcb = rreg(); e_dste = rreg(); M_dstm = rreg(); M_dste = rreg();
      W_dstm = rreg(); W_dste = rreg();
      d_rvala = {$urandom, $urandom}; d_rvalb = {$urandom, $urandom};
      e_vale = {$urandom, $urandom}; m_valm = {$urandom, $urandom}; M_vale = {$urandom, $urandom};
      W_valm = {$urandom, $urandom}; W_vale = {$urandom, $urandom};
      #1;
      ea = (D_icode == I_CALL || D_icode == I_JXX) ? D_valp : model(d_srca, d_rvala);
      eb = model(d_srcb, d_rvalb);
      checks++;
      if (d_vala !== ea || d_valb !== eb) begin
        failures++;
        $display("FAIL srca=%h srcb=%h e%h Mm%h Me%h Wm%h We%h", d_srca, d_srcb, e_dste, M_dstm,
                 M_dste, W_dstm, W_dste);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
