// tb_hazard_ctl: checks the stall/bubble controls.
// Directed cases: the load/use example (mrmovq into %rbx in execute, subq
// reading %rbx in decode: stall F and D, bubble E), a mispredicted jne in
// execute (bubble D and E), a ret in decode, execute or memory (stall F,
// bubble D), and a halt in writeback (bubble M, stall W, no CC write). Then
// random inputs against a rule table: stall_X and bubble_X never together.
module tb_hazard_ctl;
  import y86_pkg::*;
  icode_t D_icode, E_icode, M_icode;
  reg_t E_dstm, d_srca, d_srcb;
  logic e_cnd;
  stat_t m_stat, W_stat;
  logic F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall, set_cc;
  logic load_use, mispredict, need_ret_bubble;
  int checks = 0, failures = 0;

  hazard_ctl dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect6(logic fs, logic ds, logic db, logic eb, logic mb, logic ws, string what);
    checks++;
    if ({F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall} !== {fs, ds, db, eb, mb, ws}) begin
      failures++;
      $display("FAIL %s: F_s D_s D_b E_b M_b W_s = %b expected %b", what,
               {F_stall, D_stall, D_bubble, E_bubble, M_bubble, W_stall}, {fs, ds, db, eb, mb, ws});
    end
  endtask

  task automatic idle();
    D_icode = I_NOP; E_icode = I_NOP; M_icode = I_NOP; E_dstm = REG_NONE;
    d_srca = REG_NONE; d_srcb = REG_NONE; e_cnd = 1; m_stat = S_AOK; W_stat = S_AOK;
  endtask

  initial begin
    idle(); #1;
    expect6(0, 0, 0, 0, 0, 0, "no hazard");
    // load/use
    E_icode = I_MRMOVQ; E_dstm = 4'd3; D_icode = I_OPQ; d_srca = 4'd3; d_srcb = 4'd1; #1;
    expect6(1, 1, 0, 1, 0, 0, "load/use");
    // mispredicted conditional jump
    idle(); E_icode = I_JXX; e_cnd = 0; #1;
    expect6(0, 0, 1, 1, 0, 0, "misprediction");
    e_cnd = 1; #1;
    expect6(0, 0, 0, 0, 0, 0, "correct prediction");
    // ret in each stage
    idle(); D_icode = I_RET; #1; expect6(1, 0, 1, 0, 0, 0, "ret in decode");
    idle(); E_icode = I_RET; #1; expect6(1, 0, 1, 0, 0, 0, "ret in execute");
    idle(); M_icode = I_RET; #1; expect6(1, 0, 1, 0, 0, 0, "ret in memory");
    // ret waiting in decode behind a load of %rsp
    idle(); D_icode = I_RET; d_srca = REG_RSP; d_srcb = REG_RSP; E_icode = I_POPQ; E_dstm = REG_RSP; #1;
    expect6(1, 1, 0, 1, 0, 0, "ret behind load/use");
    // halt reaches writeback
    idle(); W_stat = S_HLT; E_icode = I_OPQ; #1;
    expect6(0, 0, 0, 0, 1, 1, "halt in writeback");
    checks++; if (set_cc) failures++;
    idle(); E_icode = I_OPQ; #1;
    checks++; if (!set_cc) failures++;
    repeat (5000) begin
      logic lu, mis, rb;
      D_icode = icode_t'($urandom % 12); E_icode = icode_t'($urandom % 12);
      M_icode = icode_t'($urandom % 12); E_dstm = reg_t'($urandom % 16);
      d_srca = reg_t'($urandom % 16); d_srcb = reg_t'($urandom % 16); e_cnd = $urandom % 2;
      m_stat = ($urandom % 8 == 0) ? stat_t'($urandom % 4) : S_AOK;
      W_stat = ($urandom % 8 == 0) ? stat_t'($urandom % 4) : S_AOK;
      #1;
      lu  = (E_icode == I_MRMOVQ || E_icode == I_POPQ) && E_dstm != REG_NONE &&
            (E_dstm == d_srca || E_dstm == d_srcb);
      mis = E_icode == I_JXX && !e_cnd;
      rb  = D_icode == I_RET || E_icode == I_RET || M_icode == I_RET;
      expect6(lu || rb, lu, mis || (rb && !lu), mis || lu, m_stat != S_AOK || W_stat != S_AOK,
              W_stat != S_AOK, "random");
      checks++;
      if ((D_stall && D_bubble) ||
          set_cc != (E_icode == I_OPQ && m_stat == S_AOK && W_stat == S_AOK)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
