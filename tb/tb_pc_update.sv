// tb_pc_update: checks the fetch-PC selection and the prediction in both
// arrangements of the PC update.
//   correction: a not-taken jXX -> its fall-through jmp_vala; else a ret ->
//   ret_valm; the jump correction wins when both apply.
//   CORRECT_AT_END = 0: the correction replaces the fetch PC, the F register
//   input is the prediction for it, fix_load stays low.
//   CORRECT_AT_END = 1: the fetch PC is the F register, the correction (if
//   any) replaces the F register input and raises fix_load.
//   prediction: jXX and call -> valC (conditional jumps predicted taken);
//   halt -> its own PC; anything else -> valP.
// Directed cases from the jump/ret examples, then random inputs.
module tb_pc_update;
  import y86_pkg::*;
  word_t  F_pc, jmp_vala, ret_valm, f_valc, f_valp;
  icode_t jmp_icode, ret_icode, f_icode;
  logic   jmp_cnd;
  word_t  f_pc [2], F_next [2];
  logic   mispredict_fix [2], ret_fix [2], fix_load [2];
  int checks = 0, failures = 0;

  pc_update #(.CORRECT_AT_END(1'b0)) dut_start (
    .F_pc, .jmp_icode, .jmp_cnd, .jmp_vala, .ret_icode, .ret_valm, .f_icode, .f_valc, .f_valp,
    .f_pc(f_pc[0]), .F_next(F_next[0]), .mispredict_fix(mispredict_fix[0]),
    .ret_fix(ret_fix[0]), .fix_load(fix_load[0]));
  pc_update #(.CORRECT_AT_END(1'b1)) dut_end (
    .F_pc, .jmp_icode, .jmp_cnd, .jmp_vala, .ret_icode, .ret_valm, .f_icode, .f_valc, .f_valp,
    .f_pc(f_pc[1]), .F_next(F_next[1]), .mispredict_fix(mispredict_fix[1]),
    .ret_fix(ret_fix[1]), .fix_load(fix_load[1]));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic word_t predict(icode_t ic, word_t pc);
    if (ic == I_HALT) return pc;
    if (ic == I_JXX || ic == I_CALL) return f_valc;
    return f_valp;
  endfunction

  // compare both instances with the rules above
  task automatic check_all(string what);
    bit    mis = (jmp_icode == I_JXX) && !jmp_cnd;
    bit    rf  = (ret_icode == I_RET);
    word_t fix = mis ? jmp_vala : ret_valm;
    word_t pc0 = (mis || rf) ? fix : F_pc;
    chk(f_pc[0] == pc0 && F_next[0] == predict(f_icode, pc0) && !fix_load[0] &&
        mispredict_fix[0] == mis && ret_fix[0] == rf, {what, " (start of fetch)"});
    chk(f_pc[1] == F_pc && F_next[1] == ((mis || rf) ? fix : predict(f_icode, F_pc)) &&
        fix_load[1] == (mis || rf) && mispredict_fix[1] == mis && ret_fix[1] == rf,
        {what, " (end of fetch)"});
  endtask

  initial begin
    // jne not taken: correct to the fall-through address
    F_pc = 64'hFFFF; jmp_icode = I_JXX; jmp_cnd = 0; jmp_vala = 64'h12;
    ret_icode = I_NOP; ret_valm = 64'h999; f_icode = I_OPQ; f_valc = 0; f_valp = 64'h14; #1;
    chk(f_pc[0] == 64'h12 && mispredict_fix[0], "mispredicted jump corrects the fetch PC to 0x12");
    chk(F_next[1] == 64'h12 && fix_load[1], "mispredicted jump loads 0x12 into the PC register");
    check_all("mispredict");
    // taken jump: keep the prediction
    jmp_cnd = 1; #1;
    chk(f_pc[0] == 64'hFFFF && !mispredict_fix[0], "taken jump keeps the predicted PC");
    check_all("taken jump");
    // ret: use the loaded return address
    jmp_icode = I_NOP; ret_icode = I_RET; #1;
    chk(f_pc[0] == 64'h999 && ret_fix[0], "ret supplies the return address");
    chk(F_next[1] == 64'h999 && fix_load[1], "ret loads the return address into the PC register");
    check_all("ret");
    // prediction for a conditional jump: its target
    ret_icode = I_NOP; f_icode = I_JXX; f_valc = 64'hFFFF; f_valp = 64'h0B; #1;
    chk(F_next[0] == 64'hFFFF && F_next[1] == 64'hFFFF, "conditional jump predicted taken");
    check_all("jump prediction");
    repeat (3000) begin
      F_pc = {$urandom, $urandom}; jmp_vala = {$urandom, $urandom};
      ret_valm = {$urandom, $urandom}; f_valc = {$urandom, $urandom}; f_valp = {$urandom, $urandom};
      jmp_icode = icode_t'($urandom % 16); ret_icode = icode_t'($urandom % 16);
      f_icode = icode_t'($urandom % 16); jmp_cnd = 1'($urandom % 2);
      if ($urandom % 3 == 0) jmp_icode = I_JXX;
      if ($urandom % 3 == 0) ret_icode = I_RET;
      #1;
      check_all("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
