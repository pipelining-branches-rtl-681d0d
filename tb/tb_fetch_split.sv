// tb_fetch_split: assembles every instruction kind with random operands and
// checks the split fields, the length (valP - pc: 1, 2, 9 or 10 bytes) and the
// status; also invalid icodes (INS) and a failed fetch (ADR, turned into nop).
module tb_fetch_split;
  import y86_pkg::*;
  import y86_asm_pkg::*;
  word_t pc, valc, valp;
  logic [79:0] instr;
  logic imem_error;
  stat_t stat;
  icode_t icode;
  logic [3:0] ifun;
  reg_t ra, rb;
  int checks = 0, failures = 0;

  fetch_split dut (.*);

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

  initial begin
    repeat (400) begin
      automatic int k = $urandom % 12;
      automatic int a = $urandom % 15, b = $urandom % 15, fn = $urandom % 7;
      automatic longint unsigned imm = {$urandom, $urandom};
      int len, e_ra, e_rb, e_icode;
      longint unsigned e_valc;
      clear();
      e_ra = 15; e_rb = 15; e_valc = 0; fn = (k inside {2, 6, 7}) ? fn : 0;
      case (k)
        0: begin void'(halt()); len = 1; end
        1: begin void'(nop()); len = 1; end
        2: begin void'(cmov(fn, a, b)); len = 2; e_ra = a; e_rb = b; end
        3: begin void'(irmovq(imm, b)); len = 10; e_rb = b; e_valc = imm; end
        4: begin void'(rmmovq(a, imm, b)); len = 10; e_ra = a; e_rb = b; e_valc = imm; end
        5: begin void'(mrmovq(imm, b, a)); len = 10; e_ra = a; e_rb = b; e_valc = imm; end
        6: begin fn = fn % 4; void'(opq(fn, a, b)); len = 2; e_ra = a; e_rb = b; end
        7: begin void'(jxx(fn, imm)); len = 9; e_valc = imm; end
        8: begin void'(call(imm)); len = 9; e_valc = imm; end
        9: begin void'(ret()); len = 1; end
        10: begin void'(pushq(a)); len = 2; e_ra = a; end
        default: begin void'(popq(a)); len = 2; e_ra = a; end
      endcase
      e_icode = (k == 0) ? 0 : (k == 1) ? 1 : (k == 2) ? 2 : (k == 3) ? 3 : (k == 4) ? 4 :
                (k == 5) ? 5 : (k == 6) ? 6 : (k == 7) ? 7 : (k == 8) ? 8 : (k == 9) ? 9 :
                (k == 10) ? 10 : 11;
      instr = {$urandom, $urandom, $urandom};
      foreach (code[i]) instr[i*8 +: 8] = code[i];
      pc = {$urandom, $urandom} >> 1;
      imem_error = 0;
      #1;
      chk(icode == icode_t'(e_icode) && ifun == 4'(fn), $sformatf("kind %0d icode/ifun %h/%h", k, icode, ifun));
      chk(ra == reg_t'(e_ra) && rb == reg_t'(e_rb), $sformatf("kind %0d regs %h %h", k, ra, rb));
      chk(valc == e_valc, $sformatf("kind %0d valc %h expected %h", k, valc, e_valc));
      chk(valp == pc + 64'(len), $sformatf("kind %0d length %0d expected %0d", k, valp - pc, len));
      chk(stat == ((k == 0) ? S_HLT : S_AOK), $sformatf("kind %0d stat %0d", k, stat));
    end
    for (int ic = 12; ic < 16; ic++) begin
      instr = {$urandom, $urandom, $urandom};
      instr[7:4] = 4'(ic);
      #1;
      chk(stat == S_INS, $sformatf("icode %h must be invalid", ic));
    end
    imem_error = 1; #1;
    chk(stat == S_ADR && icode == I_NOP, "failed fetch gives ADR and a nop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
