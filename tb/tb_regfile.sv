// tb_regfile: random writes on both ports (including same-register writes,
// where the M port must win, and writes to register 0xF, which must be
// ignored) checked through the two read ports and the debug port against a
// model array.
module tb_regfile;
  import y86_pkg::*;
  logic clk = 0, rst = 1;
  reg_t srca, srcb, dste, dstm, dbg_sel;
  word_t vala, valb, vale, valm, dbg_val;
  word_t model [16];
  int checks = 0, failures = 0;

  regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  initial begin
    dste = REG_NONE; dstm = REG_NONE; vale = 0; valm = 0; srca = 0; srcb = 0; dbg_sel = 0;
    @(posedge clk); #1 rst = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2000) begin
      dste = reg_t'($urandom % 16); vale = {$urandom, $urandom};
      dstm = ($urandom % 4 == 0) ? dste : reg_t'($urandom % 16); valm = {$urandom, $urandom};
      @(posedge clk); #1;
      if (dste != REG_NONE) model[dste] = vale;
      if (dstm != REG_NONE) model[dstm] = valm;
      model[15] = 0;
      dste = REG_NONE; dstm = REG_NONE;
      srca = reg_t'($urandom % 16); srcb = reg_t'($urandom % 16); dbg_sel = reg_t'($urandom % 16);
      #1;
      chk(vala, model[srca], "port A");
      chk(valb, model[srcb], "port B");
      chk(dbg_val, model[dbg_sel], "debug port");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
