// tb_instr_mix: runs the hypothetical instruction mix used to compare branch
// prediction with stalling -- per 100 instructions 3 not-taken conditional
// jumps, 5 taken ones, 1 ret and 91 others without load/use hazards -- on
// the five-stage pipeline at its default sizes, and measures the cycles per
// instruction. With taken-prediction the expected cost is
//   3*0.03 + 1*0.05 + 4*0.01 + 1*0.91 = 1.09 cycles/instruction
// (stalling on every conditional jump would give 1.19). The loop body holds
// exactly that mix; the loop runs ITER times. Checks: registers and total
// cycle count against the reference model, and the measured CPI.
module tb_instr_mix;
  import y86_pkg::*;
  import y86_asm_pkg::*;
  import y86_iss_pkg::*;

  localparam int IMEM = 1024, DMEM = 1024, ITER = 20;

  logic        clk = 0, rst = 1;
  logic        imem_we = 0;
  logic [63:0] imem_waddr = 0;
  logic [7:0]  imem_wdata = 0;
  reg_t        dbg_sel = 0;
  word_t       dbg_val, fetch_pc;
  stat_t       stat;
  cc_t         cc;
  logic        halted, ev_load_use, ev_mispredict, ev_ret_bubble, ev_fwd, ev_cc_write;
  logic        ev_pc_from_jump, ev_pc_from_ret;
  int checks = 0, failures = 0;

  y86_pipe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    y86_iss_pkg::result_t exp;
    int unsigned top, c, j, fin;
    int unsigned nt[3];
    int n = 0, cyc = 0, n_mis = 0, n_rfix = 0;
    real cpi;
    clear();
    void'(irmovq(ITER, 13));
    void'(irmovq(1, 12));
    void'(irmovq(64'h3F8, 4));
    void'(irmovq(5, 2));
    top = here();
    for (int i = 0; i < 3; i++) begin          // 3 not-taken jumps
      void'(xorq(1, 1));
      nt[i] = jxx(4, 0);
      n += 2;
    end
    for (int i = 0; i < 4; i++) begin          // 4 taken jumps (+1 loop branch)
      void'(xorq(1, 1));
      j = jxx(3, 0);
      patch_dest(j, here());
      n += 2;
    end
    c = call(0);                               // call (an "other"), its ret below
    n += 1;
    while (n < 100 - 3) begin
      void'(addq(2, 3));
      n++;
    end
    void'(subq(12, 13));
    void'(jxx(4, top));
    n += 2;
    fin = here();
    void'(halt());
    patch_dest(c, here());
    void'(ret());
    n += 1;
    foreach (nt[i]) patch_dest(nt[i], fin);
    check(n == 100, "loop body holds 100 instructions");

    exp = run(code, IMEM, DMEM, 100000);
    check(exp.n_mispredict == 3 * ITER + 1 && exp.n_ret == ITER && exp.n_taken == 5 * ITER - 1,
          "mix: 3 not-taken, 5 taken, 1 ret per iteration");
    rst = 1;
    for (int a = 0; a < IMEM; a++) begin
      imem_we = 1; imem_waddr = 64'(a);
      imem_wdata = (a < code.size()) ? code[a] : 8'h00;
      @(posedge clk); #1;
    end
    imem_we = 0;
    @(posedge clk); #1;
    rst = 0;
    while (!halted && cyc < 100000) begin
      n_mis += int'(ev_mispredict);
      n_rfix += int'(ev_pc_from_ret);
      @(posedge clk); #1;
      cyc++;
    end
    check(halted && stat == S_HLT, "halted");
    check(cyc == expected_cycles(exp), $sformatf("%0d cycles, expected %0d", cyc, expected_cycles(exp)));
    check(n_mis == exp.n_mispredict && n_rfix == exp.n_ret, "misprediction and ret counts");
    dbg_sel = 4'd3; #1;
    check(dbg_val == exp.regs[3], "result register");
    // cycles per instruction over the whole run, less the 3-cycle pipeline
    // fill; the 5 setup/halt instructions and the final loop exit (a
    // mispredicted jump) shift it by under 0.001
    cpi = real'(cyc - 3) / real'(exp.n_instr);
    $display("measured %0.4f cycles/instruction over %0d instructions (prediction 1.09, stalling 1.19)",
             cpi, exp.n_instr);
    check(cpi > 1.085 && cpi < 1.095, "loop runs at 1.09 cycles/instruction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
