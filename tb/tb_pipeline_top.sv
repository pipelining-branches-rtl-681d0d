// tb_pipeline_top: end-to-end test of pipeline_top at its default sizes.
//
// Y86-64 side: the directed hazard programs and a set of random programs are
// loaded, run to halt and compared with the reference model (registers,
// status, exact cycle count). Every mechanism of the pipeline is counted and
// must occur at least once: load/use stall, misprediction squash, PC
// correction from a jump, ret bubble, PC from a ret, operand forwarding,
// condition-code write, correctly predicted taken jump (no cycle lost, which
// the exact cycle count confirms), halt, and a stop on an invalid instruction
// or bad address.
// addq side, in parallel with the first Y86 program: the worked example
// "addq %r8,%r9 ; addq %r9,%r8" must show its data hazard (r8 ends 1700).
module tb_pipeline_top;
  import y86_pkg::*;
  import y86_asm_pkg::*;
  import y86_iss_pkg::*;
  import y86_prog_pkg::*;

  localparam int IMEM = 1024;   // the top's default sizes
  localparam int DMEM = 1024;

  logic        clk = 0, rst = 1;
  logic        y86_imem_we = 0;
  logic [63:0] y86_imem_waddr = 0;
  logic [7:0]  y86_imem_wdata = 0;
  reg_t        y86_dbg_sel = 0;
  word_t       y86_dbg_val, y86_fetch_pc;
  stat_t       y86_stat;
  cc_t         y86_cc;
  logic        y86_halted, y86_ev_load_use, y86_ev_mispredict, y86_ev_ret_bubble, y86_ev_fwd;
  logic        y86_ev_cc_write, y86_ev_pc_from_jump, y86_ev_pc_from_ret;
  logic        addq_imem_we = 0, addq_rf_init_we = 0;
  logic [63:0] addq_imem_waddr = 0;
  logic [7:0]  addq_imem_wdata = 0;
  reg_t        addq_rf_init_sel = 0, addq_dbg_sel = 0;
  word_t       addq_rf_init_val = 0, addq_dbg_val, addq_pc;

  int checks = 0, failures = 0;
  int n_lu = 0, n_mis = 0, n_jfix = 0, n_retb = 0, n_rfix = 0, n_fwd = 0, n_cc = 0;
  int n_halt = 0, n_exc = 0, n_taken = 0, n_addq_hazard = 0;

  pipeline_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  task automatic run_y86(string name);
    y86_iss_pkg::result_t exp;
    int cyc = 0;
    exp = run(code, IMEM, DMEM, 100000);
    rst = 1;
    for (int a = 0; a < IMEM; a++) begin
      y86_imem_we = 1; y86_imem_waddr = 64'(a);
      y86_imem_wdata = (a < code.size()) ? code[a] : 8'h00;
      // the addq program and registers are loaded in the same reset window
      addq_imem_we = 1; addq_imem_waddr = 64'(a);
      addq_imem_wdata = (a == 0) ? 8'h60 : (a == 1) ? 8'h89 : (a == 2) ? 8'h60 :
                        (a == 3) ? 8'h98 : (a % 2 == 0) ? 8'h60 : 8'h00;
      addq_rf_init_we = (a < 15); addq_rf_init_sel = reg_t'(a % 16); addq_rf_init_val = 64'(a * 100);
      @(posedge clk); #1;
    end
    y86_imem_we = 0; addq_imem_we = 0; addq_rf_init_we = 0;
    @(posedge clk); #1;
    rst = 0;
    while (!y86_halted && cyc < 20000) begin
      n_lu   += int'(y86_ev_load_use);
      n_mis  += int'(y86_ev_mispredict);
      n_jfix += int'(y86_ev_pc_from_jump);
      n_retb += int'(y86_ev_ret_bubble);
      n_rfix += int'(y86_ev_pc_from_ret);
      n_fwd  += int'(y86_ev_fwd);
      n_cc   += int'(y86_ev_cc_write);
      @(posedge clk); #1;
      cyc++;
    end
    n_halt  += int'(y86_halted && y86_stat == S_HLT);
    n_exc   += int'(y86_halted && (y86_stat == S_ADR || y86_stat == S_INS));
    n_taken += exp.n_taken;
    check(y86_halted && y86_stat == stat_t'(exp.stat), {name, ": halted with the expected status"});
    // the pipeline is frozen once halted: let two more edges pass, so that a
    // late register write would show
    repeat (2) @(posedge clk);
    #1;
    for (int r = 0; r < 15; r++) begin
      y86_dbg_sel = reg_t'(r); #1;
      check(y86_dbg_val == exp.regs[r], $sformatf("%s: r%0d = %0h expected %0h", name, r,
                                                  y86_dbg_val, exp.regs[r]));
    end
    check(cyc == expected_cycles(exp), $sformatf("%s: %0d cycles, expected %0d", name, cyc,
                                                 expected_cycles(exp)));
    // addq pipeline: by now the two adds have long been written back
    addq_dbg_sel = 4'd9; #1;
    check(addq_dbg_val == 64'd1700, "addq: r9 = 800 + 900");
    addq_dbg_sel = 4'd8; #1;
    check(addq_dbg_val == 64'd1700, "addq: r8 = 800 + stale 900 (no forwarding)");
    n_addq_hazard += int'(addq_dbg_val == 64'd1700);
  endtask

  initial begin
    process::self().srandom(777);
    for (int d = 0; d < N_DIRECTED; d++) begin
      directed(d);
      run_y86($sformatf("directed %0d", d));
    end
    for (int i = 0; i < 10; i++) begin
      random_prog(700);
      run_y86($sformatf("random %0d", i));
    end
    $display("load/use stalls %0d, mispredictions %0d, PC from jump %0d, ret bubbles %0d, PC from ret %0d",
             n_lu, n_mis, n_jfix, n_retb, n_rfix);
    $display("forwarding cycles %0d, CC writes %0d, taken jumps %0d, halts %0d, error stops %0d, addq hazards %0d",
             n_fwd, n_cc, n_taken, n_halt, n_exc, n_addq_hazard);
    check(n_lu > 0, "load/use stall happened");
    check(n_mis > 0, "misprediction squash happened");
    check(n_jfix > 0, "PC corrected from a jump");
    check(n_retb > 0, "ret bubble happened");
    check(n_rfix > 0, "PC taken from a ret");
    check(n_fwd > 0, "forwarding happened");
    check(n_cc > 0, "condition codes written");
    check(n_taken > 0, "correctly predicted taken jump happened");
    check(n_halt > 0, "halt happened");
    check(n_exc > 0, "stop on an invalid instruction or bad address happened");
    check(n_addq_hazard > 0, "addq data hazard happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
