// tb_y86_pipe: end-to-end test of the five-stage Y86-64 pipeline.
//
// Each program is assembled, loaded through the instruction-memory port, run
// from reset until the pipeline reports halted, and compared with the
// instruction-at-a-time reference model: all fifteen registers, the condition
// codes, the final status (including invalid instructions and bad addresses),
// and the exact number of cycles, which checks the cost of each
// control hazard (a correctly predicted jump 1 cycle, a mispredicted one 3, a
// ret 4, a load followed by its use 2). The number of mispredictions
// detected, of fetch-PC corrections by a jump or a ret, and of load/use
// stalls must also equal the model's. For the jump/call/push program the
// cycle in which each instruction is first fetched is checked against its
// worked schedule. Directed programs come first, then random ones. A second copy of the processor, built with the other
// arrangement of the PC update (corrections written into the PC register at
// the end of the previous cycle), runs every program alongside: its fetch PC,
// status and condition codes must equal the first copy's in every cycle, and
// its registers and correction counts at the end.
module tb_y86_pipe;
  import y86_pkg::*;
  import y86_asm_pkg::*;
  import y86_iss_pkg::*;
  import y86_prog_pkg::*;

  localparam int IMEM = 1024;
  localparam int DMEM = 1024;
  localparam int N_RANDOM = 60;

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
  int ctl_cycle, next_cycle;
  int cost_prog [3] = '{0, 1, 2};
  int cost_exp  [3] = '{3, 1, 4};
  int tot_mis = 0, tot_ret = 0, tot_lu = 0, tot_fwd = 0, tot_taken = 0;

  y86_pipe #(.IMEM_BYTES(IMEM), .DMEM_BYTES(DMEM)) dut (.*);

  // the same processor with the PC corrections made at the end of the cycle
  word_t dbg_val_a, fetch_pc_a;
  stat_t stat_a;
  cc_t   cc_a;
  logic  halted_a, ev_pc_from_jump_a, ev_pc_from_ret_a;
  logic  unused_ev_a [5];
  y86_pipe #(.IMEM_BYTES(IMEM), .DMEM_BYTES(DMEM), .PC_CORRECT_AT_END(1'b1)) dut_alt (
    .clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .dbg_sel, .dbg_val(dbg_val_a),
    .stat(stat_a), .halted(halted_a), .fetch_pc(fetch_pc_a),
    .ev_load_use(unused_ev_a[0]), .ev_mispredict(unused_ev_a[1]), .ev_ret_bubble(unused_ev_a[2]),
    .ev_fwd(unused_ev_a[3]), .ev_cc_write(unused_ev_a[4]),
    .ev_pc_from_jump(ev_pc_from_jump_a), .ev_pc_from_ret(ev_pc_from_ret_a), .cc(cc_a));

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
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

  task automatic run_prog(string name);
    y86_iss_pkg::result_t exp;
    int cyc = 0, n_mis = 0, n_lu = 0, n_jfix = 0, n_rfix = 0, n_fwd = 0;
    int n_jfix_a = 0, n_rfix_a = 0, n_differ = 0;
    int first_fetch [$];
    exp = run(code, IMEM, DMEM, 100000);
    // load the image with reset held, zero-filling the rest of the memory
    rst = 1;
    for (int a = 0; a < IMEM; a++) begin
      imem_we = 1; imem_waddr = 64'(a);
      imem_wdata = (a < code.size()) ? code[a] : 8'h00;
      @(posedge clk); #1;
    end
    imem_we = 0;
    @(posedge clk); #1;
    rst = 0;
    ctl_cycle = -1; next_cycle = -1;
    foreach (sched_pc[k]) first_fetch.push_back(-1);
    while (!halted && cyc < 20000) begin
      if (ctl_cycle < 0 && fetch_pc == 64'(mark_ctl)) ctl_cycle = cyc;
      if (ctl_cycle >= 0 && next_cycle < 0 && fetch_pc == 64'(mark_next)) next_cycle = cyc;
      foreach (sched_pc[k]) if (first_fetch[k] < 0 && fetch_pc == 64'(sched_pc[k])) first_fetch[k] = cyc;
      n_mis  += int'(ev_mispredict);
      n_lu   += int'(ev_load_use);
      n_jfix += int'(ev_pc_from_jump);
      n_rfix += int'(ev_pc_from_ret);
      n_fwd  += int'(ev_fwd);
      n_jfix_a += int'(ev_pc_from_jump_a);
      n_rfix_a += int'(ev_pc_from_ret_a);
      n_differ += int'(fetch_pc_a != fetch_pc || halted_a != halted || stat_a != stat || cc_a != cc);
      @(posedge clk); #1;
      cyc++;
    end
    check(halted, {name, ": halted"});
    check(stat == stat_t'(exp.stat), $sformatf("%s: stat %0d expected %0d", name, stat, exp.stat));
    // the pipeline is frozen once halted: let two more edges pass, so that a
    // late register write would show
    repeat (2) @(posedge clk);
    #1;
    for (int r = 0; r < 15; r++) begin
      dbg_sel = reg_t'(r); #1;
      check(dbg_val == exp.regs[r], $sformatf("%s: r%0d = %0h expected %0h", name, r,
                                              dbg_val, exp.regs[r]));
      check(dbg_val_a == exp.regs[r], $sformatf("%s, end-of-cycle PC fix: r%0d = %0h expected %0h",
                                                name, r, dbg_val_a, exp.regs[r]));
    end
    check(n_differ == 0, $sformatf("%s: the two PC-update arrangements differ in %0d cycles", name, n_differ));
    check(n_jfix_a == exp.n_mispredict && n_rfix_a == exp.n_ret,
          $sformatf("%s, end-of-cycle PC fix: %0d jump and %0d ret fixes", name, n_jfix_a, n_rfix_a));
    check(cc == '{zf: exp.zf, sf: exp.sf, of: exp.of}, $sformatf("%s: condition codes %b", name, cc));
    check(cyc == expected_cycles(exp), $sformatf("%s: %0d cycles, expected %0d (n=%0d mis=%0d ret=%0d lu=%0d)",
          name, cyc, expected_cycles(exp), exp.n_instr, exp.n_mispredict, exp.n_ret, exp.n_load_use));
    check(n_mis == exp.n_mispredict, $sformatf("%s: %0d mispredictions, expected %0d", name, n_mis, exp.n_mispredict));
    check(n_jfix == exp.n_mispredict, $sformatf("%s: %0d jump PC fixes, expected %0d", name, n_jfix, exp.n_mispredict));
    check(n_rfix == exp.n_ret, $sformatf("%s: %0d ret PC fixes, expected %0d", name, n_rfix, exp.n_ret));
    foreach (sched_pc[k])
      check(first_fetch[0] >= 0 && first_fetch[k] - first_fetch[0] == sched_cyc[k],
            $sformatf("%s: instruction at %0h first fetched in relative cycle %0d, expected %0d",
                      name, sched_pc[k], first_fetch[k] - first_fetch[0], sched_cyc[k]));
    check(n_lu == exp.n_load_use, $sformatf("%s: %0d load/use stalls, expected %0d", name, n_lu, exp.n_load_use));
    tot_mis += n_mis; tot_ret += n_rfix; tot_lu += n_lu; tot_fwd += n_fwd; tot_taken += exp.n_taken;
  endtask

  initial begin
    process::self().srandom(12345);
    for (int d = 0; d < N_DIRECTED; d++) begin
      directed(d);
      run_prog($sformatf("directed %0d", d));
      check(stat == ((d == 6) ? S_INS : (d >= 7) ? S_ADR : S_HLT),
            $sformatf("directed %0d ends with status %0d", d, stat));
    end
    // fetch-to-fetch distance from a control instruction to the instruction
    // that truly follows it: mispredicted jne 3, correctly predicted je 1,
    // ret 4
    foreach (cost_prog[k]) begin
      directed(cost_prog[k]);
      run_prog($sformatf("cost %0d", k));
      check(ctl_cycle >= 0 && next_cycle - ctl_cycle == cost_exp[k],
            $sformatf("program %0d: next instruction fetched %0d cycles after the control one, expected %0d",
                      cost_prog[k], next_cycle - ctl_cycle, cost_exp[k]));
    end
    for (int i = 0; i < N_RANDOM; i++) begin
      random_prog(700);
      run_prog($sformatf("random %0d", i));
    end
    check(tot_mis > 0 && tot_ret > 0 && tot_lu > 0 && tot_fwd > 0 && tot_taken > 0,
          "every hazard mechanism exercised");
    $display("mispredictions %0d, rets %0d, load/use stalls %0d, forwarding cycles %0d, taken jumps %0d",
             tot_mis, tot_ret, tot_lu, tot_fwd, tot_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
