// tb_addq_pipe: runs addq programs on the four-stage addq pipeline and checks
// every register against a model of its timing: instruction j (fetched in
// cycle j) reads its registers in cycle j+1 and its result is written at the
// end of cycle j+3, so it sees the results of instructions up to j-3 only.
// First the worked example (r8=800, r9=900; "addq %r8,%r9 ; addq %r9,%r8"
// gives r9=1700 and r8=900+800=1700, not 2500) with a cycle-exact check that
// r9 changes four cycles after the first fetch; then random programs in which
// some words carry another opcode (a no-op for this machine).
module tb_addq_pipe;
  import y86_pkg::*;
  localparam int IMEM = 256;
  logic clk = 0, rst = 1, imem_we = 0, rf_init_we = 0;
  logic [63:0] imem_waddr = 0;
  logic [7:0] imem_wdata = 0;
  reg_t rf_init_sel = 0, dbg_sel = 0;
  word_t rf_init_val = 0, dbg_val, pc;
  int checks = 0, failures = 0;
  int stale_reads = 0;

  addq_pipe #(.IMEM_BYTES(IMEM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // program: pairs (rA, rB), with op[j] the first byte of word j (8'h60 for
  // addq); the rest of memory is "addq %rax,%rax" with rax 0
  task automatic load(int ra[$], int rb[$], byte op[$]);
    rst = 1;
    for (int a = 0; a < IMEM; a++) begin
      imem_we = 1; imem_waddr = 64'(a);
      if (a / 2 < ra.size()) imem_wdata = (a % 2 == 0) ? op[a/2] : 8'((ra[a/2] << 4) | rb[a/2]);
      else imem_wdata = (a % 2 == 0) ? 8'h60 : 8'h00;
      @(posedge clk); #1;
    end
    imem_we = 0;
    for (int r = 0; r < 15; r++) begin
      rf_init_we = 1; rf_init_sel = reg_t'(r); rf_init_val = 64'(r * 100);
      @(posedge clk); #1;
    end
    rf_init_we = 0;
  endtask

  // expected registers after all of the program has been written back
  function automatic int model(int ra[$], int rb[$], byte op[$], ref longint unsigned regs[15]);
    int stale = 0;
    longint unsigned res[$];
    for (int r = 0; r < 15; r++) regs[r] = 64'(r * 100);
    foreach (ra[j]) begin
      // apply the result of instruction j-3 before j reads
      if (j >= 3 && op[j-3] == 8'h60) regs[rb[j-3]] = res[j-3];
      res.push_back(regs[ra[j]] + regs[rb[j]]);
      if (op[j] == 8'h60)
        for (int k = j - 2; k < j; k++)
          if (k >= 0 && op[k] == 8'h60 && (rb[k] == ra[j] || rb[k] == rb[j])) stale++;
    end
    for (int j = (ra.size() >= 3 ? ra.size() - 3 : 0); j < ra.size(); j++)
      if (op[j] == 8'h60) regs[rb[j]] = res[j];
    return stale;
  endfunction

  task automatic run_and_check(int ra[$], int rb[$], byte op[$], string name);
    longint unsigned exp[15];
    stale_reads += model(ra, rb, op, exp);
    load(ra, rb, op);
    rst = 0;
    // instructions are fetched in cycles 0..n-1, the last written after cycle n+3
    repeat (ra.size() + 4) @(posedge clk);
    #1;
    for (int r = 1; r < 15; r++) begin
      dbg_sel = reg_t'(r); #1;
      chk(dbg_val == exp[r], $sformatf("%s: r%0d = %0d expected %0d", name, r, dbg_val, exp[r]));
    end
  endtask

  initial begin
    int ra[$], rb[$];
    byte op[$];
    // worked example, cycle by cycle
    ra = '{8, 9}; rb = '{9, 8}; op = '{8'h60, 8'h60};
    load(ra, rb, op);
    rst = 0;
    dbg_sel = 4'd9;
    for (int c = 0; c < 6; c++) begin
      #1;
      chk(dbg_val == ((c >= 4) ? 64'd1700 : 64'd900), $sformatf("r9 in cycle %0d = %0d", c, dbg_val));
      @(posedge clk);
    end
    #1;
    dbg_sel = 4'd8; #1;
    chk(dbg_val == 64'd1700, $sformatf("r8 = %0d: stale r9 read expected (1700)", dbg_val));
    chk(pc == 64'd12, "pc advances by 2 per cycle");
    // random programs
    repeat (40) begin
      automatic int n = 1 + $urandom % 40;
      ra.delete(); rb.delete(); op.delete();
      repeat (n) begin
        ra.push_back(1 + $urandom % 14);
        rb.push_back(1 + $urandom % 14);
        // one word in eight is subq, nop or halt instead of addq
        case ($urandom % 24)
          0: op.push_back(8'h61);
          1: op.push_back(8'h10);
          2: op.push_back(8'h00);
          default: op.push_back(8'h60);
        endcase
      end
      run_and_check(ra, rb, op, "random");
    end
    chk(stale_reads > 0, "data hazard exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
