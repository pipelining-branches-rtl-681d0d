// tb_imem: fills the instruction memory through its write port and checks
// that every fetch returns the ten bytes at the PC (zero past the end) and
// that imem_error flags a PC outside the memory.
module tb_imem;
  localparam int BYTES = 128;
  logic clk = 0, we = 0;
  logic [63:0] waddr = 0, pc = 0;
  logic [7:0] wdata = 0;
  logic [79:0] instr;
  logic imem_error;
  byte unsigned model [BYTES];
  int checks = 0, failures = 0;

  imem #(.BYTES(BYTES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [79:0] exp;
    for (int a = 0; a < BYTES; a++) begin
      model[a] = byte'($urandom);
      we = 1; waddr = 64'(a); wdata = model[a];
      @(posedge clk); #1;
    end
    // a write past the end must not wrap onto address 0
    waddr = 64'(BYTES); wdata = ~model[0];
    @(posedge clk); #1;
    we = 0;
    for (int p = 0; p < BYTES + 20; p++) begin
      pc = 64'(p); #1;
      exp = '0;
      for (int i = 0; i < 10; i++) if (p + i < BYTES) exp[i*8 +: 8] = model[p + i];
      checks++;
      if (instr !== exp || imem_error !== (p >= BYTES)) begin
        failures++; $display("FAIL pc=%0d instr=%h expected %h err=%b", p, instr, exp, imem_error);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
