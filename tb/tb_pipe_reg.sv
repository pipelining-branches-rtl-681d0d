// tb_pipe_reg: checks the stall/bubble register bank against the worked
// example of an 8-bit register with default 0xFF: the input sequence
// 0x01..0x08 with stall in cycles 1, 6, 7 and bubble in cycle 3 must give the
// outputs 0xFF 0x01 0x01 0x03 0xFF 0x05 0x06 0x06 0x06. It then runs random
// stall/bubble traffic against a reference model. Last, a chain of five
// banks (fetch .. writeback, holding instruction letters, default nop) replays
// the two squash + stall cases: from "E D C B A", the controls S B S B N give
// "E nop C nop B", and N N S B N give "F E C nop B".
module tb_pipe_reg;
  logic clk = 0, rst = 1, stall = 0, bubble = 0;
  logic [7:0] d, q;
  int checks = 0, failures = 0;

  pipe_reg #(.T(logic [7:0]), .DEFAULT(8'hFF)) dut (.*);

  always #5 clk = ~clk;

  // five-stage chain for the squash + stall cases; 8'h00 is the nop
  logic [7:0] fetch_in = 0;
  logic [7:0] cq [5];
  logic       cs [5] = '{default: 1'b0}, cb [5] = '{default: 1'b0};
  pipe_reg #(.T(logic [7:0]), .DEFAULT(8'h00)) u_cf (
    .clk, .rst, .stall(cs[0]), .bubble(cb[0]), .d(fetch_in), .q(cq[0]));
  for (genvar i = 1; i < 5; i++) begin : g_chain
    pipe_reg #(.T(logic [7:0]), .DEFAULT(8'h00)) u_c (
      .clk, .rst, .stall(cs[i]), .bubble(cb[i]), .d(cq[i-1]), .q(cq[i]));
  end

  // fill the chain with E D C B A, apply one cycle of controls ("SBN" per
  // stage, fetch first) while F is offered, and compare with exp (fetch first)
  task automatic squash_stall(string ctl, string exp, string what);
    string got;
    foreach (cs[i]) begin cs[i] = 0; cb[i] = 0; end
    for (int l = 0; l < 5; l++) begin
      fetch_in = 8'("A") + 8'(l);
      @(posedge clk); #1;
    end
    fetch_in = 8'("F");
    foreach (cs[i]) begin cs[i] = (ctl[i] == "S"); cb[i] = (ctl[i] == "B"); end
    @(posedge clk); #1;
    foreach (cs[i]) begin cs[i] = 0; cb[i] = 0; end
    got = "";
    foreach (cq[i]) got = {got, (cq[i] == 8'h00) ? "-" : string'(cq[i])};
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: stages %s expected %s", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [7:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  logic [7:0] a_seq [8]      = '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08};
  logic       s_seq [8]      = '{0, 1, 0, 0, 0, 0, 1, 1};
  logic       b_seq [8]      = '{0, 0, 0, 1, 0, 0, 0, 0};
  logic [7:0] exp_seq [9]    = '{8'hFF, 8'h01, 8'h01, 8'h03, 8'hFF, 8'h05, 8'h06, 8'h06, 8'h06};

  initial begin
    logic [7:0] model;
    d = 0;
    @(posedge clk); #1 rst = 0;
    chk(8'hFF, "after reset");
    // worked example: time t drives a_value/stall/bubble, B shows exp_seq[t]
    for (int t = 0; t < 8; t++) begin
      chk(exp_seq[t], $sformatf("example time %0d", t));
      d = a_seq[t]; stall = s_seq[t]; bubble = b_seq[t];
      @(posedge clk); #1;
    end
    chk(exp_seq[8], "example time 8");
    // random traffic
    model = q;
    for (int i = 0; i < 500; i++) begin
      d = 8'($urandom);
      case ($urandom % 4)
        0: begin stall = 1; bubble = 0; end
        1: begin stall = 0; bubble = 1; end
        default: begin stall = 0; bubble = 0; end
      endcase
      if (stall) model = model;
      else if (bubble) model = 8'hFF;
      else model = d;
      @(posedge clk); #1;
      chk(model, "random");
    end
    stall = 0; bubble = 0;
    // squash + stall cases ("-" is a nop)
    squash_stall("SBSBN", "E-C-B", "squash + stall (1)");
    squash_stall("NNSBN", "FEC-B", "squash + stall (2)");
    squash_stall("NNNNN", "FEDCB", "all normal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
