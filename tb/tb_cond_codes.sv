// tb_cond_codes: loads random flag values (with and without set_cc) and
// checks the held codes and every condition against a truth table written
// from the signed-comparison meaning of each condition.
module tb_cond_codes;
  import y86_pkg::*;
  logic clk = 0, rst = 1, set_cc = 0;
  cc_t new_cc, cc;
  logic [3:0] ifun;
  logic cnd;
  int checks = 0, failures = 0;

  cond_codes dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // condition after "cmpq": result r = B - A; lt means B < A (signed)
  function automatic logic expect_cnd(logic [3:0] f, cc_t c);
    logic lt = c.sf != c.of;
    case (f)
      4'd0: return 1;
      4'd1: return lt || c.zf;
      4'd2: return lt;
      4'd3: return c.zf;
      4'd4: return !c.zf;
      4'd5: return !lt;
      4'd6: return !lt && !c.zf;
      default: return 0;
    endcase
  endfunction

  initial begin
    cc_t model;
    new_cc = '0; ifun = 0;
    @(posedge clk); #1 rst = 0;
    model = '{zf: 1, sf: 0, of: 0};
    checks++; if (cc !== model) failures++;
    repeat (300) begin
      new_cc = cc_t'($urandom);
      set_cc = $urandom % 2;
      if (set_cc) model = new_cc;
      @(posedge clk); #1;
      checks++;
      if (cc !== model) begin failures++; $display("FAIL cc=%b expected %b", cc, model); end
      for (int f = 0; f < 8; f++) begin
        ifun = 4'(f); #1;
        checks++;
        if (cnd !== expect_cnd(4'(f), model)) begin
          failures++; $display("FAIL cond %0d cc=%b cnd=%b", f, model, cnd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
