// tb_alu: random and corner-case check of the ALU result and flags against
// values computed here with wider arithmetic.
module tb_alu;
  import y86_pkg::*;
  logic [3:0] fun;
  word_t a, b, vale;
  cc_t flags;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(logic [3:0] f, word_t x, word_t y);
    logic [64:0] wide;
    word_t exp;
    logic eo;
    longint sx, sy;
    fun = f; a = x; b = y; #1;
    sx = longint'(x); sy = longint'(y);
    case (f)
      ALU_SUB: begin exp = y - x; eo = ((sy < 0) != (sx < 0)) && ((longint'(exp) < 0) != (sy < 0)); end
      ALU_AND: begin exp = y & x; eo = 0; end
      ALU_XOR: begin exp = y ^ x; eo = 0; end
      default: begin
        wide = {1'b0, y} + {1'b0, x};
        exp = wide[63:0];
        eo = ((sx < 0) == (sy < 0)) && ((longint'(exp) < 0) != (sx < 0));
      end
    endcase
    checks++;
    if (vale !== exp || flags.zf !== (exp == 0) || flags.sf !== exp[63] || flags.of !== eo) begin
      failures++;
      $display("FAIL fun=%0d a=%h b=%h: vale=%h zf%b sf%b of%b, expected %h of%b",
               f, x, y, vale, flags.zf, flags.sf, flags.of, exp, eo);
    end
  endtask

  initial begin
    word_t corner [6] = '{64'h0, 64'h1, 64'hFFFF_FFFF_FFFF_FFFF, 64'h7FFF_FFFF_FFFF_FFFF,
                          64'h8000_0000_0000_0000, 64'd800};
    for (int f = 0; f < 4; f++)
      foreach (corner[i]) foreach (corner[j]) one(4'(f), corner[i], corner[j]);
    repeat (4000) one(4'($urandom % 4), {$urandom, $urandom}, {$urandom, $urandom});
    // worked example: 800 + 900 = 1700
    one(ALU_ADD, 64'd800, 64'd900);
    checks++;
    if (vale != 64'd1700) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
