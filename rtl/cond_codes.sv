// cond_codes: condition-code register and condition evaluation.
//
// The register holds ZF, SF and OF. It is loaded with the ALU's new flags at
// the end of a cycle in which set_cc is high (an OPq in execute that is not
// being cancelled), so the execute stage is where an instruction changes the
// condition codes. cnd evaluates condition ifun (always, le, l, e, ne, ge, g)
// on the current register contents; the pipeline uses it in execute to decide
// a jXX ("taken") or a cmovXX. Reset value: ZF=1, SF=0, OF=0.
//
// Changing the codes in execute and sending "taken" from execute follow the
// pipeline description; the condition encodings are the standard Y86-64 ones
// and the reset value is this design's choice.
module cond_codes
  import y86_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       set_cc,
  input  cc_t        new_cc,
  input  logic [3:0] ifun,
  output cc_t        cc,
  output logic       cnd
);

  always_ff @(posedge clk) begin
    if (rst)         cc <= '{zf: 1'b1, sf: 1'b0, of: 1'b0};
    else if (set_cc) cc <= new_cc;
  end

  always_comb begin
    case (ifun)
      C_ALWAYS: cnd = 1'b1;
      C_LE:     cnd = (cc.sf ^ cc.of) | cc.zf;
      C_L:      cnd = cc.sf ^ cc.of;
      C_E:      cnd = cc.zf;
      C_NE:     cnd = !cc.zf;
      C_GE:     cnd = !(cc.sf ^ cc.of);
      C_G:      cnd = !(cc.sf ^ cc.of) && !cc.zf;
      default:  cnd = 1'b0;
    endcase
  end

endmodule
