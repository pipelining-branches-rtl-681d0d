// alu: execute-stage ALU of the Y86-64 pipeline.
//
// Computes valE = B op A for op in {add, sub, and, xor} (sub is B - A, so
// "subq %rA, %rB" leaves rB - rA) and the flags that result: ZF (zero), SF
// (negative) and OF (signed overflow of add/sub; 0 for and/xor). Address
// arithmetic and stack-pointer updates use the add function. Combinational.
//
// The operations are those of the OPq instructions; the flag definitions are
// the standard Y86-64 ones.
module alu
  import y86_pkg::*;
(
  input  logic [3:0] fun,
  input  word_t      a,
  input  word_t      b,
  output word_t      vale,
  output cc_t        flags
);

  always_comb begin
    case (fun)
      ALU_SUB: vale = b - a;
      ALU_AND: vale = b & a;
      ALU_XOR: vale = b ^ a;
      default: vale = b + a;
    endcase
    flags.zf = (vale == '0);
    flags.sf = vale[XLEN-1];
    case (fun)
      ALU_ADD: flags.of = (a[XLEN-1] == b[XLEN-1]) && (vale[XLEN-1] != b[XLEN-1]);
      ALU_SUB: flags.of = (a[XLEN-1] != b[XLEN-1]) && (vale[XLEN-1] != b[XLEN-1]);
      default: flags.of = 1'b0;
    endcase
  end

endmodule
