// fetch_split: the fetch stage's instruction splitter and length logic.
//
// Takes the ten instruction bytes at the fetch PC and splits them into icode,
// ifun, rA, rB and the 8-byte immediate valC. The length follows from the
// icode alone ("convert icode"): 1 byte, +1 for a register byte, +8 for an
// immediate, so valP = pc + 1, + 2, + 9 or + 10. It also classifies the
// instruction: invalid icode gives status INS, a fetch outside instruction
// memory gives ADR, halt gives HLT. Purely combinational.
//
// Encodings and lengths are the standard Y86-64 ones; the +2 and +10 length
// cases are the ones the PC-update drawings show.
module fetch_split
  import y86_pkg::*;
(
  input  word_t        pc,
  input  logic [79:0]  instr,
  input  logic         imem_error,
  output stat_t        stat,
  output icode_t       icode,
  output logic [3:0]   ifun,
  output reg_t         ra,
  output reg_t         rb,
  output word_t        valc,
  output word_t        valp
);

  logic need_regids, need_valc, instr_valid;
  icode_t raw_icode;

  always_comb begin
    raw_icode = icode_t'(instr[7:4]);
    // a failed fetch is turned into a nop so it writes nothing
    icode = imem_error ? I_NOP : raw_icode;
    ifun  = imem_error ? 4'h0  : instr[3:0];

    instr_valid = icode inside {I_HALT, I_NOP, I_RRMOVQ, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ,
                                I_OPQ, I_JXX, I_CALL, I_RET, I_PUSHQ, I_POPQ};
    need_regids = icode inside {I_RRMOVQ, I_OPQ, I_PUSHQ, I_POPQ, I_IRMOVQ, I_RMMOVQ,
                                I_MRMOVQ};
    need_valc   = icode inside {I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_JXX, I_CALL};

    ra = need_regids ? instr[15:12] : REG_NONE;
    rb = need_regids ? instr[11:8]  : REG_NONE;
    valc = need_regids ? instr[79:16] : instr[71:8];
    if (!need_valc) valc = '0;
    valp = pc + 64'(1) + (need_regids ? 64'(1) : 64'(0)) + (need_valc ? 64'(8) : 64'(0));

    if (imem_error)        stat = S_ADR;
    else if (!instr_valid) stat = S_INS;
    else if (icode == I_HALT) stat = S_HLT;
    else                   stat = S_AOK;
  end

endmodule
