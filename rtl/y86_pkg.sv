// y86_pkg: shared encodings and pipeline-register layouts for the five-stage
// Y86-64 pipeline (fetch, decode, execute, memory, writeback).
//
// The instruction codes, register numbers, ALU functions and condition codes
// are the standard Y86-64 encodings. Each pipeline register is a packed struct;
// its *_BUBBLE constant is the "default value" the register loads when it is
// bubbled, i.e. a no-op whose destination registers are REG_NONE (0xF).
package y86_pkg;

  localparam int unsigned XLEN = 64;
  typedef logic [XLEN-1:0] word_t;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,   // also cmovXX (ifun != 0)
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB,
    I_BAD_C  = 4'hC,
    I_BAD_D  = 4'hD,
    I_BAD_E  = 4'hE,
    I_BAD_F  = 4'hF
  } icode_t;

  typedef logic [3:0] reg_t;
  localparam reg_t REG_RSP  = 4'h4;
  localparam reg_t REG_NONE = 4'hF;

  // ALU functions (ifun of OPq)
  localparam logic [3:0] ALU_ADD = 4'h0;
  localparam logic [3:0] ALU_SUB = 4'h1;
  localparam logic [3:0] ALU_AND = 4'h2;
  localparam logic [3:0] ALU_XOR = 4'h3;

  // Jump / conditional-move conditions (ifun of jXX and cmovXX)
  localparam logic [3:0] C_ALWAYS = 4'h0;
  localparam logic [3:0] C_LE     = 4'h1;
  localparam logic [3:0] C_L      = 4'h2;
  localparam logic [3:0] C_E      = 4'h3;
  localparam logic [3:0] C_NE     = 4'h4;
  localparam logic [3:0] C_GE     = 4'h5;
  localparam logic [3:0] C_G      = 4'h6;

  typedef enum logic [1:0] {
    S_AOK = 2'd0,   // normal
    S_HLT = 2'd1,   // halt executed
    S_ADR = 2'd2,   // bad instruction or data address
    S_INS = 2'd3    // invalid instruction
  } stat_t;

  typedef struct packed {
    logic zf;
    logic sf;
    logic of;
  } cc_t;

  // F register: only the predicted PC ("register fF { predictedPC }")
  typedef struct packed {
    word_t pred_pc;
  } f_reg_t;

  typedef struct packed {
    stat_t  stat;
    icode_t icode;
    logic [3:0] ifun;
    reg_t   ra;
    reg_t   rb;
    word_t  valc;
    word_t  valp;
  } d_reg_t;

  typedef struct packed {
    stat_t  stat;
    icode_t icode;
    logic [3:0] ifun;
    word_t  valc;
    word_t  vala;
    word_t  valb;
    reg_t   dste;
    reg_t   dstm;
  } e_reg_t;

  typedef struct packed {
    stat_t  stat;
    icode_t icode;
    logic   cnd;
    word_t  vale;
    word_t  vala;
    reg_t   dste;
    reg_t   dstm;
  } m_reg_t;

  typedef struct packed {
    stat_t  stat;
    icode_t icode;
    word_t  vale;
    word_t  valm;
    reg_t   dste;
    reg_t   dstm;
  } w_reg_t;

  localparam f_reg_t F_RESET  = '{pred_pc: '0};
  localparam d_reg_t D_BUBBLE = '{stat: S_AOK, icode: I_NOP, ifun: 4'h0,
                                  ra: REG_NONE, rb: REG_NONE, valc: '0, valp: '0};
  localparam e_reg_t E_BUBBLE = '{stat: S_AOK, icode: I_NOP, ifun: 4'h0, valc: '0,
                                  vala: '0, valb: '0, dste: REG_NONE, dstm: REG_NONE};
  localparam m_reg_t M_BUBBLE = '{stat: S_AOK, icode: I_NOP, cnd: 1'b0, vale: '0,
                                  vala: '0, dste: REG_NONE, dstm: REG_NONE};
  localparam w_reg_t W_BUBBLE = '{stat: S_AOK, icode: I_NOP, vale: '0, valm: '0,
                                  dste: REG_NONE, dstm: REG_NONE};

endpackage
