// y86_pkg: shared types and constants of the Y86-64 pipeline.
//
// Holds the instruction codes, register numbers, ALU functions, jump
// conditions, status codes and the pipeline-register structs that cross
// stage boundaries (F, D, E, M, W). The pipeline stages, the register
// numbering with 0xF meaning "no register", the 2- and 10-byte instruction
// lengths and the 64-bit PC follow the lecture design; the numeric
// instruction and status encodings are the usual Y86-64 ones, which the
// lecture uses but does not print.
package y86_pkg;

  typedef logic [63:0] word_t;
  typedef logic [3:0]  reg_t;

  // Instruction codes (upper nibble of the first instruction byte).
  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,   // also cmovXX
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_t;

  // Register numbers.
  localparam reg_t R_RAX  = 4'h0;
  localparam reg_t R_RCX  = 4'h1;
  localparam reg_t R_RDX  = 4'h2;
  localparam reg_t R_RBX  = 4'h3;
  localparam reg_t R_RSP  = 4'h4;
  localparam reg_t R_NONE = 4'hF;

  // ALU functions (ifun of OPq).
  localparam logic [3:0] A_ADD = 4'h0;
  localparam logic [3:0] A_SUB = 4'h1;
  localparam logic [3:0] A_AND = 4'h2;
  localparam logic [3:0] A_XOR = 4'h3;

  // Jump / conditional-move conditions (ifun of jXX and cmovXX).
  localparam logic [3:0] C_YES = 4'h0;
  localparam logic [3:0] C_LE  = 4'h1;
  localparam logic [3:0] C_L   = 4'h2;
  localparam logic [3:0] C_E   = 4'h3;
  localparam logic [3:0] C_NE  = 4'h4;
  localparam logic [3:0] C_GE  = 4'h5;
  localparam logic [3:0] C_G   = 4'h6;

  // Status codes; S_BUB marks a bubble travelling down the pipeline.
  typedef enum logic [2:0] {
    S_BUB = 3'd0,
    S_AOK = 3'd1,
    S_HLT = 3'd2,
    S_ADR = 3'd3,
    S_INS = 3'd4
  } stat_t;

  typedef struct packed {
    logic zf;
    logic sf;
    logic of;
  } cc_t;

  // Fetch register: only the predicted PC (the "rearranged" PC update).
  typedef struct packed {
    word_t pred_pc;
  } freg_t;

  // Fetch -> decode register.
  typedef struct packed {
    stat_t      stat;
    icode_t     icode;
    logic [3:0] ifun;
    reg_t       ra;
    reg_t       rb;
    word_t      valc;
    word_t      valp;
  } dreg_t;

  // Decode -> execute register.
  typedef struct packed {
    stat_t      stat;
    icode_t     icode;
    logic [3:0] ifun;
    word_t      valc;
    word_t      vala;
    word_t      valb;
    reg_t       dste;
    reg_t       dstm;
    reg_t       srca;
    reg_t       srcb;
  } ereg_t;

  // Execute -> memory register.
  typedef struct packed {
    stat_t  stat;
    icode_t icode;
    logic   cnd;
    word_t  vale;
    word_t  vala;
    reg_t   dste;
    reg_t   dstm;
  } mreg_t;

  // Memory -> writeback register.
  typedef struct packed {
    stat_t  stat;
    icode_t icode;
    word_t  vale;
    word_t  valm;
    reg_t   dste;
    reg_t   dstm;
  } wreg_t;

  // Values loaded by a bubble.
  localparam dreg_t D_BUBBLE = '{stat: S_BUB, icode: I_NOP, ifun: 4'h0, ra: R_NONE, rb: R_NONE,
                                 valc: '0, valp: '0};
  localparam ereg_t E_BUBBLE = '{stat: S_BUB, icode: I_NOP, ifun: 4'h0, valc: '0, vala: '0, valb: '0,
                                 dste: R_NONE, dstm: R_NONE, srca: R_NONE, srcb: R_NONE};
  localparam mreg_t M_BUBBLE = '{stat: S_BUB, icode: I_NOP, cnd: 1'b0, vale: '0, vala: '0,
                                 dste: R_NONE, dstm: R_NONE};
  localparam wreg_t W_BUBBLE = '{stat: S_BUB, icode: I_NOP, vale: '0, valm: '0,
                                 dste: R_NONE, dstm: R_NONE};

  // True when a status code stops the machine.
  function automatic logic stat_is_exc(stat_t s);
    return (s == S_HLT) || (s == S_ADR) || (s == S_INS);
  endfunction

endpackage
