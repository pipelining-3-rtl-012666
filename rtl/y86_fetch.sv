// y86_fetch: fetch-stage logic with the "rearranged" PC update.
//
// The PC register of a plain pipeline is replaced by a predicted-PC
// register (F_predPC, held outside this module in the F pipeline register).
// At the start of each cycle a multiplexer picks the address actually sent
// to instruction memory:
//   - a conditional jump in the memory stage whose condition said "not
//     taken" was mispredicted: fetch its fall-through address (M_valA, which
//     carries the jump's valP);
//   - a ret reaching writeback: fetch the return address it loaded (W_valM);
//   - otherwise the predicted PC.
// The fetched bytes are split into icode/ifun, rA/rB and the 8-byte
// constant valC. "convert icode" turns the icode into the instruction length
// (1, 2, 9 or 10 bytes) to form valP. The next predicted PC is valC for jXX
// and call (jumps are always predicted taken) and valP otherwise.
// f_stat reports an address error, an invalid instruction or a halt.
// Everything here is combinational.
//
// From the lecture: the predicted-PC register, the choice of the jump's
// valP when the condition codes said not taken, the ret address, always
// predicting taken, and the +2/+10 lengths. The byte layout, the 1- and
// 9-byte lengths and the set of valid icodes are the usual Y86-64 ones.
module y86_fetch
  import y86_pkg::*;
(
  input  word_t         pred_pc,    // F_predPC
  input  icode_t        m_icode,    // M_icode
  input  logic          m_cnd,      // M_Cnd
  input  word_t         m_vala,     // M_valA (valP of a jump)
  input  icode_t        w_icode,    // W_icode
  input  word_t         w_valm,     // W_valM (return address of a ret)
  output word_t         pc,         // address to instruction memory
  input  logic [79:0]   ibytes,     // bytes pc .. pc+9
  input  logic          imem_err,
  output dreg_t         f_out,      // next value of the D register
  output word_t         f_predpc    // next value of the F register
);

  logic [3:0] icode_raw;
  icode_t     icode;
  logic       instr_valid, need_regids, need_valc;
  word_t      valc, valp;

  // PC selection.
  always_comb begin
    if (m_icode == I_JXX && !m_cnd) pc = m_vala;
    else if (w_icode == I_RET)      pc = w_valm;
    else                            pc = pred_pc;
  end

  // Split.
  assign icode_raw   = imem_err ? 4'(I_NOP) : ibytes[7:4];
  assign icode       = icode_t'(icode_raw);
  assign instr_valid = (icode_raw <= 4'(I_POPQ));
  assign need_regids = icode inside {I_RRMOVQ, I_OPQ, I_PUSHQ, I_POPQ,
                                     I_IRMOVQ, I_RMMOVQ, I_MRMOVQ};
  assign need_valc   = icode inside {I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_JXX, I_CALL};

  assign valc = need_regids ? ibytes[79:16] : ibytes[71:8];

  // Convert icode: instruction length.
  assign valp = pc + 64'(1) + (need_regids ? 64'(1) : 64'(0)) + (need_valc ? 64'(8) : 64'(0));

  always_comb begin
    f_out.icode = instr_valid ? icode : I_NOP;
    f_out.ifun  = imem_err ? 4'h0 : ibytes[3:0];
    f_out.ra    = need_regids ? ibytes[15:12] : R_NONE;
    f_out.rb    = need_regids ? ibytes[11:8]  : R_NONE;
    f_out.valc  = need_valc ? valc : '0;
    f_out.valp  = valp;
    if (imem_err)              f_out.stat = S_ADR;
    else if (!instr_valid)     f_out.stat = S_INS;
    else if (icode == I_HALT)  f_out.stat = S_HLT;
    else                       f_out.stat = S_AOK;
  end

  // Predict the next PC: always taken for jumps, target for calls.
  assign f_predpc = (icode inside {I_JXX, I_CALL}) ? valc : valp;

endmodule
