// y86_decode: decode-stage register selection and forwarding.
//
// From icode it chooses which registers to read (srcA, srcB) and write
// (dstE for ALU results, dstM for loaded values); 0xF means none. It then
// forms valA and valB for the execute stage. A value an older instruction
// has computed but not yet written to the register file is taken from
// where it waits, in priority order youngest first:
//   e_valE  end of execute          (dstE of the instruction in execute)
//   m_valM  end of memory (loads)   (M_dstM)
//   M_valE  execute->memory register (M_dstE)
//   W_valM  memory->writeback reg.  (W_dstM)
//   W_valE  memory->writeback reg.  (W_dstE)
//   otherwise the register file output.
// jXX and call pass valP in valA instead (it is carried to the memory stage
// for misprediction recovery and pushed as the return address).
// All combinational.
//
// The forwarding multiplexers, their "srcA == e_dstE : e_valE" and
// "srcA == m_dstE : m_valE" conditions and the sources in the execute and
// memory stages follow the lecture. The full source list and its priority,
// the guard that "no register" never matches, and the srcA/srcB/dstE/dstM
// table per icode are the usual Y86-64 pipeline's.
module y86_decode
  import y86_pkg::*;
(
  input  dreg_t d,          // D pipeline register
  output reg_t  srca,       // to register file
  output reg_t  srcb,
  input  word_t rvala,      // register file outputs
  input  word_t rvalb,
  input  reg_t  e_dste,  input word_t e_vale,
  input  reg_t  m_dstm,  input word_t m_valm,
  input  reg_t  m_dste,  input word_t m_vale,
  input  reg_t  w_dstm,  input word_t w_valm,
  input  reg_t  w_dste,  input word_t w_vale,
  output ereg_t d_out       // next value of the E register
);

  reg_t dste, dstm;

  always_comb begin
    unique case (d.icode)
      I_RRMOVQ, I_RMMOVQ, I_OPQ, I_PUSHQ: srca = d.ra;
      I_POPQ, I_RET:                      srca = R_RSP;
      default:                            srca = R_NONE;
    endcase
    unique case (d.icode)
      I_OPQ, I_RMMOVQ, I_MRMOVQ:          srcb = d.rb;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:     srcb = R_RSP;
      default:                            srcb = R_NONE;
    endcase
    unique case (d.icode)
      I_RRMOVQ, I_IRMOVQ, I_OPQ:          dste = d.rb;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:     dste = R_RSP;
      default:                            dste = R_NONE;
    endcase
    unique case (d.icode)
      I_MRMOVQ, I_POPQ:                   dstm = d.ra;
      default:                            dstm = R_NONE;
    endcase
  end

  function automatic word_t fwd(reg_t src, word_t rval,
                                reg_t e_dste_, word_t e_vale_, reg_t m_dstm_, word_t m_valm_,
                                reg_t m_dste_, word_t m_vale_, reg_t w_dstm_, word_t w_valm_,
                                reg_t w_dste_, word_t w_vale_);
    if (src == R_NONE)  return rval;
    if (src == e_dste_) return e_vale_;
    if (src == m_dstm_) return m_valm_;
    if (src == m_dste_) return m_vale_;
    if (src == w_dstm_) return w_valm_;
    if (src == w_dste_) return w_vale_;
    return rval;
  endfunction

  always_comb begin
    d_out.stat  = d.stat;
    d_out.icode = d.icode;
    d_out.ifun  = d.ifun;
    d_out.valc  = d.valc;
    d_out.vala  = (d.icode inside {I_CALL, I_JXX}) ? d.valp :
                  fwd(srca, rvala, e_dste, e_vale, m_dstm, m_valm, m_dste, m_vale,
                      w_dstm, w_valm, w_dste, w_vale);
    d_out.valb  = fwd(srcb, rvalb, e_dste, e_vale, m_dstm, m_valm, m_dste, m_vale,
                      w_dstm, w_valm, w_dste, w_vale);
    d_out.dste  = dste;
    d_out.dstm  = dstm;
    d_out.srca  = srca;
    d_out.srcb  = srcb;
  end

endmodule
