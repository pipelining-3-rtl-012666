// y86_hazard_ctrl: pipeline control - when to stall and when to squash.
//
// Combinational; it looks at the pipeline registers and a few stage
// outputs and tells each pipeline register to hold (stall) or to load a
// bubble (a no-op) at the next clock edge.
//   load/use: a load (mrmovq, popq) in execute whose dstM is a register the
//     instruction in decode reads cannot be forwarded in time (its value
//     appears only at the end of memory): hold F and D, bubble E - one
//     lost cycle.
//   ret: the return address is known only when the ret reaches writeback,
//     so while a ret is in decode, execute or memory hold F and put bubbles
//     into D - three lost cycles, four in all per ret.
//   mispredicted jump: a jXX in execute whose condition fails was predicted
//     taken; the two instructions fetched after it are squashed by bubbles
//     into D and E, and fetch restarts at the fall-through address one cycle
//     later - two lost cycles, three in all.
//   exceptions (halt, bad address, bad instruction): once one has reached
//     memory or writeback, later instructions must change nothing: the
//     condition codes are frozen (cc_en low), memory gets bubbles, and W is
//     held so the Stat register keeps the first exception.
// A load/use hazard together with a ret in decode only stalls D (the ret
// is not yet decoded correctly without its operand).
//
// The three hazard kinds, their costs (4 cycles per ret, 3 per not-taken
// conditional jump with predicting), predicting taken, squashing into
// "nothing" and stopping only when everything older is done follow the
// lecture. The exact signal equations are the usual Y86-64 ones.
module y86_hazard_ctrl
  import y86_pkg::*;
(
  input  icode_t d_icode,
  input  icode_t e_icode,
  input  reg_t   e_dstm,
  input  icode_t m_icode,
  input  reg_t   d_srca,     // decode-stage source registers
  input  reg_t   d_srcb,
  input  logic   e_cnd,
  input  stat_t  m_stat,     // status leaving memory
  input  stat_t  w_stat,     // W register status
  output logic   f_stall,
  output logic   d_stall,
  output logic   d_bubble,
  output logic   e_bubble,
  output logic   m_bubble,
  output logic   w_stall,
  output logic   cc_en,
  output logic   load_use,   // event flags, for observation
  output logic   ret_stall,
  output logic   mispredict
);

  assign load_use   = (e_icode inside {I_MRMOVQ, I_POPQ}) && (e_dstm != R_NONE) &&
                      (e_dstm == d_srca || e_dstm == d_srcb);
  assign ret_stall  = (d_icode == I_RET) || (e_icode == I_RET) || (m_icode == I_RET);
  assign mispredict = (e_icode == I_JXX) && !e_cnd;

  assign f_stall  = load_use || ret_stall;
  assign d_stall  = load_use;
  assign d_bubble = mispredict || (!load_use && ret_stall);
  assign e_bubble = mispredict || load_use;
  assign m_bubble = stat_is_exc(m_stat) || stat_is_exc(w_stat);
  assign w_stall  = stat_is_exc(w_stat);
  assign cc_en    = !stat_is_exc(m_stat) && !stat_is_exc(w_stat);

endmodule
