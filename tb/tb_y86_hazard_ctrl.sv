// tb_y86_hazard_ctrl: the pipeline control equations.
// Random pipeline contents (biased toward the instructions that cause
// hazards) are checked against the control rules: load/use holds F and D
// and bubbles E; a ret in D, E or M holds F and bubbles D (unless a
// load/use already holds D); a mispredicted jump in E bubbles D and E; an
// exception in M or W bubbles M, freezes the condition codes, and one in W
// holds W. Each case must come up at least once.
`timescale 1ns/1ps
module tb_y86_hazard_ctrl;
  import y86_pkg::*;
  icode_t d_icode, e_icode, m_icode;
  reg_t e_dstm, d_srca, d_srcb;
  logic e_cnd;
  stat_t m_stat, w_stat;
  logic f_stall, d_stall, d_bubble, e_bubble, m_bubble, w_stall, cc_en;
  logic load_use, ret_stall, mispredict;
  int checks = 0, failures = 0;
  int n_lu = 0, n_ret = 0, n_mis = 0, n_exc = 0, n_combo = 0;

  y86_hazard_ctrl dut (.*);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic icode_t pick();
    case ($urandom_range(0, 5))
      0: return I_RET;
      1: return I_MRMOVQ;
      2: return I_POPQ;
      3: return I_JXX;
      default: return icode_t'($urandom_range(0, 11));
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic lu, rs, mp, mx, wx;
      d_icode = pick(); e_icode = pick(); m_icode = pick();
      e_dstm = ($urandom_range(0, 3) == 0) ? R_NONE : reg_t'($urandom_range(0, 3));
      d_srca = ($urandom_range(0, 3) == 0) ? R_NONE : reg_t'($urandom_range(0, 3));
      d_srcb = ($urandom_range(0, 3) == 0) ? R_NONE : reg_t'($urandom_range(0, 3));
      e_cnd = $urandom_range(0, 1);
      m_stat = ($urandom_range(0, 5) == 0) ? stat_t'($urandom_range(0, 4)) : S_AOK;
      w_stat = ($urandom_range(0, 5) == 0) ? stat_t'($urandom_range(0, 4)) : S_AOK;
      #1;
      lu = (e_icode == I_MRMOVQ || e_icode == I_POPQ) && e_dstm != R_NONE &&
           (e_dstm == d_srca || e_dstm == d_srcb);
      rs = (d_icode == I_RET || e_icode == I_RET || m_icode == I_RET);
      mp = (e_icode == I_JXX) && !e_cnd;
      mx = (m_stat == S_HLT || m_stat == S_ADR || m_stat == S_INS);
      wx = (w_stat == S_HLT || w_stat == S_ADR || w_stat == S_INS);
      n_lu += int'(lu); n_ret += int'(rs); n_mis += int'(mp); n_exc += int'(mx | wx);
      n_combo += int'(lu && rs);
      chk(load_use == lu && ret_stall == rs && mispredict == mp, "event flags");
      chk(f_stall == (lu || rs), "F stall");
      chk(d_stall == lu, "D stall");
      chk(d_bubble == (mp || (rs && !lu)), "D bubble");
      chk(e_bubble == (mp || lu), "E bubble");
      chk(m_bubble == (mx || wx), "M bubble");
      chk(w_stall == wx, "W stall");
      chk(cc_en == !(mx || wx), "CC enable");
      chk(!(d_stall && d_bubble), "D never both stalled and bubbled");
    end
    chk(n_lu > 0 && n_ret > 0 && n_mis > 0 && n_exc > 0 && n_combo > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
