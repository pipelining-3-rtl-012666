// tb_y86_decode: register selection and forwarding priority.
// For every icode, checks srcA/srcB/dstE/dstM against the Y86-64 table,
// then drives random forwarding destinations (drawn from a few registers
// so that they often collide) and checks that valA/valB come from the
// youngest matching source: e_valE, m_valM, M_valE, W_valM, W_valE, then
// the register file; jXX and call take valP in valA.
`timescale 1ns/1ps
module tb_y86_decode;
  import y86_pkg::*;
  dreg_t d;
  reg_t srca, srcb, e_dste, m_dstm, m_dste, w_dstm, w_dste;
  word_t rvala, rvalb, e_vale, m_valm, m_vale, w_valm, w_vale;
  ereg_t d_out;
  int checks = 0, failures = 0;
  int n_src[6] = '{0, 0, 0, 0, 0, 0};

  y86_decode dut (.*);

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

  function automatic word_t expect_fwd(reg_t s, word_t rv, output int which);
    which = 5;
    if (s == R_NONE) return rv;
    if (s == e_dste) begin which = 0; return e_vale; end
    if (s == m_dstm) begin which = 1; return m_valm; end
    if (s == m_dste) begin which = 2; return m_vale; end
    if (s == w_dstm) begin which = 3; return w_valm; end
    if (s == w_dste) begin which = 4; return w_vale; end
    return rv;
  endfunction

  initial begin
    for (int t = 0; t < 6000; t++) begin
      reg_t es_a, es_b, ed_e, ed_m;
      word_t ea, eb;
      int wa, wb;
      d.stat  = S_AOK;
      d.icode = icode_t'($urandom_range(0, 11));
      d.ifun  = 4'($urandom);
      d.ra    = reg_t'($urandom_range(0, 3));
      d.rb    = reg_t'($urandom_range(2, 5));
      d.valc  = {$urandom, $urandom};
      d.valp  = {$urandom, $urandom};
      e_dste  = ($urandom_range(0, 2) == 0) ? R_NONE : reg_t'($urandom_range(0, 5));
      m_dstm  = ($urandom_range(0, 2) == 0) ? R_NONE : reg_t'($urandom_range(0, 5));
      m_dste  = ($urandom_range(0, 2) == 0) ? R_NONE : reg_t'($urandom_range(0, 5));
      w_dstm  = ($urandom_range(0, 2) == 0) ? R_NONE : reg_t'($urandom_range(0, 5));
      w_dste  = ($urandom_range(0, 2) == 0) ? R_NONE : reg_t'($urandom_range(0, 5));
      {e_vale, m_valm, m_vale, w_valm, w_vale} = {$urandom, $urandom, $urandom, $urandom, $urandom,
                                                  $urandom, $urandom, $urandom, $urandom, $urandom};
      rvala = {$urandom, $urandom};
      rvalb = {$urandom, $urandom};
      case (d.icode)
        I_RRMOVQ: begin es_a = d.ra;   es_b = R_NONE; ed_e = d.rb;   ed_m = R_NONE; end
        I_IRMOVQ: begin es_a = R_NONE; es_b = R_NONE; ed_e = d.rb;   ed_m = R_NONE; end
        I_RMMOVQ: begin es_a = d.ra;   es_b = d.rb;   ed_e = R_NONE; ed_m = R_NONE; end
        I_MRMOVQ: begin es_a = R_NONE; es_b = d.rb;   ed_e = R_NONE; ed_m = d.ra;   end
        I_OPQ:    begin es_a = d.ra;   es_b = d.rb;   ed_e = d.rb;   ed_m = R_NONE; end
        I_CALL:   begin es_a = R_NONE; es_b = R_RSP;  ed_e = R_RSP;  ed_m = R_NONE; end
        I_RET:    begin es_a = R_RSP;  es_b = R_RSP;  ed_e = R_RSP;  ed_m = R_NONE; end
        I_PUSHQ:  begin es_a = d.ra;   es_b = R_RSP;  ed_e = R_RSP;  ed_m = R_NONE; end
        I_POPQ:   begin es_a = R_RSP;  es_b = R_RSP;  ed_e = R_RSP;  ed_m = d.ra;   end
        default:  begin es_a = R_NONE; es_b = R_NONE; ed_e = R_NONE; ed_m = R_NONE; end
      endcase
      #1;
      chk(srca == es_a && srcb == es_b, $sformatf("src icode %0d", d.icode));
      chk(d_out.dste == ed_e && d_out.dstm == ed_m, $sformatf("dst icode %0d", d.icode));
      ea = expect_fwd(es_a, rvala, wa);
      eb = expect_fwd(es_b, rvalb, wb);
      if (d.icode inside {I_JXX, I_CALL}) ea = d.valp;
      else n_src[wa]++;
      n_src[wb]++;
      chk(d_out.vala == ea, $sformatf("valA icode %0d src %0d", d.icode, wa));
      chk(d_out.valb == eb, $sformatf("valB icode %0d src %0d", d.icode, wb));
      chk(d_out.valc == d.valc && d_out.icode == d.icode && d_out.ifun == d.ifun, "pass-through");
    end
    foreach (n_src[i]) chk(n_src[i] > 0, $sformatf("source %0d used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
