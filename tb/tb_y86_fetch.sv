// tb_y86_fetch: fetch-stage logic, combinational.
// Random instruction bytes of every icode (valid or not) are presented at
// random PCs. Checks the PC selection (mispredicted jump in M -> M_valA,
// ret in W -> W_valM, else the predicted PC), the split fields, the
// instruction length from a table (1, 2, 9 or 10 bytes), the predicted
// next PC (target for jXX/call) and the status (ADR, INS, HLT, AOK).
`timescale 1ns/1ps
module tb_y86_fetch;
  import y86_pkg::*;
  word_t pred_pc, m_vala, w_valm, pc, f_predpc;
  icode_t m_icode, w_icode;
  logic m_cnd, imem_err;
  logic [79:0] ibytes;
  dreg_t f_out;
  int checks = 0, failures = 0;
  int n_sel[3] = '{0, 0, 0};

  y86_fetch dut (.*);

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

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [3:0] ic, fn;
      reg_t ra, rb;
      word_t c, exp_pc, exp_valp;
      int len;
      logic regs, valid;
      pred_pc = {$urandom, $urandom};
      m_vala  = {$urandom, $urandom};
      w_valm  = {$urandom, $urandom};
      m_icode = icode_t'($urandom_range(6, 9));
      w_icode = icode_t'($urandom_range(7, 10));
      m_cnd   = $urandom_range(0, 1);
      imem_err = ($urandom_range(0, 20) == 0);
      ic = 4'($urandom_range(0, 15));
      fn = 4'($urandom);
      ra = 4'($urandom); rb = 4'($urandom);
      c  = {$urandom, $urandom};
      case (ic)
        4'h0, 4'h1, 4'h9:       begin len = 1;  regs = 0; end
        4'h2, 4'h6, 4'hA, 4'hB: begin len = 2;  regs = 1; end
        4'h3, 4'h4, 4'h5:       begin len = 10; regs = 1; end
        4'h7, 4'h8:             begin len = 9;  regs = 0; end
        default:                begin len = 1;  regs = 0; end
      endcase
      valid = (ic <= 4'hB);
      ibytes = {$urandom, $urandom, $urandom};
      ibytes[7:0] = {ic, fn};
      if (regs) begin ibytes[15:8] = {ra, rb}; if (len == 10) ibytes[79:16] = c; end
      else if (len == 9) ibytes[71:8] = c;
      #1;
      if (m_icode == I_JXX && !m_cnd) begin exp_pc = m_vala; n_sel[0]++; end
      else if (w_icode == I_RET)      begin exp_pc = w_valm; n_sel[1]++; end
      else                            begin exp_pc = pred_pc; n_sel[2]++; end
      chk(pc == exp_pc, "pc select");
      if (imem_err) begin
        chk(f_out.stat == S_ADR && f_out.icode == I_NOP, "imem error");
        chk(f_out.valp == pc + 1, "valp after imem error");
      end else begin
        exp_valp = pc + 64'(len);
        chk(f_out.valp == exp_valp, $sformatf("valp icode %h", ic));
        chk(f_out.stat == (!valid ? S_INS : (ic == 4'h0) ? S_HLT : S_AOK), "stat");
        chk(f_out.icode == (valid ? icode_t'(ic) : I_NOP), "icode");
        chk(f_out.ifun == fn, "ifun");
        if (valid && regs) chk(f_out.ra == ra && f_out.rb == rb, "ra rb");
        else               chk(f_out.ra == R_NONE && f_out.rb == R_NONE, "no regs");
        if (len >= 9)      chk(f_out.valc == c, $sformatf("valc icode %h", ic));
        if (ic == 4'h7 || ic == 4'h8) chk(f_predpc == c, "predict taken / call target");
        else                          chk(f_predpc == exp_valp, "predict valp");
      end
    end
    foreach (n_sel[i]) chk(n_sel[i] > 0, "each PC source used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
