// e1e2_pipe: six-stage Y86-64 subset pipeline with execute split in two.
//
// Stages: F (fetch), D (decode), E1 and E2 (execute), M (memory), W
// (writeback). The ALU result exists only at the end of E2: the 64-bit
// operation is done in two halves, the low 32 bits and the carry in E1,
// the high 32 bits in E2. Instructions: halt, nop, irmovq, rmmovq,
// mrmovq and OPq (add, sub, and, xor). There are no jumps, so there is no
// control hazard and fetch simply steps to the next instruction; on a halt,
// an unknown instruction or a fetch past memory it stops and repeats it.
//
// Data hazards:
//   - an operand needed in E1 (both OPq operands, the address base of
//     rmmovq/mrmovq) is forwarded in decode from, youngest first, the E2
//     ALU output, the data-memory output, the M register, and the W
//     register's valM and valE;
//   - if its youngest writer is still in E1, or is a load in E1 or E2, no
//     value exists yet: F and D hold and a bubble enters E1. An ALU result
//     costs one such cycle directly behind its producer; a load costs two;
//   - the stored value of rmmovq is needed only in M, so it never stalls:
//     when rmmovq is in E2 it takes the value again from the M register or
//     data-memory output (the instruction directly ahead) or from the W
//     register (two ahead), whichever is youngest and writes it.
// So "addq %rcx,%r9; addq %r9,%rbx; addq %rax,%r9; rmmovq %r9,(%rbx)"
// stalls once, in decode of the second instruction, and the rmmovq flows
// straight through.
//
// Exceptions work as in the five-stage pipeline: status travels with the
// instruction, the Stat register is written in W, an excepting instruction
// writes no register, and once one reaches M or W no later store happens.
// There are no condition codes, since no instruction here reads them.
//
// Interface: load_* writes one instruction-memory byte per clock (use it
// while rst is high). stat is the Stat register. ev_stall pulses in each
// stall cycle, ev_fwd[3:0] when an E1 operand comes from E2 / memory
// output / M register / W register, ev_fwd_late when the rmmovq value is
// taken again in E2.
//
// The stage split, the rule that a result exists only after E2 and the
// example timing follow the lecture design; the subset, the
// halves of the adder, the late pick-up of the store value and the halt
// handling in fetch are this design's choices.
module e1e2_pipe
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024,
  parameter int unsigned DMEM_BYTES = 1024
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       load_en,
  input  word_t      load_addr,
  input  logic [7:0] load_data,
  output stat_t      stat,
  output logic       ev_stall,
  output logic [3:0] ev_fwd,           // E2 ALU, m_valM, M_valE, W
  output logic       ev_fwd_late
);

  typedef struct packed {
    stat_t      stat;
    icode_t     icode;
    logic [3:0] ifun;
    reg_t       ra;
    reg_t       rb;
    word_t      valc;
  } d_t;

  typedef struct packed {
    stat_t      stat;
    icode_t     icode;
    logic [3:0] ifun;
    word_t      vala;
    word_t      alua;
    word_t      alub;
    reg_t       srca;
    reg_t       dste;
    reg_t       dstm;
  } e1_t;

  typedef struct packed {
    stat_t       stat;
    icode_t      icode;
    logic [3:0]  ifun;
    word_t       vala;
    logic [31:0] lo;                   // low half of the result
    logic        carry;                // carry out of the low half
    logic [31:0] ahi;
    logic [31:0] bhi;
    reg_t        srca;
    reg_t        dste;
    reg_t        dstm;
  } e2_t;

  typedef struct packed {
    stat_t  stat;
    icode_t icode;
    word_t  vala;
    word_t  vale;
    reg_t   dste;
    reg_t   dstm;
  } m_t;

  typedef struct packed {
    stat_t  stat;
    word_t  vale;
    word_t  valm;
    reg_t   dste;
    reg_t   dstm;
  } w_t;

  localparam d_t  D_BUB  = '{stat: S_BUB, icode: I_NOP, ifun: '0, ra: R_NONE, rb: R_NONE, valc: '0};
  localparam e1_t E1_BUB = '{stat: S_BUB, icode: I_NOP, ifun: '0, vala: '0, alua: '0, alub: '0,
                             srca: R_NONE, dste: R_NONE, dstm: R_NONE};
  localparam e2_t E2_BUB = '{stat: S_BUB, icode: I_NOP, ifun: '0, vala: '0, lo: '0, carry: 1'b0,
                             ahi: '0, bhi: '0, srca: R_NONE, dste: R_NONE, dstm: R_NONE};
  localparam m_t  M_BUB  = '{stat: S_BUB, icode: I_NOP, vala: '0, vale: '0, dste: R_NONE, dstm: R_NONE};
  localparam w_t  W_BUB  = '{stat: S_BUB, vale: '0, valm: '0, dste: R_NONE, dstm: R_NONE};

  word_t pc;
  d_t    D, f_out;
  e1_t   E1, d_out;
  e2_t   E2, e1_out;
  m_t    M, e2_out;
  w_t    W, m_out;
  logic  stall, m_bubble, w_stall;

  // ---------------- Fetch ----------------
  logic [79:0] ibytes;
  logic        imem_err, f_regids, f_valc, f_ok;
  icode_t      f_icode;
  word_t       f_valp;

  y86_imem #(.BYTES(IMEM_BYTES), .BYTES_OUT(10)) u_imem (
    .clk, .addr(pc), .data(ibytes), .err(imem_err),
    .load_en, .load_addr, .load_data
  );

  always_comb begin
    f_icode  = icode_t'(ibytes[7:4]);
    f_regids = f_icode inside {I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_OPQ};
    f_valc   = f_icode inside {I_IRMOVQ, I_RMMOVQ, I_MRMOVQ};
    f_valp   = pc + 64'd1 + (f_regids ? 64'd1 : 64'd0) + (f_valc ? 64'd8 : 64'd0);
    f_out    = '{stat: S_AOK, icode: f_icode, ifun: ibytes[3:0], ra: ibytes[15:12],
                 rb: ibytes[11:8], valc: ibytes[79:16]};
    if (imem_err) begin
      f_out.stat  = S_ADR;
      f_out.icode = I_NOP;
    end else if (!(f_icode inside {I_HALT, I_NOP, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_OPQ}) ||
                 (f_icode == I_OPQ && ibytes[3:0] > 4'(A_XOR))) begin
      f_out.stat  = S_INS;
      f_out.icode = I_NOP;
    end else if (f_icode == I_HALT) begin
      f_out.stat = S_HLT;
    end
    if (!f_regids) begin
      f_out.ra = R_NONE;
      f_out.rb = R_NONE;
    end
    f_ok = (f_out.stat == S_AOK);
  end

  always_ff @(posedge clk) begin
    if (rst)                pc <= '0;
    else if (!stall && f_ok) pc <= f_valp;
  end

  // ---------------- Decode ----------------
  reg_t  srca, srcb, dste, dstm;
  word_t rvala, rvalb, fwda, fwdb, e2_vale, m_valm;
  logic  need_a, late_a;
  logic [3:0] fa, fb;
  reg_t  w_dste, w_dstm;

  always_comb begin
    srca   = (D.icode inside {I_OPQ, I_RMMOVQ}) ? D.ra : R_NONE;
    srcb   = (D.icode inside {I_OPQ, I_RMMOVQ, I_MRMOVQ}) ? D.rb : R_NONE;
    dste   = (D.icode inside {I_OPQ, I_IRMOVQ}) ? D.rb : R_NONE;
    dstm   = (D.icode == I_MRMOVQ) ? D.ra : R_NONE;
    late_a = (D.icode == I_RMMOVQ);
    need_a = (D.icode == I_OPQ);
  end

  y86_regfile u_rf (
    .clk, .rst, .srca, .srcb, .vala(rvala), .valb(rvalb),
    .dste(w_dste), .vale(W.vale), .dstm(w_dstm), .valm(W.valm)
  );

  // An excepting instruction writes no register.
  assign w_dste = stat_is_exc(W.stat) ? R_NONE : W.dste;
  assign w_dstm = stat_is_exc(W.stat) ? R_NONE : W.dstm;

  // Youngest ready value for register r; hit[] says which source gave it.
  function automatic word_t fwd(reg_t r, word_t rf, output logic [3:0] hit);
    hit = '0;
    if (r == R_NONE)      return rf;
    if (r == E2.dste)     begin hit[0] = 1'b1; return e2_vale; end
    if (r == M.dstm)      begin hit[1] = 1'b1; return m_valm;  end
    if (r == M.dste)      begin hit[2] = 1'b1; return M.vale;  end
    if (r == W.dstm)      begin hit[3] = 1'b1; return W.valm;  end
    if (r == W.dste)      begin hit[3] = 1'b1; return W.vale;  end
    return rf;
  endfunction

  // No value yet: the youngest writer is in E1, or is a load in E2.
  function automatic logic not_ready(reg_t r);
    return r != R_NONE && (r == E1.dste || r == E1.dstm || r == E2.dstm);
  endfunction

  always_comb begin
    fwda  = fwd(srca, rvala, fa);
    fwdb  = fwd(srcb, rvalb, fb);
    stall = not_ready(srcb) || (need_a && not_ready(srca));
    d_out = '{stat: D.stat, icode: D.icode, ifun: D.ifun, vala: fwda,
              alua: '0, alub: '0, srca: late_a ? srca : R_NONE, dste: dste, dstm: dstm};
    unique case (D.icode)
      I_OPQ:             begin d_out.alua = fwda;   d_out.alub = fwdb; end
      I_IRMOVQ:          begin d_out.alua = D.valc; d_out.alub = '0;   end
      I_RMMOVQ, I_MRMOVQ: begin d_out.alua = D.valc; d_out.alub = fwdb; end
      default:           ;
    endcase
    ev_stall = stall;
    ev_fwd   = (need_a ? fa : 4'b0) | fb;
  end

  // ---------------- Execute 1: low half ----------------
  logic [3:0] fn1;
  logic [32:0] lo_sum;

  always_comb begin
    fn1 = (E1.icode == I_OPQ) ? E1.ifun : 4'(A_ADD);
    lo_sum = '0;
    unique case (fn1)
      4'(A_SUB): lo_sum = {1'b0, E1.alub[31:0]} + {1'b0, ~E1.alua[31:0]} + 33'd1;
      4'(A_AND): lo_sum = {1'b0, E1.alub[31:0] & E1.alua[31:0]};
      4'(A_XOR): lo_sum = {1'b0, E1.alub[31:0] ^ E1.alua[31:0]};
      default:   lo_sum = {1'b0, E1.alub[31:0]} + {1'b0, E1.alua[31:0]};
    endcase
    e1_out = '{stat: E1.stat, icode: E1.icode, ifun: fn1, vala: E1.vala,
               lo: lo_sum[31:0], carry: lo_sum[32], ahi: E1.alua[63:32], bhi: E1.alub[63:32],
               srca: E1.srca, dste: E1.dste, dstm: E1.dstm};
  end

  // ---------------- Execute 2: high half, late store value ----------------
  logic [31:0] hi;
  word_t       e2_vala;

  always_comb begin
    unique case (E2.ifun)
      4'(A_SUB): hi = E2.bhi + ~E2.ahi + 32'(E2.carry);
      4'(A_AND): hi = E2.bhi & E2.ahi;
      4'(A_XOR): hi = E2.bhi ^ E2.ahi;
      default:   hi = E2.bhi + E2.ahi + 32'(E2.carry);
    endcase
    e2_vale = {hi, E2.lo};

    ev_fwd_late = 1'b0;
    e2_vala     = E2.vala;
    if (E2.srca != R_NONE) begin
      ev_fwd_late = 1'b1;
      if      (E2.srca == M.dstm) e2_vala = m_valm;
      else if (E2.srca == M.dste) e2_vala = M.vale;
      else if (E2.srca == W.dstm) e2_vala = W.valm;
      else if (E2.srca == W.dste) e2_vala = W.vale;
      else                        ev_fwd_late = 1'b0;
    end
    e2_out = '{stat: E2.stat, icode: E2.icode, vala: e2_vala, vale: e2_vale,
               dste: E2.dste, dstm: E2.dstm};
  end

  // ---------------- Memory ----------------
  logic  mem_rd, mem_wr, dmem_err;

  assign mem_rd = (M.icode == I_MRMOVQ);
  assign mem_wr = (M.icode == I_RMMOVQ);

  y86_dmem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .addr(M.vale), .rd(mem_rd), .wr(mem_wr), .wdata(M.vala),
    .rdata(m_valm), .err(dmem_err)
  );

  always_comb begin
    m_out = '{stat: dmem_err ? S_ADR : M.stat, vale: M.vale,
              valm: m_valm, dste: M.dste, dstm: M.dstm};
    m_bubble = stat_is_exc(m_out.stat) || stat_is_exc(W.stat);
    w_stall  = stat_is_exc(W.stat);
  end

  // ---------------- Pipeline registers and Stat ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      D    <= D_BUB;
      E1   <= E1_BUB;
      E2   <= E2_BUB;
      M    <= M_BUB;
      W    <= W_BUB;
      stat <= S_AOK;
    end else begin
      if (!stall) D <= f_out;
      E1 <= stall ? E1_BUB : d_out;
      E2 <= e1_out;
      M  <= m_bubble ? M_BUB : e2_out;
      if (!w_stall) W <= m_out;
      if (W.stat != S_BUB) stat <= W.stat;
    end
  end

endmodule
