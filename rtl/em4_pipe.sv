// em4_pipe: four-stage Y86-64 subset pipeline with execute and memory merged.
//
// Stages: F (fetch), D (decode), EM (ALU and data memory in one stage), W
// (writeback). Instructions: halt, nop, irmovq, rmmovq, mrmovq and OPq
// (add, sub, and, xor). There are no jumps; fetch steps to the next
// instruction, and on a halt, an unknown instruction or a fetch past memory
// it stops and repeats it.
//
// Because a load reads memory in the same stage that computes its address,
// every result, ALU or load, exists at the end of EM. Decode therefore
// never stalls: it forwards from the EM stage (ALU output or memory output)
// for the instruction directly ahead and from the W register for the one
// two ahead. An instruction three or more behind its producer reads the
// register file, which was written at the end of the producer's W stage.
// So in "addq %rax,%r8; subq %rax,%r9; xorq %rax,%r10; andq %r8,%r11" the
// andq needs no forwarding here, while the five-stage pipeline must forward
// r8 from its W register.
//
// Exceptions: status travels with the instruction, the Stat register is
// written in W, an excepting instruction writes no register, and once one
// has reached EM no later instruction enters EM. There are no condition
// codes, since no instruction here reads them.
//
// Interface: load_* writes one instruction-memory byte per clock (use it
// while rst is high). stat is the Stat register. ev_fwd[1:0] pulses when an
// operand comes from the EM stage / the W register.
//
// The merged stage follows the lecture design; the subset and the rest
// are this design's choices, shared with the other pipelines here.
module em4_pipe
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
  output logic [1:0] ev_fwd            // EM stage, W register
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
    reg_t       dste;
    reg_t       dstm;
  } em_t;

  typedef struct packed {
    stat_t  stat;
    word_t  vale;
    word_t  valm;
    reg_t   dste;
    reg_t   dstm;
  } w_t;

  localparam d_t  D_BUB  = '{stat: S_BUB, icode: I_NOP, ifun: '0, ra: R_NONE, rb: R_NONE, valc: '0};
  localparam em_t EM_BUB = '{stat: S_BUB, icode: I_NOP, ifun: '0, vala: '0, alua: '0, alub: '0,
                             dste: R_NONE, dstm: R_NONE};
  localparam w_t  W_BUB  = '{stat: S_BUB, vale: '0, valm: '0, dste: R_NONE, dstm: R_NONE};

  word_t pc;
  d_t    D, f_out;
  em_t   EM, d_out;
  w_t    W, em_out;
  logic  em_bubble, w_stall;

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
    if (rst)       pc <= '0;
    else if (f_ok) pc <= f_valp;
  end

  // ---------------- Decode ----------------
  reg_t  srca, srcb, dste, dstm, w_dste, w_dstm;
  word_t rvala, rvalb, fwda, fwdb, em_vale, em_valm;
  logic [1:0] fa, fb;

  always_comb begin
    srca = (D.icode inside {I_OPQ, I_RMMOVQ}) ? D.ra : R_NONE;
    srcb = (D.icode inside {I_OPQ, I_RMMOVQ, I_MRMOVQ}) ? D.rb : R_NONE;
    dste = (D.icode inside {I_OPQ, I_IRMOVQ}) ? D.rb : R_NONE;
    dstm = (D.icode == I_MRMOVQ) ? D.ra : R_NONE;
  end

  y86_regfile u_rf (
    .clk, .rst, .srca, .srcb, .vala(rvala), .valb(rvalb),
    .dste(w_dste), .vale(W.vale), .dstm(w_dstm), .valm(W.valm)
  );

  // An excepting instruction writes no register.
  assign w_dste = stat_is_exc(W.stat) ? R_NONE : W.dste;
  assign w_dstm = stat_is_exc(W.stat) ? R_NONE : W.dstm;

  // Youngest value for register r; hit[] says which stage gave it.
  function automatic word_t fwd(reg_t r, word_t rf, output logic [1:0] hit);
    hit = '0;
    if (r == R_NONE)  return rf;
    if (r == EM.dstm) begin hit[0] = 1'b1; return em_valm; end
    if (r == EM.dste) begin hit[0] = 1'b1; return em_vale; end
    if (r == W.dstm)  begin hit[1] = 1'b1; return W.valm;  end
    if (r == W.dste)  begin hit[1] = 1'b1; return W.vale;  end
    return rf;
  endfunction

  always_comb begin
    fwda  = fwd(srca, rvala, fa);
    fwdb  = fwd(srcb, rvalb, fb);
    d_out = '{stat: D.stat, icode: D.icode, ifun: D.ifun, vala: fwda,
              alua: '0, alub: '0, dste: dste, dstm: dstm};
    unique case (D.icode)
      I_OPQ:              begin d_out.alua = fwda;   d_out.alub = fwdb; end
      I_IRMOVQ:           begin d_out.alua = D.valc; d_out.alub = '0;   end
      I_RMMOVQ, I_MRMOVQ: begin d_out.alua = D.valc; d_out.alub = fwdb; end
      default:            ;
    endcase
    ev_fwd = fa | fb;
  end

  // ---------------- Execute + memory ----------------
  logic mem_rd, mem_wr, dmem_err;

  always_comb begin
    if (EM.icode != I_OPQ) em_vale = EM.alub + EM.alua;
    else unique case (EM.ifun)
      4'(A_SUB): em_vale = EM.alub - EM.alua;
      4'(A_AND): em_vale = EM.alub & EM.alua;
      4'(A_XOR): em_vale = EM.alub ^ EM.alua;
      default:   em_vale = EM.alub + EM.alua;
    endcase
  end

  assign mem_rd = (EM.icode == I_MRMOVQ);
  assign mem_wr = (EM.icode == I_RMMOVQ);

  y86_dmem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .addr(em_vale), .rd(mem_rd), .wr(mem_wr), .wdata(EM.vala),
    .rdata(em_valm), .err(dmem_err)
  );

  always_comb begin
    em_out = '{stat: dmem_err ? S_ADR : EM.stat, vale: em_vale, valm: em_valm,
               dste: EM.dste, dstm: EM.dstm};
    em_bubble = stat_is_exc(em_out.stat) || stat_is_exc(W.stat);
    w_stall   = stat_is_exc(W.stat);
  end

  // ---------------- Pipeline registers and Stat ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      D    <= D_BUB;
      EM   <= EM_BUB;
      W    <= W_BUB;
      stat <= S_AOK;
    end else begin
      D  <= f_out;
      EM <= em_bubble ? EM_BUB : d_out;
      if (!w_stall) W <= em_out;
      if (W.stat != S_BUB) stat <= W.stat;
    end
  end

endmodule
