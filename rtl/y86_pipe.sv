// y86_pipe: five-stage pipelined Y86-64 processor.
//
// Stages: fetch (instruction memory, most of the PC computation), decode
// (register file read, forwarding), execute (ALU, condition codes),
// memory (data memory read/write) and writeback (register file write,
// Stat register write). Five pipeline registers F, D, E, M, W sit in front
// of the stages; F holds only the predicted PC (reset value 0).
//
// Hazards are handled as follows:
//   - data: values waiting in later stages are forwarded to decode
//     (y86_decode); a load followed at once by a use costs one stall cycle;
//   - control, jumps: jumps are predicted taken; a jump found not taken in
//     execute squashes the two younger instructions and fetch restarts at
//     the fall-through address taken from the M register (3 cycles total);
//   - control, ret: fetch stalls until the ret reaches writeback and its
//     return address is used directly (4 cycles total);
//   - exceptions: the Stat register is written in writeback, so a halt or
//     error stops the machine only after every older instruction is done.
//
// Interface: load_* writes one instruction-memory byte per clock (use it
// while rst is high). stat is the Stat register (AOK while running). The
// event outputs pulse in each cycle a stall, a ret wait, a squash or a
// forward from each source occurs; cc shows the condition codes.
// Register-file writes happen at the clock edge ending writeback, memory
// writes at the edge ending memory.
//
// The memory-stage address and read/write selection and the separate
// instruction and data memories are this design's choices.
module y86_pipe
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
  output cc_t        cc,               // condition codes
  output logic       ev_load_use,
  output logic       ev_ret_stall,
  output logic       ev_mispredict,
  output logic [4:0] ev_fwd           // e_valE, m_valM, M_valE, W_valM, W_valE
);

  // Pipeline registers.
  freg_t F, f_next;
  dreg_t D, f_out;
  ereg_t E, d_out;
  mreg_t M, e_out;
  wreg_t W, m_out;

  // Control.
  logic f_stall, d_stall, d_bubble, e_bubble, m_bubble, w_stall, cc_en;

  // Fetch.
  word_t       f_pc;
  logic [79:0] ibytes;
  logic        imem_err;

  y86_imem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .addr(f_pc), .data(ibytes), .err(imem_err),
    .load_en, .load_addr, .load_data
  );

  y86_fetch u_fetch (
    .pred_pc(F.pred_pc), .m_icode(M.icode), .m_cnd(M.cnd), .m_vala(M.vala),
    .w_icode(W.icode), .w_valm(W.valm), .pc(f_pc), .ibytes, .imem_err,
    .f_out, .f_predpc(f_next.pred_pc)
  );

  y86_pipe_reg #(.T(freg_t), .BUBBLE(freg_t'(0))) u_freg (
    .clk, .rst, .stall(f_stall), .bubble(1'b0), .d(f_next), .q(F));
  y86_pipe_reg #(.T(dreg_t), .BUBBLE(D_BUBBLE)) u_dreg (
    .clk, .rst, .stall(d_stall), .bubble(d_bubble), .d(f_out), .q(D));

  // Decode.
  reg_t  d_srca, d_srcb;
  reg_t  w_dste, w_dstm;
  word_t rvala, rvalb;
  reg_t  e_dste;
  word_t e_vale, m_valm;
  logic  e_cnd;

  y86_regfile u_rf (
    .clk, .rst, .srca(d_srca), .srcb(d_srcb), .vala(rvala), .valb(rvalb),
    .dste(w_dste), .vale(W.vale), .dstm(w_dstm), .valm(W.valm)
  );

  // An instruction that failed (bad address, bad instruction) or halts
  // writes no register.
  assign w_dste = stat_is_exc(W.stat) ? R_NONE : W.dste;
  assign w_dstm = stat_is_exc(W.stat) ? R_NONE : W.dstm;

  y86_decode u_decode (
    .d(D), .srca(d_srca), .srcb(d_srcb), .rvala, .rvalb,
    .e_dste, .e_vale, .m_dstm(M.dstm), .m_valm, .m_dste(M.dste), .m_vale(M.vale),
    .w_dstm(W.dstm), .w_valm(W.valm), .w_dste(W.dste), .w_vale(W.vale), .d_out
  );

  y86_pipe_reg #(.T(ereg_t), .BUBBLE(E_BUBBLE)) u_ereg (
    .clk, .rst, .stall(1'b0), .bubble(e_bubble), .d(d_out), .q(E));

  // Execute.
  y86_execute u_exec (
    .clk, .rst, .e(E), .cc_en, .e_out, .e_dste, .e_vale, .e_cnd, .cc
  );

  y86_pipe_reg #(.T(mreg_t), .BUBBLE(M_BUBBLE)) u_mreg (
    .clk, .rst, .stall(1'b0), .bubble(m_bubble), .d(e_out), .q(M));

  // Memory.
  word_t mem_addr;
  logic  mem_rd, mem_wr, dmem_err;
  stat_t m_stat;

  always_comb begin
    unique case (M.icode)
      I_RMMOVQ, I_PUSHQ, I_CALL, I_MRMOVQ: mem_addr = M.vale;
      I_POPQ, I_RET:                       mem_addr = M.vala;
      default:                             mem_addr = '0;
    endcase
  end
  assign mem_rd = M.icode inside {I_MRMOVQ, I_POPQ, I_RET};
  assign mem_wr = M.icode inside {I_RMMOVQ, I_PUSHQ, I_CALL};

  y86_dmem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .addr(mem_addr), .rd(mem_rd), .wr(mem_wr), .wdata(M.vala),
    .rdata(m_valm), .err(dmem_err)
  );

  assign m_stat = dmem_err ? S_ADR : M.stat;

  always_comb begin
    m_out.stat  = m_stat;
    m_out.icode = M.icode;
    m_out.vale  = M.vale;
    m_out.valm  = m_valm;
    m_out.dste  = M.dste;
    m_out.dstm  = M.dstm;
  end

  y86_pipe_reg #(.T(wreg_t), .BUBBLE(W_BUBBLE)) u_wreg (
    .clk, .rst, .stall(w_stall), .bubble(1'b0), .d(m_out), .q(W));

  // Writeback: the Stat register (register file writes are in u_rf).
  always_ff @(posedge clk) begin
    if (rst)                  stat <= S_AOK;
    else if (W.stat != S_BUB) stat <= W.stat;
  end

  // Control.
  y86_hazard_ctrl u_ctrl (
    .d_icode(D.icode), .e_icode(E.icode), .e_dstm(E.dstm), .m_icode(M.icode),
    .d_srca, .d_srcb, .e_cnd, .m_stat, .w_stat(W.stat),
    .f_stall, .d_stall, .d_bubble, .e_bubble, .m_bubble, .w_stall, .cc_en,
    .load_use(ev_load_use), .ret_stall(ev_ret_stall), .mispredict(ev_mispredict)
  );

  // Control rules.
  // D is never told to hold and to squash in the same cycle.
  a_d_stall_xor_bubble: assert property (@(posedge clk) disable iff (rst) !(d_stall && d_bubble));
  // Once the machine has stopped, nothing more is stored to memory.
  a_no_store_after_stop: assert property (@(posedge clk) disable iff (rst)
                                          (stat != S_AOK) |-> !mem_wr);
  // An excepting instruction held in W keeps Stat unchanged.
  a_stat_stable: assert property (@(posedge clk) disable iff (rst)
                                  stat_is_exc(W.stat) |=> stat_is_exc(W.stat));

  // Forwarding events: which source fed valA or valB this cycle.
  function automatic logic hit(reg_t s, reg_t dst);
    return (s != R_NONE) && (s == dst);
  endfunction

  always_comb begin
    logic [4:0] a, b;
    a = '0;
    b = '0;
    if (hit(d_srca, e_dste))      a[0] = 1'b1;
    else if (hit(d_srca, M.dstm)) a[1] = 1'b1;
    else if (hit(d_srca, M.dste)) a[2] = 1'b1;
    else if (hit(d_srca, W.dstm)) a[3] = 1'b1;
    else if (hit(d_srca, W.dste)) a[4] = 1'b1;
    if (hit(d_srcb, e_dste))      b[0] = 1'b1;
    else if (hit(d_srcb, M.dstm)) b[1] = 1'b1;
    else if (hit(d_srcb, M.dste)) b[2] = 1'b1;
    else if (hit(d_srcb, W.dstm)) b[3] = 1'b1;
    else if (hit(d_srcb, W.dste)) b[4] = 1'b1;
    ev_fwd = (D.stat == S_BUB) ? 5'b0 : (a | b);
  end

endmodule
