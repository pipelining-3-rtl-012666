// hazards_top: the four pipelines of this design, side by side.
//
// y86: the five-stage Y86-64 pipeline (y86_pipe) with forwarding, load/use
//   and ret stalls, always-taken jump prediction with squashing, and the
//   predicted-PC register. Ports y86_*.
// addq: the four-stage addq-only pipeline (addq_fwd_pipe) that introduces
//   forwarding. Ports aq_*.
// e1e2: the six-stage pipeline with execute split into E1 and E2
//   (e1e2_pipe), for a Y86-64 subset without jumps. Ports x6_*.
// em4: the four-stage pipeline with execute and memory merged (em4_pipe),
//   for the same subset. Ports e4_*.
// The four share the clock and reset and nothing else; each has its own
// instruction-memory load port. Timing is described in each module.
// The pipelines are the lecture design's; grouping them in one top with
// separate ports is this design's choice.
module hazards_top
  import y86_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // Y86-64 pipeline
  input  logic       y86_load_en,
  input  word_t      y86_load_addr,
  input  logic [7:0] y86_load_data,
  output stat_t      y86_stat,
  output cc_t        y86_cc,
  output logic       y86_ev_load_use,
  output logic       y86_ev_ret_stall,
  output logic       y86_ev_mispredict,
  output logic [4:0] y86_ev_fwd,
  // addq forwarding pipeline
  input  logic       aq_load_en,
  input  word_t      aq_load_addr,
  input  logic [7:0] aq_load_data,
  input  logic       aq_rf_load_en,
  input  reg_t       aq_rf_load_reg,
  input  word_t      aq_rf_load_val,
  output word_t      aq_pc,
  output logic       aq_ev_fwd_e,
  output logic       aq_ev_fwd_w,
  // six-stage pipeline with split execute
  input  logic       x6_load_en,
  input  word_t      x6_load_addr,
  input  logic [7:0] x6_load_data,
  output stat_t      x6_stat,
  output logic       x6_ev_stall,
  output logic [3:0] x6_ev_fwd,
  output logic       x6_ev_fwd_late,
  // four-stage pipeline with merged execute and memory
  input  logic       e4_load_en,
  input  word_t      e4_load_addr,
  input  logic [7:0] e4_load_data,
  output stat_t      e4_stat,
  output logic [1:0] e4_ev_fwd
);

  y86_pipe u_y86 (
    .clk, .rst,
    .load_en(y86_load_en), .load_addr(y86_load_addr), .load_data(y86_load_data),
    .stat(y86_stat), .cc(y86_cc),
    .ev_load_use(y86_ev_load_use), .ev_ret_stall(y86_ev_ret_stall),
    .ev_mispredict(y86_ev_mispredict), .ev_fwd(y86_ev_fwd)
  );

  addq_fwd_pipe u_addq (
    .clk, .rst,
    .load_en(aq_load_en), .load_addr(aq_load_addr), .load_data(aq_load_data),
    .rf_load_en(aq_rf_load_en), .rf_load_reg(aq_rf_load_reg), .rf_load_val(aq_rf_load_val),
    .pc(aq_pc), .ev_fwd_e(aq_ev_fwd_e), .ev_fwd_w(aq_ev_fwd_w)
  );

  e1e2_pipe u_e1e2 (
    .clk, .rst,
    .load_en(x6_load_en), .load_addr(x6_load_addr), .load_data(x6_load_data),
    .stat(x6_stat), .ev_stall(x6_ev_stall), .ev_fwd(x6_ev_fwd), .ev_fwd_late(x6_ev_fwd_late)
  );

  em4_pipe u_em4 (
    .clk, .rst,
    .load_en(e4_load_en), .load_addr(e4_load_addr), .load_data(e4_load_data),
    .stat(e4_stat), .ev_fwd(e4_ev_fwd)
  );

endmodule
