// addq_fwd_pipe: four-stage addq-only pipeline with forwarding.
//
// The smallest pipeline that shows a data hazard. Every instruction is a
// 2-byte "addq rA, rB" (R[rB] <- R[rA] + R[rB]); byte 0 is the opcode and
// byte 1 holds rA in its upper and rB in its lower nibble.
//   fetch:     PC register, "add 2", instruction memory, split into rA/rB
//   decode:    register file read of R[srcA], R[srcB] (srcA = rA,
//              srcB = rB, dstE = rB), then the forwarding multiplexers
//   execute:   ADD
//   writeback: register file write of next R[dstE]
// A back-to-back dependent addq would read the old register value in
// decode while the result it needs is only at the ADD output. The
// multiplexer in front of each operand of the decode/execute register
// therefore picks
//   ADD output (e_valE)                   if srcX == dstE in execute,
//   execute/writeback register (W_valE)   if srcX == dstE in writeback,
//   register file output                  otherwise.
// Forwarding from the ADD output is the lecture's; the second path from the
// writeback register is this design's: the register file is written at the
// clock edge that ends writeback, so without it an instruction two behind a
// producer would read the old value.
//
// The register file's dstM port, tied to "no register" (0xF) in the
// lecture's drawing, is used here only to preload register values through
// rf_load_* (for example r8 = 800, r9 = 900) while the pipeline is in
// reset; the register file itself is not cleared by rst. load_* writes the
// instruction memory one byte per clock. ev_fwd_e / ev_fwd_w pulse when an
// operand is forwarded from execute / writeback.
module addq_fwd_pipe
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_BYTES = 1024
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       load_en,
  input  word_t      load_addr,
  input  logic [7:0] load_data,
  input  logic       rf_load_en,
  input  reg_t       rf_load_reg,
  input  word_t      rf_load_val,
  output word_t      pc,
  output logic       ev_fwd_e,
  output logic       ev_fwd_w
);

  // fetch/decode register
  typedef struct packed {
    reg_t ra;
    reg_t rb;
  } fd_t;

  // decode/execute register
  typedef struct packed {
    word_t vala;
    word_t valb;
    reg_t  dste;
  } de_t;

  // execute/writeback register
  typedef struct packed {
    word_t vale;
    reg_t  dste;
  } ew_t;

  fd_t   fd;
  de_t   de;
  ew_t   ew;
  logic [15:0] ibytes;
  logic        imem_err;
  word_t       rvala, rvalb, e_vale, fwd_a, fwd_b;
  reg_t        srca, srcb;

  // Fetch.
  y86_imem #(.BYTES(IMEM_BYTES), .BYTES_OUT(2)) u_imem (
    .clk, .addr(pc), .data(ibytes), .err(imem_err),
    .load_en, .load_addr, .load_data
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pc <= '0;
      fd <= '{ra: R_NONE, rb: R_NONE};
    end else begin
      pc <= pc + 64'd2;
      // Split; past the end of memory nothing is fetched.
      fd <= imem_err ? '{ra: R_NONE, rb: R_NONE} : '{ra: ibytes[15:12], rb: ibytes[11:8]};
    end
  end

  // Decode.
  assign srca = fd.ra;
  assign srcb = fd.rb;

  y86_regfile u_rf (
    .clk, .rst(1'b0), .srca, .srcb, .vala(rvala), .valb(rvalb),
    .dste(ew.dste), .vale(ew.vale),
    .dstm(rf_load_en ? rf_load_reg : R_NONE), .valm(rf_load_val)
  );

  always_comb begin
    ev_fwd_e = 1'b0;
    ev_fwd_w = 1'b0;
    if (srca != R_NONE && srca == de.dste) begin
      fwd_a = e_vale;   ev_fwd_e = 1'b1;
    end else if (srca != R_NONE && srca == ew.dste) begin
      fwd_a = ew.vale;  ev_fwd_w = 1'b1;
    end else begin
      fwd_a = rvala;
    end
    if (srcb != R_NONE && srcb == de.dste) begin
      fwd_b = e_vale;   ev_fwd_e = 1'b1;
    end else if (srcb != R_NONE && srcb == ew.dste) begin
      fwd_b = ew.vale;  ev_fwd_w = 1'b1;
    end else begin
      fwd_b = rvalb;
    end
  end

  // Execute.
  assign e_vale = de.vala + de.valb;

  always_ff @(posedge clk) begin
    if (rst) begin
      de <= '{vala: '0, valb: '0, dste: R_NONE};
      ew <= '{vale: '0, dste: R_NONE};
    end else begin
      de <= '{vala: fwd_a, valb: fwd_b, dste: srcb};
      ew <= '{vale: e_vale, dste: de.dste};
    end
  end

endmodule
