// y86_regfile: the 15-entry, 64-bit register file of the pipeline.
//
// Two combinational read ports (srcA, srcB) and two write ports (dstE for
// ALU results, dstM for loaded values), as drawn in the lecture's register
// file box. Register number 0xF means "no register": it reads as zero and
// a write to it is dropped. Writes take effect at the rising clock edge at
// the end of the writeback cycle, so a read in the same cycle still returns
// the old value; the pipeline covers that case by forwarding. When both
// write ports name the same register, the M port wins (a popq %rsp keeps
// the loaded value), which is this design's choice. Reset clears all
// registers; the lecture does not say what they start at.
module y86_regfile
  import y86_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  reg_t  srca,
  input  reg_t  srcb,
  output word_t vala,
  output word_t valb,
  input  reg_t  dste,
  input  word_t vale,
  input  reg_t  dstm,
  input  word_t valm
);

  word_t regs [15];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 15; i++) regs[i] <= '0;
    end else begin
      if (dste != R_NONE) regs[dste] <= vale;
      if (dstm != R_NONE) regs[dstm] <= valm;
    end
  end

  assign vala = (srca == R_NONE) ? '0 : regs[srca];
  assign valb = (srcb == R_NONE) ? '0 : regs[srcb];

endmodule
