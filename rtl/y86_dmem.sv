// y86_dmem: byte-addressed data memory of the memory stage.
//
// Reads and writes 64-bit little-endian words at any byte address. The read
// is combinational; a write happens at the rising clock edge. err is raised
// when a read or write touches a byte outside the memory; an erroneous
// write changes nothing. The lecture only names memory reads and writes in
// the memory stage; the size, the separate data memory (apart from the
// instruction memory) and the error rule are this design's choices. The
// contents are not cleared at reset.
module y86_dmem
  import y86_pkg::*;
#(
  parameter int unsigned BYTES = 1024
) (
  input  logic  clk,
  input  word_t addr,
  input  logic  rd,
  input  logic  wr,
  input  word_t wdata,
  output word_t rdata,
  output logic  err
);

  localparam int unsigned AW = $clog2(BYTES);

  logic [7:0] mem [BYTES];
  logic       in_range;

  assign in_range = (addr <= 64'(BYTES - 8));
  assign err      = (rd || wr) && !in_range;

  always_ff @(posedge clk) begin
    if (wr && in_range)
      for (int i = 0; i < 8; i++) mem[AW'(addr[AW-1:0] + AW'(i))] <= wdata[8*i +: 8];
  end

  always_comb begin
    rdata = '0;
    if (in_range)
      for (int i = 0; i < 8; i++) rdata[8*i +: 8] = mem[AW'(addr[AW-1:0] + AW'(i))];
  end

endmodule
