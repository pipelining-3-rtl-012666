// y86_imem: byte-addressed instruction memory of the fetch stage.
//
// Returns, combinationally, the BYTES_OUT bytes starting at the fetch
// address, lowest address in bits [7:0] (Y86-64 is little-endian), so the
// fetch stage sees the whole of the longest (10-byte) instruction at once.
// err is raised when the address lies outside the memory; bytes past the
// end of the memory read as zero. The lecture only names this block
// ("Instr. Mem."); its size, the load port and the error rule are this
// design's choices. The load port writes one byte per clock edge and is how
// a program is placed in the memory before it runs.
module y86_imem
  import y86_pkg::*;
#(
  parameter int unsigned BYTES     = 1024,
  parameter int unsigned BYTES_OUT = 10
) (
  input  logic                     clk,
  input  word_t                    addr,
  output logic [8*BYTES_OUT-1:0]   data,
  output logic                     err,
  input  logic                     load_en,
  input  word_t                    load_addr,
  input  logic [7:0]               load_data
);

  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (load_en && (load_addr < 64'(BYTES))) mem[load_addr[$clog2(BYTES)-1:0]] <= load_data;
  end

  always_comb begin
    for (int i = 0; i < int'(BYTES_OUT); i++) begin
      word_t a;
      a = addr + 64'(i);
      data[8*i +: 8] = (a < 64'(BYTES)) ? mem[a[$clog2(BYTES)-1:0]] : 8'h00;
    end
  end

  assign err = (addr >= 64'(BYTES));

endmodule
