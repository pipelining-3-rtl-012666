// tb_y86_imem: loads random bytes through the load port and reads 10-byte
// windows at random addresses, including ones that run past the end
// (missing bytes read as zero) and ones outside the memory (err).
`timescale 1ns/1ps
module tb_y86_imem;
  import y86_pkg::*;
  localparam int unsigned BYTES = 256;
  logic clk = 0;
  word_t addr, load_addr;
  logic [79:0] data;
  logic err, load_en;
  logic [7:0] load_data;
  logic [7:0] model[BYTES];
  int checks = 0, failures = 0;

  y86_imem #(.BYTES(BYTES)) dut (.*);

  always #5 clk = ~clk;

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
    addr = 0;
    load_en = 1;
    for (int i = 0; i < int'(BYTES); i++) begin
      load_addr = 64'(i);
      load_data = 8'($urandom);
      model[i] = load_data;
      @(negedge clk);
    end
    // a write outside the memory changes nothing
    load_addr = 64'(BYTES); load_data = 8'hAA; @(negedge clk);
    load_en = 0;
    for (int t = 0; t < 1000; t++) begin
      logic [79:0] exp;
      addr = (t < 20) ? 64'(BYTES - 10 + t) : 64'($urandom_range(0, BYTES - 1));
      if (t == 999) addr = 64'h1_0000_0000;
      #1;
      for (int k = 0; k < 10; k++)
        exp[8*k +: 8] = (addr + 64'(k) < 64'(BYTES)) ? model[addr + 64'(k)] : 8'h00;
      chk(err == (addr >= 64'(BYTES)), $sformatf("err at %0d", addr));
      if (!err) chk(data == exp, $sformatf("data at %0d: %h vs %h", addr, data, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
