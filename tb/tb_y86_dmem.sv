// tb_y86_dmem: random 64-bit stores and loads at any byte alignment,
// checked against a byte array; out-of-range accesses must raise err and
// an out-of-range store must change nothing.
`timescale 1ns/1ps
module tb_y86_dmem;
  import y86_pkg::*;
  localparam int unsigned BYTES = 128;
  logic clk = 0;
  word_t addr, wdata, rdata;
  logic rd, wr, err;
  logic [7:0] model[BYTES];
  int checks = 0, failures = 0;

  y86_dmem #(.BYTES(BYTES)) dut (.*);

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
    rd = 0; wr = 1;
    for (int i = 0; i < int'(BYTES); i += 8) begin
      addr = 64'(i); wdata = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) model[i + k] = wdata[8*k +: 8];
      @(negedge clk);
    end
    for (int t = 0; t < 3000; t++) begin
      word_t exp;
      logic ok;
      addr = ($urandom_range(0, 9) == 0) ? 64'(BYTES - 8 + $urandom_range(0, 20)) :
                                             64'($urandom_range(0, BYTES - 8));
      if (t == 5) addr = 64'hFFFF_FFFF_FFFF_FFF8;
      wr = $urandom_range(0, 1);
      rd = !wr;
      wdata = {$urandom, $urandom};
      ok = addr <= 64'(BYTES - 8);
      #1;
      chk(err == !ok, $sformatf("err at %0d", addr));
      if (rd && ok) begin
        for (int k = 0; k < 8; k++) exp[8*k +: 8] = model[addr + 64'(k)];
        chk(rdata == exp, $sformatf("load at %0d", addr));
      end
      @(negedge clk);
      if (wr && ok) for (int k = 0; k < 8; k++) model[addr + 64'(k)] = wdata[8*k +: 8];
    end
    // no access, no error
    rd = 0; wr = 0; addr = 64'hFFFF_0000; #1;
    chk(err == 0, "idle err");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
