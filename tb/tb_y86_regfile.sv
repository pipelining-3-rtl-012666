// tb_y86_regfile: random reads and writes on both write ports, checked
// against a plain array. Checks that register 0xF reads as zero and is
// never written, that writes show only after the clock edge, that the M
// port wins when both ports name one register, and that reset clears all.
`timescale 1ns/1ps
module tb_y86_regfile;
  import y86_pkg::*;
  logic clk = 0, rst = 1;
  reg_t srca, srcb, dste, dstm;
  word_t vala, valb, vale, valm;
  word_t model[15];
  int checks = 0, failures = 0;

  y86_regfile dut (.*);

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
    dste = R_NONE; dstm = R_NONE; vale = '0; valm = '0; srca = 0; srcb = 0;
    @(negedge clk); rst = 0;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 15; i++) begin
      srca = reg_t'(i); #1;
      chk(vala == 0, "reset value");
    end
    for (int t = 0; t < 2000; t++) begin
      dste = reg_t'($urandom_range(0, 15));
      dstm = reg_t'($urandom_range(0, 15));
      vale = {$urandom, $urandom};
      valm = {$urandom, $urandom};
      srca = reg_t'($urandom_range(0, 15));
      srcb = reg_t'($urandom_range(0, 15));
      #1;
      chk(vala == ((srca == R_NONE) ? '0 : model[srca]), $sformatf("read A r%0d", srca));
      chk(valb == ((srcb == R_NONE) ? '0 : model[srcb]), $sformatf("read B r%0d", srcb));
      @(negedge clk);
      if (dste != R_NONE) model[dste] = vale;
      if (dstm != R_NONE) model[dstm] = valm;
    end
    // reset clears everything
    rst = 1; @(negedge clk); rst = 0;
    dste = R_NONE; dstm = R_NONE;
    for (int i = 0; i < 15; i++) begin
      srcb = reg_t'(i); #1;
      chk(valb == 0, "cleared by reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
