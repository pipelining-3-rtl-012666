// tb_y86_pipe_reg: random d, stall and bubble against a one-line model:
// reset or bubble loads the bubble value, stall holds, else q follows d.
`timescale 1ns/1ps
module tb_y86_pipe_reg;
  logic clk = 0, rst = 1, stall = 0, bubble = 0;
  logic [15:0] d, q, model;
  int checks = 0, failures = 0;
  int n_stall = 0, n_bubble = 0;

  y86_pipe_reg #(.T(logic [15:0]), .BUBBLE(16'hB0B0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    @(negedge clk);
    checks++; if (q !== 16'hB0B0) begin failures++; $display("FAIL reset"); end
    model = 16'hB0B0;
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      d = 16'($urandom);
      stall = ($urandom_range(0, 3) == 0);
      bubble = ($urandom_range(0, 4) == 0);
      rst = ($urandom_range(0, 50) == 0);
      @(negedge clk);
      if (rst || bubble) begin model = 16'hB0B0; n_bubble++; end
      else if (!stall) model = d;
      else n_stall++;
      checks++;
      if (q !== model) begin failures++; $display("FAIL t=%0d q=%h exp=%h", t, q, model); end
    end
    checks++; if (n_stall == 0 || n_bubble == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
