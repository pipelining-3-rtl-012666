// tb_addq_fwd_pipe: the four-stage addq pipeline.
// First the two-instruction example "addq %r8,%r9 ; addq %r9,%r8" with
// r8 = 800, r9 = 900 (and r_i = 100*i for the others) is checked cycle by
// cycle against the expected pipeline-register contents: the second
// instruction must see r9 = 1700 through forwarding, not the stale 900.
// Then random addq programs, where dependences at distance 1 and 2 are
// frequent, run to the end and every register is compared with a
// sequential model. Both forwarding paths must be used.
`timescale 1ns/1ps
module tb_addq_fwd_pipe;
  import y86_pkg::*;
  localparam int unsigned IMEM = 256;
  logic clk = 0, rst = 1;
  logic load_en = 0, rf_load_en = 0;
  word_t load_addr = '0, rf_load_val = '0, pc;
  logic [7:0] load_data = '0;
  reg_t rf_load_reg = R_NONE;
  logic ev_fwd_e, ev_fwd_w;
  int checks = 0, failures = 0, n_fe = 0, n_fw = 0;
  word_t model[15];

  addq_fwd_pipe #(.IMEM_BYTES(IMEM)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin n_fe += int'(ev_fwd_e); n_fw += int'(ev_fwd_w); end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // Load a program (pairs rA,rB), fill the rest with "addq none,none",
  // preload r_i = 100*i, release reset.
  task automatic setup(input reg_t ra[$], input reg_t rb[$]);
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < int'(IMEM); i += 2) begin
      int k = i / 2;
      load_en = 1;
      load_addr = 64'(i);     load_data = 8'h60;                 @(negedge clk);
      load_addr = 64'(i + 1);
      load_data = (k < ra.size()) ? {ra[k], rb[k]} : 8'hFF;      @(negedge clk);
    end
    load_en = 0;
    for (int r = 0; r < 15; r++) begin
      rf_load_en = 1; rf_load_reg = reg_t'(r); rf_load_val = 64'(100 * r);
      model[r] = 64'(100 * r);
      @(negedge clk);
    end
    rf_load_en = 0;
    rst = 0;
  endtask

  initial begin
    reg_t ra[$], rb[$];
    // ---- the lecture's example
    ra = '{4'd8, 4'd9};
    rb = '{4'd9, 4'd8};
    setup(ra, rb);
    // cycle 0: PC = 0
    chk(pc == 0, "cycle 0 PC");
    @(negedge clk);  // cycle 1
    chk(pc == 2 && dut.fd.ra == 8 && dut.fd.rb == 9, "cycle 1: PC 0x2, rA 8, rB 9");
    @(negedge clk);  // cycle 2
    chk(dut.de.vala == 800 && dut.de.valb == 900 && dut.de.dste == 9, "cycle 2: 800, 900, dstE 9");
    chk(dut.fd.ra == 9 && dut.fd.rb == 8, "cycle 2: rA 9, rB 8");
    chk(ev_fwd_e, "cycle 2: forward from execute");
    @(negedge clk);  // cycle 3
    chk(dut.de.vala == 1700, "cycle 3: R[srcA] forwarded = 1700");
    chk(dut.de.valb == 800 && dut.de.dste == 8, "cycle 3: R[srcB] 800, dstE 8");
    chk(dut.ew.vale == 1700 && dut.ew.dste == 9, "cycle 3: next R[dstE] 1700, dstE 9");
    @(negedge clk);  // cycle 4
    chk(dut.ew.vale == 2500 && dut.ew.dste == 8, "cycle 4: next R[dstE] 2500, dstE 8");
    chk(dut.u_rf.regs[9] == 1700, "r9 = 1700 written");
    @(negedge clk);
    chk(dut.u_rf.regs[8] == 2500, "r8 = 2500 written");

    // ---- random programs
    for (int t = 0; t < 30; t++) begin
      int n;
      ra.delete(); rb.delete();
      n = $urandom_range(5, 100);
      for (int i = 0; i < n; i++) begin
        ra.push_back(reg_t'($urandom_range(0, 4)));
        rb.push_back(reg_t'($urandom_range(0, 4)));
      end
      setup(ra, rb);
      for (int i = 0; i < n; i++) model[rb[i]] = model[rb[i]] + model[ra[i]];
      repeat (n + 6) @(negedge clk);
      for (int r = 0; r < 15; r++)
        chk(dut.u_rf.regs[r] == model[r], $sformatf("prog %0d r%0d", t, r));
    end
    $display("forwards: from execute %0d, from writeback %0d", n_fe, n_fw);
    chk(n_fe > 0 && n_fw > 0, "both forwarding paths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
