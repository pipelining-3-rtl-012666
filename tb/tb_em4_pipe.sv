// tb_em4_pipe: test of the four-stage pipeline with execute and memory merged.
//
// Each program is loaded through the instruction-memory port, run until
// the Stat register leaves AOK, and compared with the reference model of
// y86_tb_pkg (registers, data memory, Stat). Since every result exists at
// the end of EM, no instruction ever waits: a monitor checks that
// instruction k enters EM in cycle k + 2 and that the machine stops 3
// cycles after the decode of the stopping instruction. Directed programs:
// the example "addq %rax,%r8; subq %rax,%r9; xorq %rax,%r10;
// andq %r8,%r11" (the andq takes r8 from the register file, with no
// forwarding), a load used at once by an ALU operation and by a store,
// forwarding from both sources, an address error and an invalid
// instruction; then random programs. Both forwarding sources must be used.
`timescale 1ns/1ps
module tb_em4_pipe;
  import y86_pkg::*;
  import y86_tb_pkg::*;

  localparam int unsigned DMEM = 1024;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       load_en = 1'b0;
  word_t      load_addr = '0;
  logic [7:0] load_data = '0;
  stat_t      stat;
  logic [1:0] ev_fwd;

  int checks = 0, failures = 0;
  int n_fwd[2] = '{0, 0};
  int em_cyc[$];
  logic [1:0] fwd_cyc[$];
  int cnt;

  em4_pipe #(.IMEM_BYTES(1024), .DMEM_BYTES(DMEM)) dut (
    .clk, .rst, .load_en, .load_addr, .load_data, .stat, .ev_fwd
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < 2; i++) n_fwd[i] += int'(ev_fwd[i]);
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Load, reset and run; records the EM entry cycle of every instruction
  // and the forwarding flags of every cycle (fwd_cyc[c - 1] for cycle c).
  task automatic run_prog(input logic [7:0] prog[$]);
    rst = 1'b1;
    @(negedge clk);
    for (int i = 0; i < prog.size() + 16; i++) begin
      load_en = 1'b1; load_addr = 64'(i);
      load_data = (i < prog.size()) ? prog[i] : 8'h00;
      @(negedge clk);
    end
    load_en = 1'b0;
    @(negedge clk);
    em_cyc.delete();
    fwd_cyc.delete();
    rst = 1'b0;
    cnt = 0;
    while (stat == S_AOK && cnt < 100000) begin
      @(negedge clk);
      cnt++;
      if (dut.EM.stat != S_BUB) em_cyc.push_back(cnt);
      fwd_cyc.push_back(ev_fwd);
    end
  endtask

  task automatic run_and_compare(y86_asm a, string name, bit verbose);
    y86_iss iss;
    int n;
    iss = new(DMEM);
    rst = 1'b1;
    @(negedge clk);
    for (int i = 0; i < int'(DMEM); i++) iss.m[i] = dut.u_dmem.mem[i];
    iss.run(a.b, 10000);
    run_prog(a.b);
    check(stat == iss.st, $sformatf("%s: stat %0d expected %0d", name, stat, iss.st));
    for (int i = 0; i < 15; i++)
      check(dut.u_rf.regs[i] == iss.r[i],
            $sformatf("%s: r%0d = %0h expected %0h", name, i, dut.u_rf.regs[i], iss.r[i]));
    for (int i = 0; i < int'(DMEM); i += 8) begin
      word_t v, e;
      for (int k = 0; k < 8; k++) begin
        v[8*k +: 8] = dut.u_dmem.mem[i + k];
        e[8*k +: 8] = iss.m[i + k];
      end
      check(v == e, $sformatf("%s: mem[%0d] = %0h expected %0h", name, i, v, e));
    end
    n = iss.n_instr;
    check(em_cyc.size() >= n, $sformatf("%s: %0d instructions reached EM, expected %0d",
                                        name, em_cyc.size(), n));
    for (int k = 0; k < n && k < em_cyc.size(); k++)
      check(em_cyc[k] == k + 2, $sformatf("%s: instruction %0d enters EM in cycle %0d expected %0d",
                                          name, k, em_cyc[k], k + 2));
    check(cnt == n + 3, $sformatf("%s: stopped after %0d cycles expected %0d", name, cnt, n + 3));
    if (verbose) $display("%s: %0d instructions, %0d cycles, stat %0d", name, n, cnt, stat);
  endtask

  localparam reg_t RAX = 4'h0, RCX = 4'h1, RDX = 4'h2, RBX = 4'h3,
                   R8 = 4'h8, R9 = 4'h9, R10 = 4'hA, R11 = 4'hB;

  initial begin : main
    y86_asm a;
    reg_t pool[6];
    pool = '{RAX, RCX, RDX, R8, R9, R10};

    // ---- the example: andq three behind addq needs no forwarding
    a = new;
    void'(a.irmovq(64'd1, RAX));          // 0
    void'(a.irmovq(64'd6, R8));           // 1
    void'(a.irmovq(64'hFF, R11));         // 2
    for (int i = 0; i < 3; i++) void'(a.nop());  // 3..5
    void'(a.opq(A_ADD, RAX, R8));         // 6: r8 = 7
    void'(a.opq(A_SUB, RAX, R9));         // 7
    void'(a.opq(A_XOR, RAX, R10));        // 8
    void'(a.opq(A_AND, R8, R11));         // 9: r11 = 7, r8 from the register file
    void'(a.halt());
    run_and_compare(a, "example", 1'b1);
    check(dut.u_rf.regs[11] == 64'd7, "example: r11 = 7");
    // instruction 9 is in decode in cycle 10
    check(fwd_cyc.size() > 10 && fwd_cyc[9] == 2'b00, "example: andq uses no forwarding");
    for (int c = 7; c <= 9; c++)
      check(fwd_cyc[c - 1] == 2'b00, $sformatf("example: no forwarding in cycle %0d", c));

    // ---- loads used at once, forwarding from both sources
    a = new;
    void'(a.irmovq(64'd200, RBX));
    void'(a.irmovq(64'd3, R8));
    void'(a.opq(A_ADD, R8, R8));          // EM source: r8 = 6
    void'(a.rmmovq(R8, 0, RBX));          // EM source for the data
    void'(a.mrmovq(0, RBX, R9));          // load
    void'(a.opq(A_ADD, R9, R9));          // load used at once: r9 = 12
    void'(a.mrmovq(0, RBX, R10));
    void'(a.rmmovq(R10, 8, RBX));         // load -> store value at once
    void'(a.mrmovq(8, RBX, RCX));
    void'(a.nop());
    void'(a.opq(A_XOR, RCX, RDX));        // W source (load)
    void'(a.irmovq(64'd5, RAX));
    void'(a.nop());
    void'(a.rmmovq(RAX, 16, RBX));        // W source (ALU)
    void'(a.halt());
    run_and_compare(a, "sources", 1'b1);
    check(dut.u_rf.regs[9] == 64'd12, "sources: load used at once");

    // ---- address error: nothing written after it
    a = new;
    void'(a.irmovq(64'd5000, RBX));
    void'(a.irmovq(64'd9, R8));
    void'(a.mrmovq(0, RBX, R8));
    void'(a.rmmovq(R8, 0, RAX));
    void'(a.irmovq(64'd1, R9));
    void'(a.halt());
    run_and_compare(a, "address error", 1'b1);
    check(stat == S_ADR && dut.u_rf.regs[8] == 64'd9, "address error: r8 kept");

    // ---- invalid instruction
    a = new;
    void'(a.irmovq(64'd1, R8));
    a.b.push_back(8'hE0);
    void'(a.irmovq(64'd2, R8));
    void'(a.halt());
    run_and_compare(a, "invalid", 1'b1);
    check(stat == S_INS, "invalid: Stat");

    // ---- random programs
    for (int t = 0; t < 200; t++) begin
      int n;
      a = new;
      void'(a.irmovq(64'($urandom_range(0, 64)) * 8, RBX));
      n = $urandom_range(5, 60);
      for (int k = 0; k < n; k++) begin
        int c;
        reg_t r1, r2;
        c  = $urandom_range(0, 9);
        r1 = pool[$urandom_range(0, 5)];
        r2 = pool[$urandom_range(0, 5)];
        if (c < 4)       void'(a.opq(4'($urandom_range(0, 3)), r1, r2));
        else if (c < 5)  void'(a.irmovq({$urandom, $urandom}, r2));
        else if (c < 6)  void'(a.irmovq(64'($urandom_range(0, 64)) * 8, RBX));
        else if (c < 7)  void'(a.rmmovq(r1, 64'($urandom_range(0, 32)) * 8, RBX));
        else if (c < 9)  void'(a.mrmovq(64'($urandom_range(0, 32)) * 8, RBX, r1));
        else             void'(a.nop());
      end
      void'(a.halt());
      run_and_compare(a, $sformatf("random %0d", t), 1'b0);
    end

    $display("forwards EM %0d W %0d", n_fwd[0], n_fwd[1]);
    for (int i = 0; i < 2; i++) check(n_fwd[i] > 0, $sformatf("forwarding source %0d used", i));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
