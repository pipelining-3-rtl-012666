// tb_y86_pipe: end-to-end test of the five-stage Y86-64 pipeline.
//
// Each test resets the pipeline, loads a program through the instruction
// memory load port, runs until the Stat register leaves AOK and then
// compares registers, data memory, Stat and the cycle count with the
// reference model of y86_tb_pkg (cycle count = cycles of a lone halt +
// one per instruction + the hazard penalties). Directed programs exercise
// every forwarding source, the load/use stall, a predicted-right and a
// mispredicted jump, call/ret, cmov, push/pop, a halt followed by code
// that must not run, an address error and an invalid instruction; then
// random programs with forward jumps, calls, loads and stores run against the
// model. The standard example sequences are also run, and for each
// instruction the forwarding sources its decode used are compared with the
// ones worked out by hand. Every mechanism must occur at least once.
`timescale 1ns/1ps
module tb_y86_pipe;
  import y86_pkg::*;
  import y86_tb_pkg::*;

  localparam int unsigned DMEM = 1024;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       load_en = 1'b0;
  word_t      load_addr = '0;
  logic [7:0] load_data = '0;
  stat_t      stat;
  cc_t        cc;
  logic       ev_load_use, ev_ret_stall, ev_mispredict;
  logic [4:0] ev_fwd;

  int checks = 0, failures = 0;
  int n_load_use = 0, n_ret_stall = 0, n_mispredict = 0;
  int n_fwd[5] = '{0, 0, 0, 0, 0};
  int base_cycles;
  bit verbose = 1'b1;

  y86_pipe #(.IMEM_BYTES(1024), .DMEM_BYTES(DMEM)) dut (
    .clk, .rst, .load_en, .load_addr, .load_data, .stat, .cc,
    .ev_load_use, .ev_ret_stall, .ev_mispredict, .ev_fwd
  );

  always #5 clk = ~clk;

  // Forwarding flags of each instruction in decode (bubbles skipped).
  logic [4:0] d_log[$];
  always @(negedge clk) if (!rst && dut.D.stat != S_BUB) d_log.push_back(ev_fwd);

  always @(posedge clk) if (!rst) begin
    n_load_use   += int'(ev_load_use);
    n_ret_stall  += int'(ev_ret_stall);
    n_mispredict += int'(ev_mispredict);
    for (int i = 0; i < 5; i++) n_fwd[i] += int'(ev_fwd[i]);
  end

  initial begin
    #20_000_000;
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

  // Load, reset and run; returns cycles from reset release to Stat change.
  task automatic run_prog(input logic [7:0] prog[$], output int cyc);
    rst = 1'b1;
    @(negedge clk);
    for (int i = 0; i < prog.size(); i++) begin
      load_en = 1'b1; load_addr = 64'(i); load_data = prog[i];
      @(negedge clk);
    end
    // pad with halts so a runaway fetch stops
    for (int i = prog.size(); i < prog.size() + 16; i++) begin
      load_en = 1'b1; load_addr = 64'(i); load_data = 8'h00;
      @(negedge clk);
    end
    load_en = 1'b0;
    @(negedge clk);
    d_log.delete();
    rst = 1'b0;
    cyc = 0;
    while (stat == S_AOK && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  // Run prog in both the pipeline and the model and compare.
  task automatic run_and_compare(y86_asm a, string name);
    y86_iss iss;
    int cyc;
    iss = new(DMEM);
    // the model starts from the data memory's current contents
    rst = 1'b1;
    @(negedge clk);
    for (int i = 0; i < int'(DMEM); i++) iss.m[i] = dut.u_dmem.mem[i];
    iss.run(a.b, 10000);
    run_prog(a.b, cyc);
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
    if (verbose) $display("%s: %0d cycles, stat %0d, %0d instructions", name, cyc, stat, iss.n_instr);
    check(cc == iss.cc, $sformatf("%s: cc %b expected %b", name, cc, iss.cc));
    check(cyc == base_cycles + iss.cycles - 1,
          $sformatf("%s: %0d cycles expected %0d (instr %0d, mispred %0d, ret %0d, load/use %0d)",
                    name, cyc, base_cycles + iss.cycles - 1, iss.n_instr, iss.n_mispredict,
                    iss.n_ret, iss.n_load_use));
  endtask

  localparam reg_t RAX = 4'h0, RCX = 4'h1, RDX = 4'h2, RBX = 4'h3, RSP = 4'h4,
                   RBP = 4'h5, RSI = 4'h6, RDI = 4'h7, R8 = 4'h8, R9 = 4'h9,
                   R10 = 4'hA, R11 = 4'hB, R12 = 4'hC, R13 = 4'hD;

  // Run set-up + 4 nops + seq + halt; check each seq instruction's
  // forwarding sources (bits: e_valE, m_valM, M_valE, W_valM, W_valE).
  task automatic run_example(y86_asm a, int n_setup, input logic [4:0] exp[$], string name);
    run_and_compare(a, name);
    for (int k = 0; k < exp.size(); k++)
      check(d_log.size() > n_setup + 4 + k && d_log[n_setup + 4 + k] == exp[k],
            $sformatf("%s: instruction %0d forwarded %b expected %b", name, k + 1,
                      d_log[n_setup + 4 + k], exp[k]));
  endtask

  initial begin : main
    y86_asm a;
    int cyc, p, p2;

    // ---- lone halt: reference time
    a = new;
    void'(a.halt());
    run_prog(a.b, base_cycles);
    check(stat == S_HLT, "halt: Stat");
    $display("lone halt: %0d cycles", base_cycles);

    // ---- a loop: backward jne taken 4 times, then not taken
    a = new;
    void'(a.irmovq(5, RCX));
    void'(a.irmovq(1, RDX));
    void'(a.irmovq(0, RAX));
    p = a.opq(A_ADD, RCX, RAX);           // loop body: rax += rcx
    void'(a.opq(A_SUB, RDX, RCX));
    void'(a.jxx(C_NE, 64'(p)));
    void'(a.halt());
    run_and_compare(a, "loop");
    check(dut.u_rf.regs[0] == 64'd15, "loop: rax = 5+4+3+2+1");

    // ---- standard example sequences
    // addq %r8,%r9; subq %r9,%r11; mrmovq 4(%r11),%r10; rmmovq %r9,8(%r11);
    // xorq %r10,%r9: r9 from execute, r11 from execute, then r9 from W and
    // r11 from M, then r10 from the memory output.
    a = new;
    void'(a.irmovq(10, R8));
    void'(a.irmovq(20, R9));
    void'(a.irmovq(130, R11));
    for (int i = 0; i < 4; i++) void'(a.nop());
    void'(a.opq(A_ADD, R8, R9));          // r9  = 30
    void'(a.opq(A_SUB, R9, R11));         // r11 = 100
    void'(a.mrmovq(4, R11, R10));
    void'(a.rmmovq(R9, 8, R11));
    void'(a.opq(A_XOR, R10, R9));
    void'(a.halt());
    run_example(a, 3, '{5'b00000, 5'b00001, 5'b00001, 5'b10100, 5'b00010}, "some forwarding paths");
    // addq %r10,%r8; addq %r11,%r8; addq %r12,%r8: the youngest writer wins
    a = new;
    void'(a.irmovq(1, R8));
    void'(a.irmovq(10, R10));
    void'(a.irmovq(100, R11));
    void'(a.irmovq(1000, R12));
    for (int i = 0; i < 4; i++) void'(a.nop());
    void'(a.opq(A_ADD, R10, R8));
    void'(a.opq(A_ADD, R11, R8));
    void'(a.opq(A_ADD, R12, R8));         // r8 = 1111, from execute only
    void'(a.halt());
    run_example(a, 4, '{5'b00000, 5'b00001, 5'b00001}, "multiple forwarding paths 1");
    check(dut.u_rf.regs[8] == 64'd1111, "multiple forwarding paths 1: r8 = 1111");
    // addq %r10,%r8; addq %r11,%r12; addq %r12,%r8: one operand from
    // execute, the other from the M register
    a = new;
    void'(a.irmovq(1, R8));
    void'(a.irmovq(10, R10));
    void'(a.irmovq(100, R11));
    void'(a.irmovq(1000, R12));
    for (int i = 0; i < 4; i++) void'(a.nop());
    void'(a.opq(A_ADD, R10, R8));         // r8  = 11
    void'(a.opq(A_ADD, R11, R12));        // r12 = 1100
    void'(a.opq(A_ADD, R12, R8));         // r8  = 1111
    void'(a.halt());
    run_example(a, 4, '{5'b00000, 5'b00000, 5'b00101}, "multiple forwarding paths 2");
    check(dut.u_rf.regs[8] == 64'd1111, "multiple forwarding paths 2: r8 = 1111");
    // addq %rax,%rbx; subq %rax,%rcx; irmovq $100,%rcx; addq %rcx,%r10;
    // addq %rbx,%r10: the first addq is far enough from the last for the
    // register file; rcx comes from the irmovq (youngest), r10 from execute
    a = new;
    void'(a.irmovq(3, RAX));
    void'(a.irmovq(4, RBX));
    void'(a.irmovq(5, RCX));
    void'(a.irmovq(6, R10));
    for (int i = 0; i < 4; i++) void'(a.nop());
    void'(a.opq(A_ADD, RAX, RBX));        // rbx = 7
    void'(a.opq(A_SUB, RAX, RCX));        // rcx = 2
    void'(a.irmovq(100, RCX));            // rcx = 100
    void'(a.opq(A_ADD, RCX, R10));        // r10 = 106
    void'(a.opq(A_ADD, RBX, R10));        // r10 = 113
    void'(a.halt());
    run_example(a, 4, '{5'b00000, 5'b00000, 5'b00000, 5'b00001, 5'b00001}, "dependencies and hazards");
    check(dut.u_rf.regs[10] == 64'd113, "dependencies and hazards: r10 = 113");

    // ---- forwarding: every source, and the lecture's addq example
    a = new;
    void'(a.irmovq(800, R8));
    void'(a.irmovq(900, R9));
    void'(a.opq(A_ADD, R8, R9));          // r9 = 1700
    void'(a.opq(A_ADD, R9, R8));          // r8 = 2500 (needs e_valE)
    void'(a.irmovq(64, RBX));
    void'(a.rmmovq(R9, 8, RBX));          // mem[72] = 1700
    void'(a.mrmovq(8, RBX, R10));         // load/use: next instruction uses r10
    void'(a.opq(A_ADD, R10, R11));        // r11 = 1700 (m_valM after stall)
    void'(a.mrmovq(8, RBX, R12));
    void'(a.nop());
    void'(a.nop());
    void'(a.opq(A_ADD, R12, R13));        // W_valM
    void'(a.irmovq(5, RCX));
    void'(a.nop());
    void'(a.opq(A_SUB, RCX, R8));         // M_valE: r8 = 2495
    void'(a.irmovq(7, RDX));
    void'(a.nop());
    void'(a.nop());
    void'(a.opq(A_XOR, RDX, RCX));        // W_valE: rcx = 2
    void'(a.opq(A_AND, RCX, RDX));        // rdx = 2
    void'(a.halt());
    run_and_compare(a, "forwarding");
    check(dut.u_rf.regs[9] == 64'd1700 && dut.u_rf.regs[11] == 64'd1700, "addq example 1700");

    // ---- mispredicted jump: the two wrong-path instructions are squashed
    a = new;
    void'(a.irmovq(1, RAX));
    void'(a.opq(A_SUB, R8, R8));          // ZF = 1
    p = a.jxx(C_NE, 0);                   // predicted taken, actually not
    void'(a.irmovq(5, RCX));
    void'(a.halt());
    a.patch64(p + 1, 64'(a.here()));
    void'(a.irmovq(7, RDX));              // wrong path
    void'(a.irmovq(9, RSI));              // wrong path
    void'(a.halt());
    run_and_compare(a, "jne not taken");
    check(dut.u_rf.regs[2] == 0 && dut.u_rf.regs[6] == 0 && dut.u_rf.regs[1] == 5, "squash");

    // ---- predicted right
    a = new;
    void'(a.opq(A_SUB, R8, R8));
    p = a.jxx(C_E, 0);
    void'(a.irmovq(5, RCX));
    void'(a.halt());
    a.patch64(p + 1, 64'(a.here()));
    void'(a.irmovq(7, RDX));
    void'(a.halt());
    run_and_compare(a, "je taken");

    // ---- call / ret, push / pop, cmov
    a = new;
    void'(a.irmovq(512, RSP));
    void'(a.irmovq(33, RAX));
    void'(a.pushq(RAX));
    p = a.call(0);
    void'(a.popq(RBX));                   // rbx = 33
    void'(a.irmovq(1, RCX));
    void'(a.irmovq(2, RDX));
    void'(a.opq(A_SUB, RCX, RDX));        // 1 > 0: G
    void'(a.cmovxx(C_G, RCX, RSI));       // taken: rsi = 1
    void'(a.cmovxx(C_L, RCX, RDI));       // not taken: rdi stays 0
    void'(a.halt());
    a.patch64(p + 1, 64'(a.here()));
    void'(a.irmovq(4, R12));
    void'(a.popq(R13));                   // return address, then push it back
    void'(a.pushq(R13));
    void'(a.ret());
    run_and_compare(a, "call ret");

    // ---- halt: later instructions must not change anything
    a = new;
    void'(a.irmovq(3, RAX));
    void'(a.halt());
    void'(a.irmovq(4, RBX));
    void'(a.opq(A_ADD, RAX, RAX));
    run_and_compare(a, "halt");

    // ---- address error on a load: no register, CC or memory change after it
    a = new;
    void'(a.irmovq(64'h10000, RAX));
    void'(a.mrmovq(0, RAX, RBX));
    void'(a.opq(A_SUB, RAX, RAX));        // must not set ZF
    void'(a.rmmovq(RAX, 0, R8));          // must not store
    void'(a.halt());
    run_and_compare(a, "address error");
    check(stat == S_ADR, "ADR stat");

    // ---- invalid instruction
    a = new;
    void'(a.irmovq(3, RAX));
    a.b.push_back(8'hF0);
    void'(a.irmovq(4, RBX));
    run_and_compare(a, "invalid instruction");
    check(stat == S_INS, "INS stat");

    // ---- random programs
    verbose = 1'b0;
    for (int t = 0; t < 300; t++) begin
      int n;
      int unsigned fix[$];
      int tgt[$];
      int addr[$];
      int unsigned cfix[$];
      int csub[$];
      int unsigned sub_at[3];
      cfix.delete();
      csub.delete();
      fix.delete();
      tgt.delete();
      addr.delete();
      a = new;
      void'(a.irmovq(256, RBP));          // data base
      void'(a.irmovq(900, RSP));
      n = 40;
      for (int i = 0; i < n; i++) begin
        int k;
        reg_t ra, rb;
        word_t d;
        k  = $urandom_range(0, 12);
        ra = reg_t'($urandom_range(0, 3));
        rb = reg_t'($urandom_range(0, 3));
        d  = word_t'(8 * $urandom_range(0, 15));
        addr.push_back(int'(a.here()));
        case (k)
          0, 1:  void'(a.opq(4'($urandom_range(0, 3)), ra, rb));
          2:     void'(a.irmovq({$urandom, $urandom}, rb));
          3:     void'(a.rrmovq(ra, rb));
          4:     void'(a.cmovxx(4'($urandom_range(1, 6)), ra, rb));
          5:     void'(a.rmmovq(ra, d, RBP));
          6, 7:  void'(a.mrmovq(d, RBP, ra));
          8:     void'(a.pushq(ra));
          9:     void'(a.popq(ra));
          10, 11: begin
            fix.push_back(a.jxx(4'($urandom_range(0, 6)), 0));
            tgt.push_back(i + 1 + $urandom_range(1, 3));
          end
          12: begin
            cfix.push_back(a.call(0));
            csub.push_back($urandom_range(0, 2));
          end
        endcase
      end
      addr.push_back(int'(a.here()));
      void'(a.halt());
      for (int i = 0; i < 4; i++) begin addr.push_back(int'(a.here())); void'(a.halt()); end
      foreach (fix[j]) a.patch64(fix[j] + 1, 64'(addr[tgt[j] > n + 4 ? n + 4 : tgt[j]]));
      // three subroutines: a few ALU, move and memory instructions, then ret
      for (int f = 0; f < 3; f++) begin
        sub_at[f] = a.here();
        for (int i = 0; i < $urandom_range(0, 4); i++) begin
          reg_t ra, rb;
          ra = reg_t'($urandom_range(0, 3));
          rb = reg_t'($urandom_range(0, 3));
          case ($urandom_range(0, 3))
            0: void'(a.opq(4'($urandom_range(0, 3)), ra, rb));
            1: void'(a.irmovq(64'($urandom), rb));
            2: void'(a.mrmovq(word_t'(8 * $urandom_range(0, 15)), RBP, ra));
            3: void'(a.rmmovq(ra, word_t'(8 * $urandom_range(0, 15)), RBP));
          endcase
        end
        void'(a.ret());
      end
      foreach (cfix[j]) a.patch64(cfix[j] + 1, 64'(sub_at[csub[j]]));
      run_and_compare(a, $sformatf("random %0d", t));
    end

    $display("events: load/use %0d, ret wait %0d, mispredict %0d, fwd e_valE %0d m_valM %0d M_valE %0d W_valM %0d W_valE %0d",
             n_load_use, n_ret_stall, n_mispredict, n_fwd[0], n_fwd[1], n_fwd[2], n_fwd[3], n_fwd[4]);
    check(n_load_use > 0, "load/use stall happened");
    check(n_ret_stall > 0, "ret stall happened");
    check(n_mispredict > 0, "mispredict happened");
    foreach (n_fwd[i]) check(n_fwd[i] > 0, $sformatf("forwarding source %0d used", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
