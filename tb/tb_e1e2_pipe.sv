// tb_e1e2_pipe: test of the six-stage pipeline with a split execute stage.
//
// Each program is loaded through the instruction-memory port, run until
// the Stat register leaves AOK, and compared with the reference model of
// y86_tb_pkg (registers, data memory, Stat). Timing is checked per
// instruction: a monitor records the cycle in which each instruction
// enters E1, and an independent timing model predicts it. In that model an
// instruction leaves decode one cycle after its predecessor, but not
// before an operand it needs in E1 is ready: two cycles after the decode
// of an ALU/irmovq writer, three after that of a load. The stored value of
// rmmovq never waits. Directed programs: the split-execute example
// sequence (decode in cycles 1, 3, 4, 5: one stall, none for the store),
// each forwarding source, a load feeding an ALU operation and a store,
// an address error and an invalid instruction; then random programs.
// Every stall and forwarding kind must occur at least once.
`timescale 1ns/1ps
module tb_e1e2_pipe;
  import y86_pkg::*;
  import y86_tb_pkg::*;

  localparam int unsigned DMEM = 1024;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       load_en = 1'b0;
  word_t      load_addr = '0;
  logic [7:0] load_data = '0;
  stat_t      stat;
  logic       ev_stall, ev_fwd_late;
  logic [3:0] ev_fwd;

  int checks = 0, failures = 0;
  int n_stall = 0, n_late = 0;
  int n_fwd[4] = '{0, 0, 0, 0};
  int e1_cyc[$];
  int cnt;

  e1e2_pipe #(.IMEM_BYTES(1024), .DMEM_BYTES(DMEM)) dut (
    .clk, .rst, .load_en, .load_addr, .load_data, .stat,
    .ev_stall, .ev_fwd, .ev_fwd_late
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    n_stall += int'(ev_stall);
    n_late  += int'(ev_fwd_late);
    for (int i = 0; i < 4; i++) n_fwd[i] += int'(ev_fwd[i]);
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

  // Load, reset and run; records the E1 entry cycle of every instruction.
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
    e1_cyc.delete();
    rst = 1'b0;
    cnt = 0;
    while (stat == S_AOK && cnt < 100000) begin
      @(negedge clk);
      cnt++;
      if (dut.E1.stat != S_BUB) e1_cyc.push_back(cnt);
    end
  endtask

  // Decode cycle of each of the first n instructions of prog.
  function automatic void timing(input logic [7:0] prog[$], int n, output int d[$]);
    int last_d[16];
    bit last_ld[16];
    int p, cur;
    icode_t ic;
    reg_t ra, rb;
    foreach (last_d[i]) begin last_d[i] = -10; last_ld[i] = 1'b0; end
    d.delete();
    p = 0;
    cur = 0;
    for (int k = 0; k < n; k++) begin
      ic = icode_t'(prog[p][7:4]);
      ra = prog[p + 1][7:4];
      rb = prog[p + 1][3:0];
      cur = cur + 1;
      if (ic == I_OPQ && ra != R_NONE) cur = (last_d[ra] + (last_ld[ra] ? 3 : 2) > cur) ? last_d[ra] + (last_ld[ra] ? 3 : 2) : cur;
      if ((ic inside {I_OPQ, I_RMMOVQ, I_MRMOVQ}) && rb != R_NONE)
        cur = (last_d[rb] + (last_ld[rb] ? 3 : 2) > cur) ? last_d[rb] + (last_ld[rb] ? 3 : 2) : cur;
      d.push_back(cur);
      if ((ic inside {I_OPQ, I_IRMOVQ}) && rb != R_NONE) begin last_d[rb] = cur; last_ld[rb] = 1'b0; end
      if (ic == I_MRMOVQ && ra != R_NONE)                begin last_d[ra] = cur; last_ld[ra] = 1'b1; end
      case (ic)
        I_OPQ:                        p += 2;
        I_IRMOVQ, I_RMMOVQ, I_MRMOVQ: p += 10;
        default:                      p += 1;
      endcase
    end
  endfunction

  // Run prog in both the pipeline and the model and compare.
  task automatic run_and_compare(y86_asm a, string name, bit verbose);
    y86_iss iss;
    int d[$];
    int stalls0, n;
    iss = new(DMEM);
    rst = 1'b1;
    @(negedge clk);
    for (int i = 0; i < int'(DMEM); i++) iss.m[i] = dut.u_dmem.mem[i];
    iss.run(a.b, 10000);
    stalls0 = n_stall;
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
    // timing: every instruction up to the one that stops the machine
    n = iss.n_instr;
    timing(a.b, n, d);
    check(e1_cyc.size() >= n, $sformatf("%s: %0d instructions reached E1, expected %0d",
                                        name, e1_cyc.size(), n));
    for (int k = 0; k < n && k < e1_cyc.size(); k++)
      check(e1_cyc[k] == d[k] + 1, $sformatf("%s: instruction %0d enters E1 in cycle %0d expected %0d",
                                             name, k, e1_cyc[k], d[k] + 1));
    check(n_stall - stalls0 == d[n - 1] - n,
          $sformatf("%s: %0d stall cycles expected %0d", name, n_stall - stalls0, d[n - 1] - n));
    check(cnt == d[n - 1] + 5, $sformatf("%s: stopped after %0d cycles expected %0d",
                                         name, cnt, d[n - 1] + 5));
    if (verbose) $display("%s: %0d instructions, %0d cycles, %0d stalls, stat %0d",
                          name, n, cnt, n_stall - stalls0, stat);
  endtask

  localparam reg_t RAX = 4'h0, RCX = 4'h1, RDX = 4'h2, RBX = 4'h3,
                   R8 = 4'h8, R9 = 4'h9, R10 = 4'hA, R11 = 4'hB;

  initial begin : main
    y86_asm a;
    int d[$];
    int late0;
    reg_t pool[6];
    pool = '{RAX, RCX, RDX, R8, R9, R10};

    // ---- the split-execute example sequence
    a = new;
    void'(a.irmovq(64'd5, RCX));
    void'(a.irmovq(64'd7, R9));
    void'(a.irmovq(64'd100, RAX));
    void'(a.irmovq(64'd64, RBX));
    for (int i = 0; i < 4; i++) void'(a.nop());
    void'(a.opq(A_ADD, RCX, R9));         // r9  = 12
    void'(a.opq(A_ADD, R9, RBX));         // rbx = 76: stalls once in decode
    void'(a.opq(A_ADD, RAX, R9));         // r9  = 112
    void'(a.rmmovq(R9, 0, RBX));          // mem[76] = 112, no stall
    void'(a.halt());
    late0 = n_late;
    run_and_compare(a, "split-execute example", 1'b1);
    check(dut.u_rf.regs[3] == 64'd76 && dut.u_rf.regs[9] == 64'd112, "split-execute example: registers");
    check({dut.u_dmem.mem[83], dut.u_dmem.mem[82], dut.u_dmem.mem[81], dut.u_dmem.mem[80],
           dut.u_dmem.mem[79], dut.u_dmem.mem[78], dut.u_dmem.mem[77], dut.u_dmem.mem[76]} == 64'd112,
          "split-execute example: stored value");
    check(n_late > late0, "split-execute example: store value picked up late");
    // the example's table: decode in cycles 1, 3, 4, 5 counted from the first addq
    timing(a.b, 13, d);
    check(d[9] - d[8] + 1 == 3 && d[10] - d[8] + 1 == 4 &&
          d[11] - d[8] + 1 == 5, "split-execute example: decode cycles 1, 3, 4, 5");

    // ---- each forwarding source and a load feeding an ALU op and a store
    a = new;
    void'(a.irmovq(64'd128, RBX));
    void'(a.irmovq(64'd3, R8));
    void'(a.nop());
    void'(a.opq(A_ADD, R8, R8));          // r8 = 6, E2 source for the next
    void'(a.nop());
    void'(a.opq(A_SUB, R8, R9));          // r9 = -6 (M register source for r8)
    void'(a.nop());
    void'(a.nop());
    void'(a.opq(A_XOR, R8, R10));         // W source
    void'(a.rmmovq(R9, 0, RBX));
    void'(a.mrmovq(0, RBX, R11));         // load
    void'(a.opq(A_AND, R11, R8));         // load/use: two stalls
    void'(a.mrmovq(0, RBX, RCX));
    void'(a.rmmovq(RCX, 8, RBX));         // load -> store value, no stall
    void'(a.mrmovq(0, RBX, RDX));
    void'(a.nop());
    void'(a.rmmovq(RDX, 16, RBX));        // load in W -> store value
    void'(a.mrmovq(0, RBX, RAX));
    void'(a.nop());
    void'(a.nop());
    void'(a.opq(A_ADD, RAX, RAX));        // memory output source
    void'(a.halt());
    run_and_compare(a, "sources", 1'b1);

    // ---- address error: the faulting load writes nothing, no later store
    a = new;
    void'(a.irmovq(64'd2000, RBX));
    void'(a.irmovq(64'd9, R8));
    void'(a.mrmovq(0, RBX, R8));
    void'(a.rmmovq(R8, 0, RAX));
    void'(a.halt());
    run_and_compare(a, "address error", 1'b1);
    check(stat == S_ADR && dut.u_rf.regs[8] == 64'd9, "address error: r8 kept");

    // ---- invalid instruction
    a = new;
    void'(a.irmovq(64'd1, R8));
    a.b.push_back(8'hC0);
    void'(a.irmovq(64'd2, R8));
    void'(a.halt());
    run_and_compare(a, "invalid", 1'b1);
    check(stat == S_INS, "invalid: Stat");

    // ---- OPq with a function code the subset does not have
    a = new;
    void'(a.opq(4'h7, R8, R9));
    void'(a.halt());
    run_prog(a.b);
    check(stat == S_INS, "OPq ifun 7: INS");

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

    // ---- every mechanism happened
    $display("stalls %0d, late store values %0d, forwards E2 %0d mem %0d M %0d W %0d",
             n_stall, n_late, n_fwd[0], n_fwd[1], n_fwd[2], n_fwd[3]);
    check(n_stall > 0, "a stall occurred");
    check(n_late > 0, "a late store value occurred");
    for (int i = 0; i < 4; i++) check(n_fwd[i] > 0, $sformatf("forwarding source %0d used", i));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
