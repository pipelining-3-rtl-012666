// tb_hazards_top: end-to-end test of the four pipelines at their default sizes.
//
// Y86-64 pipeline:
//   1. a lone halt gives the pipeline's fill time;
//   2. a hazard program (every forwarding source, a load/use stall, a
//      predicted-right and a mispredicted jump, call/ret, a halt with code
//      behind it) is compared with the reference model, cycle count
//      included;
//   3. the instruction-mix workload: 100 instructions of which 3 are
//      conditional jumps not taken, 5 conditional jumps taken and 1 a ret,
//      the other 91 causing no stall. With always-taken prediction this
//      must take 3*3 + 5*1 + 1*4 + 91*1 = 109 cycles (1.09 cycles per
//      instruction); a stall-only pipeline would need 119.
//   4. an address error must stop the machine with Stat = ADR.
// addq pipeline, at the same time: the r8/r9 example and a dependent chain
// compared with a sequential model.
// Six-stage pipeline with split execute: the example sequence
// "addq %rcx,%r9; addq %r9,%rbx; addq %rax,%r9; rmmovq %r9,(%rbx)" after
// register set-up must stall exactly once, take the store value late, store
// the right value and stop after 13 instructions + 1 stall + 5 cycles.
// Four-stage pipeline with merged execute and memory, against the
// five-stage one: in "addq %rax,%r8; subq %rax,%r9; xorq %rax,%r10;
// andq %r8,%r11" the five-stage pipeline forwards r8 to the andq from its
// W register exactly once, the four-stage one forwards nothing; both get
// the same result, the four-stage one in one cycle per instruction.
// Every mechanism (each forwarding source, load/use, ret, mispredict,
// squash, halt, address error, both addq forwarding paths) is counted and
// must occur at least once.
`timescale 1ns/1ps
module tb_hazards_top;
  import y86_pkg::*;
  import y86_tb_pkg::*;

  localparam int unsigned Y86_IMEM = 1024;
  localparam int unsigned Y86_DMEM = 1024;
  localparam int unsigned AQ_IMEM  = 1024;

  logic clk = 0, rst = 1;
  logic y86_load_en = 0;
  word_t y86_load_addr = '0;
  logic [7:0] y86_load_data = '0;
  stat_t y86_stat;
  cc_t y86_cc;
  logic y86_ev_load_use, y86_ev_ret_stall, y86_ev_mispredict;
  logic [4:0] y86_ev_fwd;
  logic aq_load_en = 0, aq_rf_load_en = 0;
  word_t aq_load_addr = '0, aq_rf_load_val = '0, aq_pc;
  logic [7:0] aq_load_data = '0;
  reg_t aq_rf_load_reg = R_NONE;
  logic aq_ev_fwd_e, aq_ev_fwd_w;
  logic x6_load_en = 0;
  word_t x6_load_addr = '0;
  logic [7:0] x6_load_data = '0;
  stat_t x6_stat;
  logic x6_ev_stall, x6_ev_fwd_late;
  logic [3:0] x6_ev_fwd;
  bit x6_on = 0;
  logic e4_load_en = 0;
  word_t e4_load_addr = '0;
  logic [7:0] e4_load_data = '0;
  stat_t e4_stat;
  logic [1:0] e4_ev_fwd;
  bit e4_on = 0;
  int n_e4_fwd = 0;
  int n_x6_stall = 0, n_x6_late = 0, n_x6_fwd = 0;

  int checks = 0, failures = 0;
  int n_lu = 0, n_ret = 0, n_mis = 0, n_fwd[5] = '{0, 0, 0, 0, 0}, n_aq_e = 0, n_aq_w = 0;
  int n_halt = 0, n_adr = 0;
  int base;

  hazards_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    n_lu  += int'(y86_ev_load_use);
    n_ret += int'(y86_ev_ret_stall);
    n_mis += int'(y86_ev_mispredict);
    for (int i = 0; i < 5; i++) n_fwd[i] += int'(y86_ev_fwd[i]);
    n_aq_e += int'(aq_ev_fwd_e);
    n_aq_w += int'(aq_ev_fwd_w);
    if (x6_on) begin
      n_x6_stall += int'(x6_ev_stall);
      n_x6_late  += int'(x6_ev_fwd_late);
      n_x6_fwd   += int'(x6_ev_fwd != 0);
    end
    if (e4_on) n_e4_fwd += int'(e4_ev_fwd != 0);
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // Load a Y86 program (rest of memory: halt) and an addq program (rest:
  // addq with no registers), preload the addq registers with 100*i, then
  // release reset and run until the Y86 Stat register leaves AOK.
  task automatic run(input logic [7:0] prog[$], input logic [7:0] aq[$], output int cyc);
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < int'(Y86_IMEM); i++) begin
      y86_load_en = 1; y86_load_addr = 64'(i);
      y86_load_data = (i < prog.size()) ? prog[i] : 8'h00;
      aq_load_en = 1; aq_load_addr = 64'(i);
      aq_load_data = (i < aq.size()) ? aq[i] : ((i % 2 == 0) ? 8'h60 : 8'hFF);
      aq_rf_load_en = (i < 15); aq_rf_load_reg = reg_t'(i); aq_rf_load_val = 64'(100 * i);
      @(negedge clk);
    end
    y86_load_en = 0; aq_load_en = 0; aq_rf_load_en = 0;
    rst = 0;
    cyc = 0;
    while (y86_stat == S_AOK && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    n_halt += int'(y86_stat == S_HLT);
    n_adr  += int'(y86_stat == S_ADR);
  endtask

  task automatic compare(y86_asm a, input logic [7:0] aq[$], string name, output int cyc);
    y86_iss iss;
    iss = new(Y86_DMEM);
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < int'(Y86_DMEM); i++) iss.m[i] = dut.u_y86.u_dmem.mem[i];
    iss.run(a.b, 100000);
    run(a.b, aq, cyc);
    chk(y86_stat == iss.st, $sformatf("%s: Stat", name));
    for (int i = 0; i < 15; i++)
      chk(dut.u_y86.u_rf.regs[i] == iss.r[i], $sformatf("%s: r%0d", name, i));
    for (int i = 0; i < int'(Y86_DMEM); i++)
      chk(dut.u_y86.u_dmem.mem[i] == iss.m[i], $sformatf("%s: mem[%0d]", name, i));
    chk(y86_cc == iss.cc, $sformatf("%s: condition codes", name));
    chk(cyc == base - 1 + iss.cycles,
        $sformatf("%s: %0d cycles, expected %0d", name, cyc, base - 1 + iss.cycles));
    $display("%s: %0d instructions before the stopping one, %0d cycles after the fill time", name, iss.n_instr - 1, cyc - base);
  endtask

  // Load a program into the six-stage pipeline and run it until its Stat
  // register leaves AOK.
  task automatic run_x6(input logic [7:0] prog[$], output int cyc);
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < prog.size() + 16; i++) begin
      x6_load_en = 1; x6_load_addr = 64'(i);
      x6_load_data = (i < prog.size()) ? prog[i] : 8'h00;
      @(negedge clk);
    end
    x6_load_en = 0;
    x6_on = 1;
    rst = 0;
    cyc = 0;
    while (x6_stat == S_AOK && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    x6_on = 0;
  endtask

  // Same for the four-stage pipeline.
  task automatic run_e4(input logic [7:0] prog[$], output int cyc);
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < prog.size() + 16; i++) begin
      e4_load_en = 1; e4_load_addr = 64'(i);
      e4_load_data = (i < prog.size()) ? prog[i] : 8'h00;
      @(negedge clk);
    end
    e4_load_en = 0;
    e4_on = 1;
    rst = 0;
    cyc = 0;
    while (e4_stat == S_AOK && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    e4_on = 0;
  endtask

  localparam reg_t RAX = 0, RCX = 1, RDX = 2, RBX = 3, RSP = 4, RBP = 5, RSI = 6,
                   R8 = 8, R9 = 9, R10 = 10, R11 = 11, R12 = 12, R13 = 13;

  initial begin : main
    y86_asm a;
    logic [7:0] aq[$];
    int cyc, p;
    word_t m[15];

    // ---- 1. fill time
    a = new;
    void'(a.halt());
    aq = '{};
    run(a.b, aq, base);
    chk(y86_stat == S_HLT, "lone halt");

    // ---- 2. hazard program; addq: r8/r9 example then a dependent chain
    a = new;
    void'(a.irmovq(800, R8));
    void'(a.irmovq(900, R9));
    void'(a.opq(A_ADD, R8, R9));          // e_valE
    void'(a.opq(A_ADD, R9, R8));
    void'(a.irmovq(128, RBX));
    void'(a.rmmovq(R9, 0, RBX));
    void'(a.mrmovq(0, RBX, R10));         // load/use
    void'(a.opq(A_ADD, R10, R11));        // m_valM
    void'(a.nop());
    void'(a.opq(A_SUB, R10, R12));        // W_valM? (r10 load is older) / M_valE
    void'(a.mrmovq(0, RBX, R13));
    void'(a.nop());
    void'(a.nop());
    void'(a.opq(A_XOR, R13, RSI));        // W_valM
    void'(a.irmovq(7, RDX));
    void'(a.nop());
    void'(a.nop());
    void'(a.opq(A_AND, RDX, RCX));        // W_valE
    void'(a.irmovq(5, RCX));
    void'(a.nop());
    void'(a.opq(A_ADD, RCX, RDX));        // M_valE
    void'(a.irmovq(512, RSP));
    p = a.call(0);
    void'(a.opq(A_SUB, RAX, RAX));        // ZF = 1
    void'(a.jxx(C_E, 64'(a.here() + 9)));  // taken, predicted right
    void'(a.jxx(C_NE, 0));                // not taken: squash
    void'(a.irmovq(1, RBP));
    void'(a.halt());
    void'(a.irmovq(2, RBP));              // behind the halt: never runs
    a.patch64(p + 1, 64'(a.here()));
    void'(a.pushq(R8));
    void'(a.popq(RAX));
    void'(a.ret());
    // jne target: one past the end, never reached
    a.patch64(p + 1 + 9 + 2 + 9 + 1, 64'(a.here()));
    aq = '{8'h60, 8'h89, 8'h60, 8'h98, 8'h60, 8'h12, 8'h60, 8'h45, 8'h60, 8'h26, 8'h60, 8'h31};
    compare(a, aq, "hazard program", cyc);
    // addq pipeline against a sequential model
    for (int i = 0; i < 15; i++) m[i] = 64'(100 * i);
    for (int i = 0; i < aq.size(); i += 2) m[aq[i+1][3:0]] += m[aq[i+1][7:4]];
    for (int i = 0; i < 15; i++) chk(dut.u_addq.u_rf.regs[i] == m[i], $sformatf("addq r%0d", i));
    chk(m[9] == 1700 && m[8] == 2500, "addq example gives r9 = 1700, r8 = 2500");

    // ---- 3. instruction mix: 91 others, 5 taken jXX, 3 not-taken jXX, 1 ret
    a = new;
    void'(a.irmovq(800, RSP));            // 1 other
    void'(a.opq(A_XOR, RAX, RAX));        // 2: ZF = 1, codes stay so
    p = a.call(0);                        // 3
    for (int i = 0; i < 8; i++) begin
      if (i < 5) void'(a.jxx(C_E, 64'(a.here() + 9)));  // taken
      else       void'(a.jxx(C_NE, 64'(a.here() + 9))); // not taken
      for (int k = 0; k < 10; k++) begin
        if (k % 2 == 0) void'(a.irmovq(64'(k), reg_t'(6 + (k % 4))));
        else            void'(a.nop());
      end
    end                                   // 3 + 80 others
    for (int k = 0; k < 7; k++) void'(a.nop()); // 90 others
    void'(a.halt());
    a.patch64(p + 1, 64'(a.here()));
    void'(a.nop());                       // 91 others
    void'(a.ret());                       // 100 instructions before the halt
    aq = '{};
    compare(a, aq, "instruction mix", cyc);
    chk(cyc - base == 109, $sformatf("instruction mix: %0d cycles for 100 instructions, expected 109",
                                     cyc - base));
    $display("instruction mix: %0.2f cycles per instruction", real'(cyc - base) / 100.0);

    // ---- 4. address error
    a = new;
    void'(a.irmovq(64'h8000, RAX));
    void'(a.rmmovq(RAX, 0, RAX));
    void'(a.irmovq(1, RBX));
    void'(a.halt());
    compare(a, aq, "address error", cyc);
    chk(y86_stat == S_ADR, "Stat = ADR");

    // ---- 5. six-stage pipeline: the split-execute example
    a = new;
    void'(a.irmovq(64'd5, RCX));
    void'(a.irmovq(64'd7, R9));
    void'(a.irmovq(64'd100, RAX));
    void'(a.irmovq(64'd64, RBX));
    for (int i = 0; i < 4; i++) void'(a.nop());
    void'(a.opq(A_ADD, RCX, R9));         // r9  = 12
    void'(a.opq(A_ADD, R9, RBX));         // rbx = 76, one stall
    void'(a.opq(A_ADD, RAX, R9));         // r9  = 112
    void'(a.rmmovq(R9, 0, RBX));          // mem[76] = 112, no stall
    void'(a.halt());
    run_x6(a.b, cyc);
    chk(x6_stat == S_HLT, "six-stage: Stat = HLT");
    chk(dut.u_e1e2.u_rf.regs[3] == 64'd76 && dut.u_e1e2.u_rf.regs[9] == 64'd112,
        "six-stage: rbx = 76, r9 = 112");
    begin
      word_t v;
      for (int k = 0; k < 8; k++) v[8*k +: 8] = dut.u_e1e2.u_dmem.mem[76 + k];
      chk(v == 64'd112, $sformatf("six-stage: mem[76] = %0d, expected 112", v));
    end
    chk(n_x6_stall == 1, $sformatf("six-stage: %0d stall cycles, expected 1", n_x6_stall));
    chk(n_x6_late == 1, $sformatf("six-stage: %0d late store values, expected 1", n_x6_late));
    chk(cyc == 19, $sformatf("six-stage: %0d cycles, expected 19", cyc));
    $display("six-stage example: %0d cycles, %0d stall", cyc, n_x6_stall);

    // ---- 6. four stages against five: the addq ... andq example
    a = new;
    void'(a.irmovq(64'd1, RAX));
    void'(a.irmovq(64'd6, R8));
    void'(a.irmovq(64'hFF, R11));
    for (int i = 0; i < 4; i++) void'(a.nop());
    void'(a.opq(A_ADD, RAX, R8));         // r8 = 7
    void'(a.opq(A_SUB, RAX, R9));
    void'(a.opq(A_XOR, RAX, R10));
    void'(a.opq(A_AND, R8, R11));         // r11 = 7
    void'(a.halt());
    begin
      int w0, others0, others1;
      w0 = n_fwd[4];
      others0 = n_fwd[0] + n_fwd[1] + n_fwd[2] + n_fwd[3];
      aq = '{};
      compare(a, aq, "four vs five stages (five)", cyc);
      others1 = n_fwd[0] + n_fwd[1] + n_fwd[2] + n_fwd[3];
      chk(n_fwd[4] - w0 == 1 && others1 == others0,
          $sformatf("five stages: andq forwarded from W once (%0d), nothing else (%0d)",
                    n_fwd[4] - w0, others1 - others0));
      chk(dut.u_y86.u_rf.regs[11] == 64'd7, "five stages: r11 = 7");
    end
    run_e4(a.b, cyc);
    chk(e4_stat == S_HLT && dut.u_em4.u_rf.regs[11] == 64'd7, "four stages: r11 = 7");
    chk(n_e4_fwd == 0, $sformatf("four stages: %0d forwarding cycles, expected 0", n_e4_fwd));
    chk(cyc == 15, $sformatf("four stages: %0d cycles, expected 12 instructions + 3", cyc));
    $display("four-stage example: %0d cycles, %0d forwarding cycles", cyc, n_e4_fwd);

    $display("events: load/use %0d ret %0d mispredict %0d fwd %0d/%0d/%0d/%0d/%0d addq fwd E %0d W %0d halt %0d adr %0d",
             n_lu, n_ret, n_mis, n_fwd[0], n_fwd[1], n_fwd[2], n_fwd[3], n_fwd[4], n_aq_e, n_aq_w,
             n_halt, n_adr);
    chk(n_lu > 0, "load/use stall occurred");
    chk(n_ret > 0, "ret stall occurred");
    chk(n_mis > 0, "misprediction squash occurred");
    foreach (n_fwd[i]) chk(n_fwd[i] > 0, $sformatf("forwarding source %0d occurred", i));
    chk(n_aq_e > 0 && n_aq_w > 0, "addq forwarding paths occurred");
    chk(n_halt > 0 && n_adr > 0, "halt and address error occurred");
    chk(n_x6_stall > 0 && n_x6_late > 0 && n_x6_fwd > 0, "six-stage stall, late value and forwarding occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
