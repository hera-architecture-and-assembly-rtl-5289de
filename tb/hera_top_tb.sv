// hera_top_tb: end-to-end test of the complete HERA processor at its default
// size (2^16-word instruction and data memories).
//
// Every program is loaded through the host port while the core is held in
// reset, run to HALT, and checked through the host and debug ports: all
// registers, the flags, the PC, each data word the reference model wrote, and
// the cycle count from reset to HALT.
//
// Programs: the single-precision sum idiom (carry-blocked), the
// double-precision add idiom (carry propagated between words), the times2
// function-call idiom with its stack frame, a recursive factorial (nested
// CAL/RETURN), a counting loop using CMP and the conditional-branch
// pseudo-instructions, and random programs. The results of the idioms are
// also checked against values worked out by hand. Each mechanism (carry used,
// carry blocked, carry out, borrow, overflow, each branch kind taken and not
// taken, CAL, RETURN, LOAD, STORE, multiply, one-bit and multi-bit shifts,
// SETF, SAVEF, RSTRF, dropped writes to R0, SWI/RTI, HALT) must occur at
// least once.
module hera_top_tb;
  import hera_pkg::*;
  import hera_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic host_en, host_sel, host_we;
  word_t host_addr, host_wdata, host_rdata, dbg_rd, pc;
  regnum_t dbg_ra;
  flags_t flags;
  logic halted, retire, unimpl;

  int checks = 0, failures = 0;
  int unimpl_seen, retired;
  int total[string];
  w16 mem_shadow[int];  // data memory contents carried from program to program

  hera_top dut (.clk, .rst_n, .host_en, .host_sel, .host_we, .host_addr, .host_wdata,
                .host_rdata, .dbg_ra, .dbg_rd, .pc, .flags, .halted, .retire, .unimpl);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (unimpl) unimpl_seen++;
    if (retire) retired++;
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic host_write(input logic sel, input word_t a, input word_t d);
    @(negedge clk); host_en = 1; host_sel = sel; host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_we = 0; host_en = 0;
  endtask

  task automatic host_read(input logic sel, input word_t a, output word_t d);
    @(negedge clk); host_en = 1; host_sel = sel; host_we = 0; host_addr = a;
    @(posedge clk); #1 d = host_rdata;
    @(negedge clk); host_en = 0;
  endtask

  // Runs p on the processor and the reference model; returns the model.
  task automatic run_prog(input hera_prog p, input string name, output hera_iss m);
    int cyc;
    word_t d;
    m = new();
    m.dmem = mem_shadow;
    p.resolve();
    m.load_prog(p);
    m.run(200000);
    rst_n = 0;
    foreach (p.code[i]) host_write(0, word_t'(i), p.code[i]);
    for (int i = 0; i < p.code.size(); i++) begin
      host_read(0, word_t'(i), d);
      chk(d, p.code[i], $sformatf("%s: program word %0d read back", name, i));
    end
    unimpl_seen = 0; retired = 0;
    @(negedge clk); rst_n = 1;
    cyc = 0;
    while (!halted && cyc < 100000) begin @(posedge clk); cyc++; #1; end
    chk(16'(cyc), 16'(m.cycles), {name, ": cycles to HALT"});
    chk(16'(retired), 16'(m.n_instr), {name, ": instructions retired"});
    for (int i = 0; i < 16; i++) begin
      dbg_ra = regnum_t'(i); #1;
      chk(dbg_rd, m.rd(i), $sformatf("%s: R%0d", name, i));
    end
    chk(pc, m.pc, {name, ": PC"});
    chk({11'b0, flags}, m.f5(), {name, ": flags"});
    checks++;
    if (!halted) begin
      failures++;
      $display("FAIL %s: no HALT within 100000 cycles", name);
      rst_n = 0;  // the host port may only be used while the core is stopped
    end
    foreach (m.dmem[a]) begin
      host_read(1, word_t'(a), d);
      chk(d, m.dmem[a], $sformatf("%s: M[%h]", name, a));
    end
    chk(16'(unimpl_seen), 16'(m.cnt.exists("unimpl") ? m.cnt["unimpl"] : 0), {name, ": SWI/RTI"});
    mem_shadow = m.dmem;
    foreach (m.cnt[k]) total[k] = (total.exists(k) ? total[k] : 0) + m.cnt[k];
    $display("%s: %0d instructions, %0d cycles", name, m.n_instr, cyc);
  endtask

  task automatic expect_reg(input int r, input word_t v, input string what);
    dbg_ra = regnum_t'(r); #1;
    chk(dbg_rd, v, what);
  endtask

  initial begin
    hera_prog p;
    hera_iss m;
    string need[$];
    host_en = 0; host_sel = 0; host_we = 0; host_addr = 0; host_wdata = 0; dbg_ra = 0;
    repeat (3) @(negedge clk);
    // the data memory has no reset: clear it once through the host port
    for (int i = 0; i < 65536; i++) host_write(1, word_t'(i), 16'h0000);

    // Single precision: R1 = R2 + R3 + R4 with the carry set but blocked.
    p = new();
    p.set(2, 16'hfff0); p.set(3, 16'h0020); p.set(4, 16'h1234);
    p.emit(SETF(8, 8));         // carry set: must be ignored
    p.setcb();
    p.emit(ADD(1, 0, 2));
    p.emit(ADD(1, 1, 3));       // carries out, blocked from the next add
    p.emit(ADD(1, 1, 4));
    p.emit(HALT());
    run_prog(p, "single-precision sum", m);
    expect_reg(1, 16'h1244, "single-precision sum R1");

    // Double precision: [R1 R2] = [R3 R4] + [R5 R6]
    p = new();
    // 0x7fff_ffff + 0x0000_0001: the low-word carry overflows the high word
    p.set(3, 16'h7fff); p.set(4, 16'hffff); p.set(5, 16'h0000); p.set(6, 16'h0001);
    p.clccb();
    p.emit(ADD(2, 4, 6));
    p.emit(ADD(1, 3, 5));
    p.emit(HALT());
    run_prog(p, "double-precision add", m);
    expect_reg(1, 16'h8000, "double-precision high word");
    expect_reg(2, 16'h0000, "double-precision low word");
    checks++;
    if (!(flags.v && !flags.c && flags.s && !flags.z)) begin
      failures++;
      $display("FAIL double-precision flags %b", flags);
    end

    // Function call with parameter and result on the stack (times2).
    p = new();
    p.setcb();
    p.set(SP, 16'h4000); p.set(FP, 16'h4000);
    p.set(1, 16'd21);
    p.emit(STORE(4, SP, 1));
    p.call(12, 5, "times2");
    p.emit(LOAD(3, SP, 2));
    p.emit(INC(2, 1));
    p.emit(HALT());
    p.label("times2");
    p.emit(STORE(1, FP, OFP));
    p.emit(INC(SP, 2));
    p.emit(STORE(6, FP, 1));
    p.emit(LOAD(4, FP, 1));
    p.emit(STORE(5, FP, 1));
    p.emit(ADD(1, 1, 1));
    p.emit(STORE(3, FP, 1));
    p.emit(LOAD(6, FP, 1));
    p.emit(LOAD(1, FP, OFP));
    p.emit(RETURN());
    run_prog(p, "times2 call", m);
    expect_reg(2, 16'd43, "times2: R2 = 2*R1+1");
    expect_reg(1, 16'd21, "times2: R1 preserved");
    expect_reg(SP, 16'h4000, "times2: SP restored");
    expect_reg(FP, 16'h4000, "times2: FP restored");

    // Recursive factorial of 7 (five-word frames, two saved registers).
    p = new();
    p.setcb();
    p.set(SP, 16'h8000); p.set(FP, 16'h8000);
    p.set(1, 7);
    p.emit(STORE(4, SP, 1));
    p.call(12, 5, "fact");
    p.emit(LOAD(3, SP, 2));
    p.emit(HALT());
    p.label("fact");
    p.emit(STORE(1, FP, OFP));
    p.emit(INC(SP, 2));
    p.emit(STORE(5, FP, 1));
    p.emit(STORE(6, FP, 2));
    p.emit(LOAD(4, FP, 1));
    p.cmp(1, 0);
    p.breq(12, "base");
    p.emit(ADD(2, 1, 0));
    p.emit(DEC(2, 1));
    p.emit(STORE(4, SP, 2));
    p.call(12, 5, "fact");
    p.emit(LOAD(3, SP, 2));
    p.emit(UMULLO(2, 1, 2));
    p.emit(STORE(3, FP, 2));
    p.jump(12, "done");
    p.label("base");
    p.emit(SETLO(2, 1));
    p.emit(STORE(3, FP, 2));
    p.label("done");
    p.emit(LOAD(5, FP, 1));
    p.emit(LOAD(6, FP, 2));
    p.emit(LOAD(1, FP, OFP));
    p.emit(RETURN());
    run_prog(p, "recursive factorial", m);
    expect_reg(2, 16'd5040, "factorial 7");

    // Loop: sum of 1..100, with flags saved and restored around a shift,
    // a 32-bit product, NEG, FLAGS and the compare-and-branch idioms.
    p = new();
    p.setcb();
    p.zero(1); p.set(2, 100); p.set(3, 1);
    p.label("loop");
    p.emit(ADD(1, 1, 3));
    p.emit(INC(3, 1));
    p.cmp(3, 2);
    p.brlt(12, "loop");
    p.breq(12, "loop");
    p.emit(SAVEF(4));
    p.emit(LSL(1, 3));
    p.emit(LSR(1, 3));
    p.emit(RSTRF(4));
    p.set(5, 16'hbeef); p.set(6, 16'h1234);
    p.emit(UMULHI(7, 5, 6)); p.emit(UMULLO(8, 5, 6));
    p.emit(ADD(9, 5, 0)); p.neg(9);
    p.flags(9);
    p.brge(12, "skip");
    p.emit(NOT(9));
    p.label("skip");
    p.brne(12, "end");
    p.emit(SETLO(10, 8'h99));
    p.label("end");
    p.emit(SWI()); p.emit(RTI()); p.emit(NOP());
    p.emit(HALT());
    run_prog(p, "counted loop", m);
    expect_reg(1, 16'd5050, "sum 1..100");
    expect_reg(7, 16'h0d93, "UMULHI beef*1234");
    expect_reg(8, 16'h968c, "UMULLO beef*1234");

    for (int i = 0; i < 40; i++) begin
      p = new();
      gen_random(p, 60);
      run_prog(p, $sformatf("random %0d", i), m);
    end

    need = '{"carry_blocked", "carry_in_used", "carry_out", "borrow_out", "overflow",
             "branch0_taken", "branch0_not_taken", "branch1_taken", "branch1_not_taken",
             "branch2_taken", "branch2_not_taken", "call", "return", "load", "store",
             "multiply", "logic", "shift_one", "shift_multi", "setf", "savef", "rstrf",
             "r0_write_dropped", "unimpl", "nop", "halt"};
    foreach (need[i]) begin
      checks++;
      if (!total.exists(need[i]) || total[need[i]] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", need[i]);
      end else $display("mechanism %-18s %0d times", need[i], total[need[i]]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
