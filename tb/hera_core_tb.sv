// hera_core_tb: self-checking test of the HERA core with testbench memories.
//
// Runs many random programs (every true instruction except CAL/RETURN/HALT
// in the body, forward-only branches, HALT at the end) and a directed
// call/return program, each on a fresh reset. After HALT it compares all
// registers, the flags, the PC, every data word the reference model wrote,
// and the number of cycles from reset to HALT, against hera_iss.
module hera_core_tb;
  import hera_pkg::*;
  import hera_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  word_t imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata, dbg_rd, pc;
  logic dmem_we, halted, retire, unimpl;
  regnum_t dbg_ra;
  flags_t flags;

  logic [15:0] imem [65536];
  logic [15:0] dmem [65536];

  int checks = 0, failures = 0;
  int unimpl_seen;

  hera_core dut (.clk, .rst_n, .imem_addr, .imem_rdata, .dmem_addr, .dmem_we, .dmem_wdata,
                 .dmem_rdata, .dbg_ra, .dbg_rd, .pc, .flags, .halted, .retire, .unimpl);

  always #5 clk = ~clk;

  // synchronous-read memories, as the core expects
  always @(posedge clk) begin
    imem_rdata <= imem[imem_addr];
    if (dmem_we) begin
      dmem[dmem_addr] <= dmem_wdata;
      dmem_rdata <= dmem_wdata;
    end else dmem_rdata <= dmem[dmem_addr];
  end

  always @(posedge clk) if (rst_n && unimpl) unimpl_seen++;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
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

  task automatic run_prog(hera_prog p, int max_cycles);
    hera_iss m;
    int cyc;
    m = new();
    p.resolve();
    m.load_prog(p);
    m.run(100000);
    for (int i = 0; i < 65536; i++) begin imem[i] = 16'h0100; dmem[i] = 16'h0; end
    foreach (p.code[i]) imem[i] = p.code[i];
    unimpl_seen = 0;
    rst_n = 0;
    @(negedge clk); rst_n = 1;
    cyc = 0;
    while (!halted && cyc < max_cycles) begin @(posedge clk); cyc++; #1; end
    chk(16'(cyc), 16'(m.cycles), "cycles to HALT");
    for (int i = 0; i < 16; i++) begin
      dbg_ra = regnum_t'(i); #1;
      chk(dbg_rd, m.rd(i), $sformatf("R%0d", i));
    end
    chk(pc, m.pc, "PC");
    chk({11'b0, flags}, m.f5(), "flags");
    foreach (m.dmem[a]) chk(dmem[a], m.dmem[a], $sformatf("M[%h]", a));
    chk(16'(unimpl_seen), 16'(m.cnt.exists("unimpl") ? m.cnt["unimpl"] : 0), "SWI/RTI count");
  endtask

  initial begin
    hera_prog p;
    dbg_ra = 0;
    // directed: nested call and return with a non-trivial frame
    p = new();
    p.set(SP, 16'h2000); p.set(FP, 16'h1ff0); p.set(OFP, 16'h1234);
    p.set(1, 16'h0042);
    p.call(12, 7, "f");
    p.emit(ADD(3, 1, 0));
    p.emit(HALT());
    p.label("f");
    p.emit(STORE(1, FP, OFP));
    p.emit(INC(1, 1));
    p.call(11, 3, "g");
    p.emit(LOAD(1, FP, OFP));
    p.emit(RETURN());
    p.label("g");
    p.emit(LSL(1, 2));
    p.emit(RETURN());
    run_prog(p, 1000);
    repeat (150) begin
      p = new();
      gen_random(p, 60);
      run_prog(p, 1000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
