// hera_regfile_tb: self-checking test of the HERA register file.
//
// Random writes and reads on all three ports against a shadow array kept in
// the testbench; checks that register 0 reads zero after writes to it, that a
// write is visible only after the clock edge, and that reset clears all.
module hera_regfile_tb;
  import hera_pkg::*;

  logic clk = 0, rst_n = 0;
  regnum_t ra1, ra2, ra3, wa;
  word_t   rd1, rd2, rd3, wd;
  logic    we;
  word_t   shadow [16];
  int checks = 0, failures = 0;

  hera_regfile dut (.clk, .rst_n, .ra1, .rd1, .ra2, .rd2, .ra3, .rd3, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input word_t got, input word_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    for (int i = 0; i < 16; i++) shadow[i] = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ra1 = regnum_t'(i); #1; chk(rd1, 16'h0, "after reset");
    end
    repeat (5000) begin
      @(negedge clk);
      we = 1'($urandom); wa = regnum_t'($urandom); wd = word_t'($urandom);
      ra1 = regnum_t'($urandom); ra2 = regnum_t'($urandom); ra3 = wa;
      #1;
      chk(rd1, shadow[ra1], "rd1");
      chk(rd2, shadow[ra2], "rd2");
      chk(rd3, shadow[ra3], "rd3 before edge");
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
      #1;
      chk(rd3, shadow[ra3], "rd3 after edge");
    end
    // reset clears
    @(negedge clk); we = 0; rst_n = 0; #1; rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ra2 = regnum_t'(i); #1; chk(rd2, 16'h0, "after second reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
