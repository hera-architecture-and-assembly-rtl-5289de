// hera_flags_tb: self-checking test of the HERA flag register.
//
// Random arithmetic updates (per-flag enables, never touching carry-block)
// and masked SETF/RSTRF writes against a model kept in the testbench,
// including the CLCCB (mask 24, value 0) and SETCB (mask 16, value 16) idioms.
module hera_flags_tb;
  import hera_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] alu_we, alu_val;
  logic mask_we;
  logic [4:0] mask, mask_val;
  flags_t flags;
  logic [4:0] m;
  int checks = 0, failures = 0;

  hera_flags dut (.clk, .rst_n, .alu_we, .alu_val, .mask_we, .mask, .mask_val, .flags);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what);
    checks++;
    if (5'(flags) !== m) begin
      failures++;
      if (failures < 10) $display("FAIL %s: flags %b expected %b", what, flags, m);
    end
  endtask

  task automatic setf(input logic [4:0] mk, input logic [4:0] v);
    @(negedge clk); mask_we = 1; mask = mk; mask_val = v; alu_we = 4'($urandom);
    @(posedge clk); #1;
    for (int i = 0; i < 5; i++) if (mk[i]) m[i] = v[i];
    mask_we = 0;
    chk("setf");
  endtask

  initial begin
    alu_we = 0; alu_val = 0; mask_we = 0; mask = 0; mask_val = 0; m = 0;
    #12 rst_n = 1; #1 chk("reset");
    setf(5'd16, 5'd16);  // SETCB
    setf(5'd24, 5'd0);   // CLCCB
    repeat (5000) begin
      if ($urandom_range(0, 3) == 0) setf(5'($urandom), 5'($urandom));
      else begin
        @(negedge clk); alu_we = 4'($urandom); alu_val = 4'($urandom);
        @(posedge clk); #1;
        for (int i = 0; i < 4; i++) if (alu_we[i]) m[i] = alu_val[i];
        chk("alu update");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
