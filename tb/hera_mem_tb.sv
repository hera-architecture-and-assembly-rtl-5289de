// hera_mem_tb: self-checking test of the HERA word memory at its full 2^16
// word size: fills every word with a pattern, reads it all back (checking the
// one-cycle read latency), then does random writes and reads against a
// shadow copy.
module hera_mem_tb;
  logic clk = 0;
  logic [15:0] addr, wdata, rdata;
  logic we;
  logic [15:0] shadow [65536];
  int checks = 0, failures = 0;

  hera_mem dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] pat(int i);
    return 16'(i * 40503 + 7);
  endfunction

  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input int a);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL addr %h: got %h expected %h", a, got, exp);
    end
  endtask

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 65536; i++) begin
      @(negedge clk); we = 1; addr = 16'(i); wdata = pat(i); shadow[i] = pat(i);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 65536; i++) begin
      @(negedge clk); addr = 16'(i);
      @(posedge clk); #1 chk(rdata, shadow[i], i);
    end
    repeat (20000) begin
      @(negedge clk);
      we = 1'($urandom); addr = 16'($urandom); wdata = 16'($urandom);
      @(posedge clk); #1;
      if (we) begin
        shadow[addr] = wdata;
      end
      chk(rdata, shadow[addr], addr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
