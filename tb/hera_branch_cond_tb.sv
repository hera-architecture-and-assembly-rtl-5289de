// hera_branch_cond_tb: exhaustive self-checking test of the HERA branch
// condition: every kind, both flag numbers and all 32 flag values.
module hera_branch_cond_tb;
  import hera_pkg::*;

  brkind_t kind;
  flagnum_t x1, x2;
  flags_t flags;
  logic take, exp;
  logic fs, f1, f2;
  int checks = 0, failures = 0;

  hera_branch_cond dut (.kind, .x1, .x2, .flags, .take);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic flag_by_num(flags_t f, int n);
    case (n)
      0: return f.s;
      1: return f.z;
      2: return f.v;
      default: return f.c;
    endcase
  endfunction

  initial begin
    for (int k = 0; k < 4; k++)
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++)
          for (int f = 0; f < 32; f++) begin
            kind = brkind_t'(k); x1 = flagnum_t'(a); x2 = flagnum_t'(b); flags = flags_t'(f);
            #1;
            f1 = flag_by_num(flags, a); f2 = flag_by_num(flags, b);
            case (k)
              0: exp = f1;
              1: exp = !f1;
              2: exp = f1 | !f2;
              default: exp = 0;
            endcase
            checks++;
            if (take !== exp) begin
              failures++;
              if (failures < 10) $display("FAIL kind=%0d x1=%0d x2=%0d f=%b take=%b", k, a, b, f, take);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
