// hera_alu_tb: self-checking test of the HERA ALU.
//
// Drives every operation with random operands and random incoming flags
// (carry and carry-block both ways), plus directed corner cases, and compares
// the result, flag values and flag write mask with a reference written here
// from the instruction definitions: integer arithmetic for add/subtract and
// multiply, and bit-by-bit loops for the shifts.
module hera_alu_tb;
  import hera_pkg::*;

  alu_op_t    op;
  word_t      x, y, result;
  flags_t     fin;
  logic [3:0] fout, fwe;

  int checks = 0, failures = 0;

  hera_alu dut (.op, .x, .y, .flags_in(fin), .result, .flags_out(fout), .flag_we(fwe));

  // Reference: returns {we[3:0], c, v, r[15:0]} packed as fields.
  task automatic model(input alu_op_t o, input word_t a, input word_t b, input flags_t f,
                       output word_t r, output logic [3:0] fl, output logic [3:0] we);
    int unsigned cs, ua, ub, t;
    int sa, sb, st;
    logic c, v;
    int u;
    logic [16:0] w;
    cs = (f.c && !f.cb) ? 1 : 0;
    ua = a; ub = b;
    sa = $signed(a); sb = $signed(b);
    c = f.c; v = f.v; we = 4'b0011; r = 0;
    case (o)
      ALU_ADD: begin
        t = ua + ub + cs; r = t[15:0]; c = (t > 65535);
        st = sa + sb + int'(cs); v = (st > 32767) || (st < -32768); we = 4'b1111;
      end
      ALU_SUB: begin
        r = word_t'(ua - ub - cs); c = (ua < ub + cs);
        st = sa - sb - int'(cs); v = (st > 32767) || (st < -32768); we = 4'b1111;
      end
      ALU_MULLO: begin t = ua * ub; r = t[15:0]; end
      ALU_MULHI: begin t = ua * ub; r = t[31:16]; end
      ALU_AND:  r = a & b;
      ALU_OR:   r = a | b;
      ALU_NOT:  r = ~a;
      ALU_XOR:  r = a ^ b;
      ALU_NAND: r = ~(a & b);
      ALU_LSL: begin
        u = b[3:0];
        if (u == 0) r = a;
        else begin
          // shift one bit at a time; the carry enters only on the first step
          w = {a, cs[0]};
          for (int i = 1; i < u; i++) w = {w[15:0], 1'b0};
          r = w[15:0]; c = w[16]; v = r[15] ^ c; we = 4'b1111;
        end
      end
      ALU_LSR: begin
        u = b[3:0];
        if (u == 0) r = a;
        else begin
          w = {cs[0], a};
          for (int i = 1; i < u; i++) w = {1'b0, w[16:1]};
          r = w[16:1]; c = w[0]; we = 4'b1011;
        end
      end
      ALU_SETLO: begin r = {8'h00, b[7:0]}; we = 4'b0000; end
      ALU_SETHI: begin r = a | {b[7:0], 8'h00}; we = 4'b0000; end
      default: r = 0;
    endcase
    fl = {c, v, (r == 0), r[15]};
  endtask

  task automatic check_one(input alu_op_t o, input word_t a, input word_t b, input flags_t f);
    word_t er; logic [3:0] ef, ew;
    op = o; x = a; y = b; fin = f;
    #1;
    model(o, a, b, f, er, ef, ew);
    checks++;
    if (result !== er || fwe !== ew || ((fout & ew) !== (ef & ew)) || ((fout & ~ew & 4'b1100) !== ({f.c, f.v, 2'b00} & ~ew & 4'b1100))) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s x=%h y=%h f=%b: r=%h/%h flags=%b/%b we=%b/%b", o.name(), a, b, f,
                 result, er, fout, ef, fwe, ew);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flags_t f;
    // directed corners
    check_one(ALU_ADD, 16'h7fff, 16'h0001, '0);        // signed overflow
    check_one(ALU_ADD, 16'hffff, 16'h0001, '0);        // carry out, zero
    check_one(ALU_ADD, 16'hffff, 16'h0000, 5'b01000);  // carry in
    check_one(ALU_ADD, 16'hffff, 16'h0000, 5'b11000);  // carry blocked
    check_one(ALU_SUB, 16'h0000, 16'h0001, '0);        // borrow
    check_one(ALU_SUB, 16'h8000, 16'h0001, '0);        // overflow
    check_one(ALU_SUB, 16'h0005, 16'h0005, 5'b01000);  // borrow in
    check_one(ALU_LSL, 16'h4001, 16'h0001, 5'b01000);
    check_one(ALU_LSL, 16'h8001, 16'h0004, 5'b01000);
    check_one(ALU_LSR, 16'h0003, 16'h0001, 5'b01000);
    check_one(ALU_LSR, 16'h8003, 16'h0005, 5'b01000);
    check_one(ALU_MULHI, 16'hffff, 16'hffff, '0);
    check_one(ALU_SETHI, 16'h00ab, 16'h00cd, '0);
    repeat (20000) begin
      f = flags_t'($urandom);
      check_one(alu_op_t'($urandom_range(0, 12)), word_t'($urandom), word_t'($urandom), f);
      check_one(ALU_LSL, word_t'($urandom), word_t'($urandom_range(0, 15)), f);
      check_one(ALU_LSR, word_t'($urandom), word_t'($urandom_range(0, 15)), f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
