// hera_tb_pkg: testbench support for the HERA processor.
//
// - An assembler: one function per true instruction, written from the
//   instruction formats with literal bit patterns (not from the RTL package),
//   and a program builder with labels for the pseudo-instructions SET, CMP,
//   NEG, ZERO, CLCCB, SETCB, FLAGS, JUMP, BREQ/BRNE/BRLT/BRGE and CALL.
// - An instruction-set reference model (class hera_iss) that executes a
//   program one instruction at a time from the architectural definitions,
//   counts cycles with the core's documented cycle costs, and counts how often
//   each mechanism (carry in, carry blocked, each branch kind taken and not,
//   CAL, RETURN, ...) occurred.
package hera_tb_pkg;

  typedef logic [15:0] w16;

  // ---------------- true instructions ----------------
  function automatic w16 SETLO(int d, int v);  return {4'hE, 4'(d), 8'(v)}; endfunction
  function automatic w16 SETHI(int d, int v);  return {4'hF, 4'(d), 8'(v)}; endfunction
  function automatic w16 ADD(int d, int a, int b);    return {4'hA, 4'(d), 4'(a), 4'(b)}; endfunction
  function automatic w16 SUB(int d, int a, int b);    return {4'hB, 4'(d), 4'(a), 4'(b)}; endfunction
  function automatic w16 UMULLO(int d, int a, int b); return {4'hC, 4'(d), 4'(a), 4'(b)}; endfunction
  function automatic w16 UMULHI(int d, int a, int b); return {4'hD, 4'(d), 4'(a), 4'(b)}; endfunction
  function automatic w16 AND(int d, int a);  return {4'h8, 4'(d), 4'(a), 4'h0}; endfunction
  function automatic w16 OR(int d, int a);   return {4'h8, 4'(d), 4'(a), 4'h1}; endfunction
  function automatic w16 NOT(int d);         return {4'h8, 4'(d), 4'h0, 4'h2}; endfunction
  function automatic w16 XOR(int d, int a);  return {4'h8, 4'(d), 4'(a), 4'h3}; endfunction
  function automatic w16 NAND(int d, int a); return {4'h8, 4'(d), 4'(a), 4'h4}; endfunction
  function automatic w16 INC(int d, int u);  return {4'h9, 4'(d), 4'(u), 4'h0}; endfunction
  function automatic w16 DEC(int d, int u);  return {4'h9, 4'(d), 4'(u), 4'h1}; endfunction
  function automatic w16 LSL(int d, int u);  return {4'h9, 4'(d), 4'(u), 4'h2}; endfunction
  function automatic w16 LSR(int d, int u);  return {4'h9, 4'(d), 4'(u), 4'h3}; endfunction
  function automatic w16 SETF(int m, int v); return {4'h3, 5'(m), 5'(v), 2'b00}; endfunction
  function automatic w16 SAVEF(int d);       return {8'h05, 4'h0, 4'(d)}; endfunction
  function automatic w16 RSTRF(int a);       return {8'h06, 4'h0, 4'(a)}; endfunction
  function automatic w16 LOAD(int o, int a, int d);  return {3'b010, 5'(o), 4'(a), 4'(d)}; endfunction
  function automatic w16 STORE(int o, int a, int b); return {3'b011, 5'(o), 4'(a), 4'(b)}; endfunction
  function automatic w16 BR(int x, int a);   return {4'h1, 2'b00, 2'(x), 2'b00, 2'b00, 4'(a)}; endfunction
  function automatic w16 BRN(int x, int a);  return {4'h1, 2'b01, 2'(x), 2'b00, 2'b00, 4'(a)}; endfunction
  function automatic w16 BR2(int x1, int x2, int a); return {4'h1, 2'b10, 2'(x1), 2'(x2), 2'b00, 4'(a)}; endfunction
  function automatic w16 CAL(int o, int a);  return {4'h2, 8'(o), 4'(a)}; endfunction
  function automatic w16 NOP();    return 16'h0000; endfunction
  function automatic w16 HALT();   return 16'h0100; endfunction
  function automatic w16 RETURN(); return 16'h0200; endfunction
  function automatic w16 SWI();    return 16'h0300; endfunction
  function automatic w16 RTI();    return 16'h0400; endfunction

  localparam int OFP = 13, FP = 14, SP = 15;
  localparam int FLAG_S = 0, FLAG_Z = 1, FLAG_V = 2, FLAG_C = 3;

  // ---------------- program builder ----------------
  class hera_prog;
    w16 code[$];
    int labels[string];
    string fix_name[$];
    int    fix_at[$];

    function int here(); return code.size(); endfunction
    function void emit(w16 w); code.push_back(w); endfunction
    function void label(string l); labels[l] = code.size(); endfunction
    function void set(int d, int v);
      emit(SETLO(d, v & 255));
      emit(SETHI(d, (v >> 8) & 255));
    endfunction
    // SET of a label address, patched by resolve()
    function void set_label(int t, string l);
      fix_name.push_back(l); fix_at.push_back(code.size());
      set(t, 0);
    endfunction
    function void cmp(int a, int b);  emit(SUB(0, a, b)); endfunction
    function void neg(int d);         emit(SUB(d, 0, d)); endfunction
    function void zero(int d);        emit(AND(d, 0)); endfunction
    function void clccb();            emit(SETF(16 + 8, 0)); endfunction
    function void setcb();            emit(SETF(16, 16)); endfunction
    function void flags(int a);       emit(SETF(8, 0)); emit(ADD(0, 0, a)); endfunction
    function void jump(int t, string l); set_label(t, l); emit(BR2(0, 0, t)); endfunction
    function void breq(int t, string l); set_label(t, l); emit(BR(FLAG_Z, t)); endfunction
    function void brne(int t, string l); set_label(t, l); emit(BRN(FLAG_Z, t)); endfunction
    function void brlt(int t, string l); set_label(t, l); emit(BR(FLAG_S, t)); endfunction
    function void brge(int t, string l); set_label(t, l); emit(BR2(FLAG_Z, FLAG_S, t)); endfunction
    function void call(int t, int o, string l); set_label(t, l); emit(CAL(o, t)); endfunction
    function void resolve();
      foreach (fix_at[i]) begin
        int v;
        int d;
        v = labels[fix_name[i]];
        d = code[fix_at[i]][11:8];
        code[fix_at[i]]     = SETLO(d, v & 255);
        code[fix_at[i] + 1] = SETHI(d, (v >> 8) & 255);
      end
    endfunction
  endclass

  // ---------------- instruction-set reference model ----------------
  class hera_iss;
    w16 r[16];
    w16 pc;
    bit fs, fz, fv, fc, fcb;
    w16 imem[int];
    w16 dmem[int];
    bit halted;
    longint cycles;
    int n_instr;
    int cnt[string];

    function new();
      foreach (r[i]) r[i] = 0;
      pc = 0; fs = 0; fz = 0; fv = 0; fc = 0; fcb = 0;
      halted = 0; cycles = 1; n_instr = 0;
    endfunction

    function void bump(string k);
      if (cnt.exists(k)) cnt[k]++; else cnt[k] = 1;
    endfunction

    function w16 rd(int n); return (n == 0) ? 16'h0 : r[n]; endfunction
    function void wr(int n, w16 v); if (n != 0) r[n] = v; else bump("r0_write_dropped"); endfunction
    function w16 mrd(int a); return dmem.exists(a) ? dmem[a] : 16'h0; endfunction
    function bit flag(int n);
      case (n) 0: return fs; 1: return fz; 2: return fv; default: return fc; endcase
    endfunction
    function w16 f5(); return {11'b0, fcb, fc, fv, fz, fs}; endfunction
    function void setsz(w16 v); fs = v[15]; fz = (v == 0); endfunction

    function int cstar();
      if (fc && fcb) bump("carry_blocked");
      if (fc && !fcb) bump("carry_in_used");
      return (fc && !fcb) ? 1 : 0;
    endfunction

    function void do_add(int d, w16 a, w16 b);
      int unsigned t; int s, sa, sb; int c;
      c = cstar();
      t = int'(a) + int'(b) + c;
      sa = $signed(a); sb = $signed(b);
      s = sa + sb + c;
      wr(d, t[15:0]); setsz(t[15:0]);
      fc = (t >= 65536); fv = (s < -32768 || s > 32767);
      if (fc) bump("carry_out"); if (fv) bump("overflow");
    endfunction
    function void do_sub(int d, w16 a, w16 b);
      int s, sa, sb; int c; w16 res;
      c = cstar();
      sa = $signed(a); sb = $signed(b);
      s = sa - sb - c;
      res = w16'(int'(a) - int'(b) - c);
      wr(d, res); setsz(res);
      fc = (int'(a) < int'(b) + c); fv = (s < -32768 || s > 32767);
      if (fc) bump("borrow_out"); if (fv) bump("overflow");
    endfunction

    function void step();
      w16 ir; int op, d, a, b, u, o;
      w16 res; bit [16:0] w;
      if (halted) return;
      ir = imem.exists(int'(pc)) ? imem[int'(pc)] : 16'h0;
      op = ir[15:12]; d = ir[11:8]; a = ir[7:4]; b = ir[3:0];
      n_instr++;
      cycles++;
      pc = pc + 1;  // default; branches and calls override
      case (op)
        4'hE: begin res = {8'h00, ir[7:0]}; wr(d, res); end
        4'hF: begin res = rd(d) | {ir[7:0], 8'h00}; wr(d, res); end
        4'hA: do_add(d, rd(a), rd(b));
        4'hB: do_sub(d, rd(a), rd(b));
        4'hC, 4'hD: begin
          bit [31:0] p; p = rd(a) * rd(b);
          res = (op == 4'hC) ? p[15:0] : p[31:16]; wr(d, res); setsz(res); bump("multiply");
        end
        4'h8: begin
          case (b)
            0: res = rd(d) & rd(a);
            1: res = rd(d) | rd(a);
            2: res = ~rd(d);
            3: res = rd(d) ^ rd(a);
            4: res = ~(rd(d) & rd(a));
            default: res = 0;
          endcase
          if (b <= 4) begin wr(d, res); setsz(res); bump("logic"); end
        end
        4'h9: begin
          u = a;
          case (b[1:0])
            0: do_add(d, rd(d), w16'(u));
            1: do_sub(d, rd(d), w16'(u));
            2: if (u != 0) begin
                 int c; c = cstar();
                 w = {rd(d), 1'(c)};
                 for (int i = 1; i < u; i++) w = w << 1;
                 wr(d, w[15:0]); setsz(w[15:0]); fc = w[16]; fv = w[15] ^ w[16];
                 bump(u > 1 ? "shift_multi" : "shift_one");
               end else begin res = rd(d); wr(d, res); setsz(res); end
            default: if (u != 0) begin
                 int c; c = cstar();
                 w = {1'(c), rd(d)};
                 for (int i = 1; i < u; i++) w = w >> 1;
                 wr(d, w[16:1]); setsz(w[16:1]); fc = w[0];
                 bump(u > 1 ? "shift_multi" : "shift_one");
               end else begin res = rd(d); wr(d, res); setsz(res); end
          endcase
        end
        4'h3: begin
          bit [4:0] m, v, f;
          m = ir[11:7]; v = ir[6:2]; f = f5();
          f = (f & ~m) | (v & m);
          {fcb, fc, fv, fz, fs} = f;
          bump("setf");
        end
        4'h4, 4'h5: begin
          o = ir[12:8];
          wr(b, mrd(int'(w16'(rd(a) + o))));
          cycles++; bump("load");
        end
        4'h6, 4'h7: begin
          o = ir[12:8];
          dmem[int'(w16'(rd(a) + o))] = rd(b);
          bump("store");
        end
        4'h1: begin
          bit take; int x1, x2;
          x1 = ir[9:8]; x2 = ir[7:6];
          case (ir[11:10])
            0: take = flag(x1);
            1: take = !flag(x1);
            2: take = flag(x1) || !flag(x2);
            default: take = 0;
          endcase
          if (ir[11:10] != 3) begin
            string outcome;
            if (take) outcome = "taken"; else outcome = "not_taken";
            bump($sformatf("branch%0d_%s", ir[11:10], outcome));
          end
          if (take) pc = rd(b);
        end
        4'h2: begin
          w16 tgt;
          o = ir[11:4];
          tgt = rd(b);
          dmem[int'(r[SP])] = pc;  // pc already holds PC+1
          r[OFP] = r[FP]; r[FP] = r[SP]; r[SP] = r[SP] + w16'(o);
          pc = tgt;
          cycles += 3; bump("call");
        end
        4'h0: begin
          case (ir[11:8])
            1: begin halted = 1; pc = pc - 1; bump("halt"); end
            2: begin
              w16 ofp; ofp = r[OFP];
              pc = mrd(int'(r[FP])); r[SP] = r[FP]; r[FP] = ofp;
              cycles += 2; bump("return");
            end
            3, 4: bump("unimpl");
            5: begin wr(b, f5()); bump("savef"); end
            6: begin {fcb, fc, fv, fz, fs} = rd(b)[4:0]; bump("rstrf"); end
            default: bump("nop");
          endcase
        end
        default: ;
      endcase
    endfunction

    function void load_prog(hera_prog p, int base = 0);
      foreach (p.code[i]) imem[base + i] = p.code[i];
    endfunction

    function void run(int max_steps);
      for (int i = 0; i < max_steps && !halted; i++) step();
    endfunction
  endclass

  // One random instruction that is not a branch, CAL, RETURN or HALT.
  function automatic void gen_simple(hera_prog p);
    int k, d, a, b;
    k = $urandom_range(0, 24);
    d = $urandom_range(0, 15); a = $urandom_range(0, 15); b = $urandom_range(0, 15);
    case (k)
      0:  p.emit(SETLO(d, $urandom));
      1:  p.emit(SETHI(d, $urandom));
      2, 3: p.emit(ADD(d, a, b));
      4, 5: p.emit(SUB(d, a, b));
      6:  p.emit(UMULLO(d, a, b));
      7:  p.emit(UMULHI(d, a, b));
      8:  p.emit(AND(d, a));
      9:  p.emit(OR(d, a));
      10: p.emit(NOT(d));
      11: p.emit(XOR(d, a));
      12: p.emit(NAND(d, a));
      13: p.emit(INC(d, a));
      14: p.emit(DEC(d, a));
      15: p.emit(LSL(d, a));
      16: p.emit(LSR(d, a));
      17: p.emit(SETF($urandom, $urandom));
      18: p.emit(SAVEF(d));
      19: p.emit(RSTRF(a));
      20, 21: p.emit(LOAD($urandom, a, d));
      22, 23: p.emit(STORE($urandom, a, b));
      default: p.emit($urandom_range(0, 1) ? NOP() : ($urandom_range(0, 1) ? SWI() : RTI()));
    endcase
  endfunction

  // Random program of about n instructions: every true instruction except
  // CAL, RETURN and HALT, with branches that only go forward over 0-3 plain
  // instructions (so the program always reaches the HALT at its end).
  // Register 12 holds branch targets, set by SETLO alone (programs stay
  // under 256 words).
  function automatic void gen_random(hera_prog p, int n);
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(0, 3) != 0) gen_simple(p);
      else begin
        int skip;
        skip = $urandom_range(0, 3);
        p.emit(SETLO(12, p.here() + 2 + skip));
        case ($urandom_range(0, 2))
          0: p.emit(BR($urandom, 12));
          1: p.emit(BRN($urandom, 12));
          default: p.emit(BR2($urandom, $urandom, 12));
        endcase
        repeat (skip) gen_simple(p);
      end
    end
    repeat (4) p.emit(NOP());
    p.emit(HALT());
  endfunction

endpackage
