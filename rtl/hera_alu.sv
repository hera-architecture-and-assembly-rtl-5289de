// hera_alu: the combinational arithmetic and logic unit of the HERA processor.
//
// It computes one 16-bit result and new values for the s, z, v and c flags,
// with a mask saying which flags the operation writes. The carry-block flag is
// an input only: arithmetic never changes it. c* (carry_in used) is c when
// carry-block is clear, else 0.
//
//   ADD    r = x + y + c*      c = carry out, v = signed overflow
//   SUB    r = x - y - c*      c = borrow out (the carry acts as a borrow), v = signed overflow
//   INC and DEC use ADD and SUB with y = the 4-bit constant u.
//   LSL    {c, r} = {x, c*} shifted left u bits, carry entering once at bit u-1;
//          c = last bit shifted out, v = r[15] xor c (for u = 1 exactly the flags
//          of x + x + c*)
//   LSR    {r, c} = {c*, x} shifted right u bits, carry entering once at bit 16-u;
//          c = last bit shifted out, v unchanged
//   UMULLO / UMULHI  low / high 16 bits of the unsigned 32-bit product
//   AND OR XOR NAND  r = x op y;  NOT  r = ~x
//   SETLO  r = {8'h00, y[7:0]};   SETHI  r = x | {y[7:0], 8'h00}
//
// s and z always come from the result. SETLO and SETHI write no flags: the
// compare-and-branch sequences (CMP, then SET of the target, then BR on z)
// depend on it. Which flags multiply and the logic operations write is not
// fixed beyond "arithmetic operations set the flags": here they write s and z
// only and leave v and c as they were. A shift by 0 leaves its operand, v and
// c unchanged. Both are this design's choices.
//
// Interface: op, operands x and y, flags_in; result, flags_out and flag_we
// (bit i set means flags_out bit i is to be written, in flags_t order s,z,v,c).
// Purely combinational.
module hera_alu
  import hera_pkg::*;
(
  input  alu_op_t    op,
  input  word_t      x,
  input  word_t      y,
  input  flags_t     flags_in,
  output word_t      result,
  output logic [3:0] flags_out,  // {c, v, z, s}
  output logic [3:0] flag_we     // {c, v, z, s}
);

  logic        cstar;
  logic [16:0] sum, diff;
  logic [31:0] prod;
  logic [31:0] shl, shr;
  logic [3:0]  u;
  word_t       cin_l, cin_r;
  logic        c_new, v_new;

  assign cstar = flags_in.c & ~flags_in.cb;
  assign u     = y[3:0];
  assign sum   = {1'b0, x} + {1'b0, y} + {16'b0, cstar};
  assign diff  = {1'b0, x} - {1'b0, y} - {16'b0, cstar};
  assign prod  = {16'b0, x} * {16'b0, y};
  assign shl   = {16'b0, x} << u;
  assign shr   = {x, 16'b0} >> u;
  // The carry enters the shifted word once: at bit u-1 (left) or 16-u (right).
  assign cin_l = (u == 4'd0) ? 16'd0 : (word_t'(cstar) << (u - 4'd1));
  assign cin_r = (u == 4'd0) ? 16'd0 : (word_t'(cstar) << (5'd16 - {1'b0, u}));

  always_comb begin
    result = '0;
    c_new  = flags_in.c;
    v_new  = flags_in.v;
    flag_we = 4'b0011;  // s and z
    unique case (op)
      ALU_ADD: begin
        result  = sum[15:0];
        c_new   = sum[16];
        v_new   = (x[15] == y[15]) && (result[15] != x[15]);
        flag_we = 4'b1111;
      end
      ALU_SUB: begin
        result  = diff[15:0];
        c_new   = diff[16];
        v_new   = (x[15] != y[15]) && (result[15] != x[15]);
        flag_we = 4'b1111;
      end
      ALU_MULLO: result = prod[15:0];
      ALU_MULHI: result = prod[31:16];
      ALU_AND:   result = x & y;
      ALU_OR:    result = x | y;
      ALU_NOT:   result = ~x;
      ALU_XOR:   result = x ^ y;
      ALU_NAND:  result = ~(x & y);
      ALU_LSL: begin
        if (u == 4'd0) begin
          result = x;
        end else begin
          result  = shl[15:0] | cin_l;
          c_new   = shl[16];
          v_new   = result[15] ^ c_new;
          flag_we = 4'b1111;
        end
      end
      ALU_LSR: begin
        if (u == 4'd0) begin
          result = x;
        end else begin
          result  = shr[31:16] | cin_r;
          c_new   = shr[15];
          flag_we = 4'b1011;
        end
      end
      ALU_SETLO: begin
        result  = {8'h00, y[7:0]};
        flag_we = 4'b0000;
      end
      ALU_SETHI: begin
        result  = x | {y[7:0], 8'h00};
        flag_we = 4'b0000;
      end
      default:   result = '0;
    endcase
  end

  assign flags_out = {c_new, v_new, (result == 16'd0), result[15]};

endmodule
