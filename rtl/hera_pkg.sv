// hera_pkg: types, register numbers and the instruction encoding shared by the
// HERA (Haverford educational RISC architecture) processor modules.
//
// The architecture fixes the register set (R0 reads as zero, R1-R12 general
// purpose, R13 = OFP, R14 = FP, R15 = SP, plus a PC), the flags s, z, v, c and
// the extra carry-block flag, and what every instruction does. It does not fix
// a binary encoding, so the 16-bit instruction formats below are this
// design's own choice. Every true instruction fits one 16-bit word, as the
// architecture requires:
//
//   15..12 | 11 ........................................ 0
//   0000   | sub[11:8]  -        x[3:0]      NOP HALT RETURN SWI RTI SAVEF(d=x) RSTRF(a=x)
//   0001   | kind[11:10] x1[9:8] x2[7:6] 00 a[3:0]   BR (kind 0), BRN (1), BR2 (2)
//   0010   | o[11:4] (8-bit)               a[3:0]    CAL(o,a)
//   0011   | m[11:7] (5-bit)   v[6:2]      00        SETF(m,v)
//   010    | o[12:8] (5-bit)   a[7:4]      d[3:0]    LOAD(o,a,d)
//   011    | o[12:8] (5-bit)   a[7:4]      b[3:0]    STORE(o,a,b)
//   1000   | d[11:8]           a[7:4]      fn[3:0]   AND OR NOT XOR NAND (d = d op a)
//   1001   | d[11:8]           u[7:4]      00 fn[1:0] INC DEC LSL LSR
//   1010   | d a b                                    ADD
//   1011   | d a b                                    SUB
//   1100   | d a b                                    UMULLO
//   1101   | d a b                                    UMULHI
//   1110   | d[11:8]           v[7:0]                SETLO
//   1111   | d[11:8]           v[7:0]                SETHI
package hera_pkg;

  localparam int unsigned XLEN = 16;
  typedef logic [XLEN-1:0] word_t;
  typedef logic [3:0]      regnum_t;

  localparam regnum_t REG_ZERO = 4'd0;
  localparam regnum_t REG_OFP  = 4'd13;
  localparam regnum_t REG_FP   = 4'd14;
  localparam regnum_t REG_SP   = 4'd15;

  // Flag register. Bit positions follow the architecture's numbering
  // (s = 0, z = 1, v = 2, c = 3) and its SETF masks (8 = carry, 16 = carry-block).
  typedef struct packed {
    logic cb;  // carry-block: bit 4
    logic c;   // carry: bit 3
    logic v;   // overflow: bit 2
    logic z;   // zero: bit 1
    logic s;   // sign: bit 0
  } flags_t;

  // Flag numbers as used by BR, BRN and BR2.
  typedef enum logic [1:0] {FLAG_S = 2'd0, FLAG_Z = 2'd1, FLAG_V = 2'd2, FLAG_C = 2'd3} flagnum_t;

  // Top-level opcode, bits 15..12 (LOAD and STORE use only 15..13).
  typedef enum logic [3:0] {
    OP_SYS    = 4'b0000,
    OP_BRANCH = 4'b0001,
    OP_CAL    = 4'b0010,
    OP_SETF   = 4'b0011,
    OP_LOAD0  = 4'b0100,
    OP_LOAD1  = 4'b0101,
    OP_STORE0 = 4'b0110,
    OP_STORE1 = 4'b0111,
    OP_LOGIC  = 4'b1000,
    OP_SHIFT  = 4'b1001,
    OP_ADD    = 4'b1010,
    OP_SUB    = 4'b1011,
    OP_MULLO  = 4'b1100,
    OP_MULHI  = 4'b1101,
    OP_SETLO  = 4'b1110,
    OP_SETHI  = 4'b1111
  } opcode_t;

  // Sub-operations of OP_SYS, bits 11..8.
  typedef enum logic [3:0] {
    SYS_NOP    = 4'd0,
    SYS_HALT   = 4'd1,
    SYS_RETURN = 4'd2,
    SYS_SWI    = 4'd3,
    SYS_RTI    = 4'd4,
    SYS_SAVEF  = 4'd5,
    SYS_RSTRF  = 4'd6
  } sysop_t;

  // Branch kinds of OP_BRANCH, bits 11..10.
  typedef enum logic [1:0] {BR_BR = 2'd0, BR_BRN = 2'd1, BR_BR2 = 2'd2, BR_NONE = 2'd3} brkind_t;

  // Functions of OP_LOGIC, bits 3..0.
  typedef enum logic [3:0] {
    LG_AND = 4'd0, LG_OR = 4'd1, LG_NOT = 4'd2, LG_XOR = 4'd3, LG_NAND = 4'd4
  } logicfn_t;

  // Functions of OP_SHIFT, bits 1..0.
  typedef enum logic [1:0] {SH_INC = 2'd0, SH_DEC = 2'd1, SH_LSL = 2'd2, SH_LSR = 2'd3} shiftfn_t;

  // Operation selected in the ALU.
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_MULLO, ALU_MULHI,
    ALU_AND, ALU_OR, ALU_NOT, ALU_XOR, ALU_NAND,
    ALU_LSL, ALU_LSR, ALU_SETLO, ALU_SETHI
  } alu_op_t;

endpackage
