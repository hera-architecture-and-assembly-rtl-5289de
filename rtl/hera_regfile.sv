// hera_regfile: the sixteen numbered 16-bit registers of the HERA processor.
//
// Register 0 always reads as zero and ignores writes; registers 1-12 are
// general purpose and 13, 14 and 15 are the old frame pointer, frame pointer
// and stack pointer (ordinary registers here, which the core's CAL and RETURN
// sequences address by number). The PC is kept in the core, not here.
//
// Three combinational read ports (two for the core's operands, one for
// debug/observation) and one write port that takes effect at the rising clock
// edge. A read of the register being written returns the old value. All
// registers clear on reset, a choice of this design: the architecture does
// not say what registers hold at power-up.
module hera_regfile
  import hera_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  regnum_t ra1,
  output word_t   rd1,
  input  regnum_t ra2,
  output word_t   rd2,
  input  regnum_t ra3,
  output word_t   rd3,
  input  logic    we,
  input  regnum_t wa,
  input  word_t   wd
);

  word_t regs [1:15];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < 16; i++) regs[i] <= '0;
    end else if (we && wa != REG_ZERO) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == REG_ZERO) ? '0 : regs[ra1];
  assign rd2 = (ra2 == REG_ZERO) ? '0 : regs[ra2];
  assign rd3 = (ra3 == REG_ZERO) ? '0 : regs[ra3];

endmodule
