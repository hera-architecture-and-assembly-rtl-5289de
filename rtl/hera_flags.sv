// hera_flags: the HERA flag register f = {cb, c, v, z, s}.
//
// s (sign), z (zero), v (overflow) and c (carry) are written by arithmetic
// through a per-flag write enable; carry-block (cb) is never touched by
// arithmetic. SETF(m, v) does f = (f & ~m) | (v & m) over all five bits, and
// RSTRF uses the same masked write with every bit of the mask set. A masked
// write has priority over an arithmetic update (the core never asks for both
// in one cycle). Updates take effect at the rising clock edge; the register
// clears on reset (carry-block off), which is this design's choice.
module hera_flags
  import hera_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] alu_we,    // {c, v, z, s} write enables from the ALU
  input  logic [3:0] alu_val,   // {c, v, z, s} values from the ALU
  input  logic       mask_we,   // SETF or RSTRF
  input  logic [4:0] mask,      // which bits of f to write
  input  logic [4:0] mask_val,  // their new values
  output flags_t     flags
);

  flags_t f_q, f_d;

  always_comb begin
    f_d = f_q;
    if (mask_we) begin
      f_d = flags_t'((f_q & ~mask) | (mask_val & mask));
    end else begin
      for (int i = 0; i < 4; i++)
        if (alu_we[i]) f_d[i] = alu_val[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) f_q <= '0;
    else        f_q <= f_d;
  end

  assign flags = f_q;

endmodule
