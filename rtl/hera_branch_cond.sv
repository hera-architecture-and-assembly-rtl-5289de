// hera_branch_cond: decides whether a HERA branch is taken.
//
//   BR  (x, a)      taken iff flag x is set
//   BRN (x, a)      taken iff flag x is clear
//   BR2 (x1, x2, a) taken iff flag x1 is set or flag x2 is clear
//                   (so x1 == x2 always branches)
//
// Flag numbers: 0 = s, 1 = z, 2 = v, 3 = c. Carry-block cannot be tested.
// The fourth branch kind of this design's encoding is never taken.
// Purely combinational.
module hera_branch_cond
  import hera_pkg::*;
(
  input  brkind_t  kind,
  input  flagnum_t x1,
  input  flagnum_t x2,
  input  flags_t   flags,
  output logic     take
);

  logic [3:0] fv;
  assign fv = {flags.c, flags.v, flags.z, flags.s};

  always_comb begin
    unique case (kind)
      BR_BR:   take = fv[x1];
      BR_BRN:  take = !fv[x1];
      BR_BR2:  take = fv[x1] || !fv[x2];
      default: take = 1'b0;
    endcase
  end

endmodule
