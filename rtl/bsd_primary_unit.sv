// bsd_primary_unit -- first-level node of the BSD sign-detection tree.
//
// Takes two adjacent signed digits, d_hi (weight 2) and d_lo (weight 1),
// and returns the sign and zero flags of the two-digit group. The group is
// negative when d_hi is -1, or when d_hi is 0 and d_lo is -1; it is zero
// when both value bits are 0:
//
//   sign = d_hi.s | (d_lo.s & ~d_hi.v)
//   zero = ~d_hi.v & ~d_lo.v
//
// This is the reduced form obtained from the full truth table of the unit,
// with the unused digit code 10 treated as don't care (so an input of 10
// gives an unspecified but harmless result). Purely combinational, no
// clock; the equations are the published ones.
module bsd_primary_unit
  import bsd_pkg::*;
(
  input  bsd_digit_t d_hi,   // more significant digit z_i
  input  bsd_digit_t d_lo,   // less significant digit z_{i-1}
  output bsd_flags_t flags   // flags of the pair
);

  always_comb begin
    flags.sign = d_hi.s | (d_lo.s & ~d_hi.v);
    flags.zero = ~d_hi.v & ~d_lo.v;
  end

endmodule
