// bsd_secondary_unit -- node at level 2 and above of the BSD sign-detection
// tree.
//
// Merges the flags of two adjacent groups of digits, f_hi (more
// significant) and f_lo. In a signed-digit number the most significant
// non-zero digit decides the sign, so the merged group takes the sign of
// f_hi unless f_hi is zero, in which case it takes the sign of f_lo. It is
// zero only when both halves are zero:
//
//   sign = f_hi.sign | (f_lo.sign & f_hi.zero)
//   zero = f_hi.zero & f_lo.zero
//
// The zero flag is an AND of the two halves; an OR, as in the technique
// this design corrects, reports a non-zero number as zero whenever one
// half is zero. The flag pair {sign=1, zero=1} never occurs at the inputs
// and is treated as don't care. Purely combinational, no clock.
module bsd_secondary_unit
  import bsd_pkg::*;
(
  input  bsd_flags_t f_hi,   // flags of the more significant group
  input  bsd_flags_t f_lo,   // flags of the less significant group
  output bsd_flags_t flags   // flags of the merged group
);

  always_comb begin
    flags.sign = f_hi.sign | (f_lo.sign & f_hi.zero);
    flags.zero = f_hi.zero & f_lo.zero;
  end

endmodule
