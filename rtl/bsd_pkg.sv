// bsd_pkg -- types and constants shared by the binary signed-digit (BSD)
// sign detector.
//
// A BSD digit takes the values -1, 0 and +1 and is carried on two wires,
// a sign bit and a value bit: -1 is 11, 0 is 00 and +1 is 01. The code 10
// is never used. Every node of the sign-detection tree reports two flags
// for the group of digits below it: `sign` (1 = the group is negative) and
// `zero` (1 = every digit of the group is 0). A group that is zero always
// has sign = 0, so the flag pair {sign=1, zero=1} never occurs.
//
// The digit encoding follows the published technique; packing the two
// flags into one struct is a choice of this implementation.
package bsd_pkg;

  // One signed digit, {sign, value}.
  typedef struct packed {
    logic s;  // sign bit: 1 for -1
    logic v;  // value bit: 1 for -1 or +1
  } bsd_digit_t;

  // Sign and zero flags of a group of digits.
  typedef struct packed {
    logic sign;  // 1: the group's value is negative
    logic zero;  // 1: the group's value is zero
  } bsd_flags_t;

  localparam bsd_digit_t BSD_ZERO = '{s: 1'b0, v: 1'b0};
  localparam bsd_digit_t BSD_POS  = '{s: 1'b0, v: 1'b1};
  localparam bsd_digit_t BSD_NEG  = '{s: 1'b1, v: 1'b1};

endpackage
