// bsd_sign_detector -- sign and zero detection for an N_DIGITS-digit binary
// signed-digit (BSD) number, built as a reverse (reduction) tree.
//
// Level 1 holds N_DIGITS/2 primary units; primary unit p looks at digits
// 2p+1 and 2p and gives the sign/zero flags of that pair. Every higher
// level j holds N_DIGITS/2^j secondary units; secondary unit p of level j
// merges groups 2p+1 (more significant) and 2p of level j-1. The single
// unit of the last level, log2(N_DIGITS), covers the whole number: its
// flags are the outputs. `sign` is 1 when the number is negative, `zero`
// is 1 when it is zero; a positive number gives sign = 0, zero = 0.
//
// Interface: z[k] is digit k as {sign bit, value bit} (-1 = 11, 0 = 00,
// +1 = 01), z[N_DIGITS-1] the most significant. The code 10 must not be
// applied. The block is purely combinational: the outputs follow the input
// after log2(N_DIGITS) levels of two-input logic, with no clock or latency.
//
// The tree shape, the pairing of adjacent digits and groups, and the
// equations of the two units follow the published technique with its
// corrected zero-flag equation. Restricting N_DIGITS to powers of two (the
// sizes evaluated are 4 to 64 digits) and bringing the flags out as two
// separate bits are choices of this implementation. A shorter number is
// handled by driving the unused high digits with 0 (code 00).
module bsd_sign_detector
  import bsd_pkg::*;
#(
  parameter int unsigned N_DIGITS = 64   // digits in the number, power of two >= 2
) (
  input  bsd_digit_t [N_DIGITS-1:0] z,   // the BSD number
  output logic                      sign,  // 1: negative
  output logic                      zero   // 1: zero
);

  localparam int unsigned LEVELS = $clog2(N_DIGITS);

  if (N_DIGITS < 2 || (1 << LEVELS) != N_DIGITS) begin : g_bad_size
    $error("bsd_sign_detector: N_DIGITS (%0d) must be a power of two >= 2", N_DIGITS);
  end

  // Level j (1..LEVELS) has N_DIGITS >> j units, each driving g_level[j].f[p].
  for (genvar j = 1; j <= LEVELS; j++) begin : g_level
    localparam int unsigned UNITS = N_DIGITS >> j;
    bsd_flags_t f [UNITS];

    for (genvar p = 0; p < UNITS; p++) begin : g_unit
      if (j == 1) begin : g_primary
        bsd_primary_unit u_primary (
          .d_hi  (z[2*p+1]),
          .d_lo  (z[2*p]),
          .flags (f[p])
        );
      end else begin : g_secondary
        bsd_secondary_unit u_secondary (
          .f_hi  (g_level[j-1].f[2*p+1]),
          .f_lo  (g_level[j-1].f[2*p]),
          .flags (f[p])
        );
      end
    end
  end

  assign sign = g_level[LEVELS].f[0].sign;
  assign zero = g_level[LEVELS].f[0].zero;

endmodule
