// tb_bsd_sign_detector -- end-to-end self-checking test of the BSD sign
// detector, at the default size (64 digits) and at 2, 4, 8, 16 and 32 digits.
//
// One 64-digit stimulus drives all six instances; the instance of size N
// sees the low N digits. For every vector the expected flags of each
// instance come from the integer value of its digits, sum of d_k * 2^k,
// computed in a 72-bit signed variable: sign = (value < 0), zero =
// (value == 0).
//
// Stimulus, in order:
//   * the two worked examples of the published comment (1,-1,0,0 and
//     1,1,0,0,-1,0,-1,0), both positive;
//   * all-zero input;
//   * every legal pattern of the low 8 digits (3^8 = 6561), with the high
//     digits zero and then again with the high digits random;
//   * random numbers whose most significant non-zero digit is placed at a
//     chosen position, sweeping every position 0..63 many times.
//
// What the tree has to get right is counted on the 64-digit instance and
// each count must be non-zero at the end: negative, zero and positive
// results; the most significant non-zero digit at each of the 64
// positions (so every zero flag in the tree is used to pass a lower
// group's sign upward); and vectors on which a tree whose secondary units
// OR the zero flags (the uncorrected equations) would give a wrong answer.
// The block is combinational, so each vector is checked 1 time unit after
// it is applied. A watchdog ends the run with a failure if it hangs.
module tb_bsd_sign_detector;
  import bsd_pkg::*;

  localparam int NMAX = 64;

  bsd_digit_t [NMAX-1:0] zz;
  logic s2,  z2,  s4,  z4,  s8,  z8,  s16, z16, s32, z32, s64, z64;

  bsd_sign_detector #(.N_DIGITS(2))  u2  (.z(zz[1:0]),  .sign(s2),  .zero(z2));
  bsd_sign_detector #(.N_DIGITS(4))  u4  (.z(zz[3:0]),  .sign(s4),  .zero(z4));
  bsd_sign_detector #(.N_DIGITS(8))  u8  (.z(zz[7:0]),  .sign(s8),  .zero(z8));
  bsd_sign_detector #(.N_DIGITS(16)) u16 (.z(zz[15:0]), .sign(s16), .zero(z16));
  bsd_sign_detector #(.N_DIGITS(32)) u32 (.z(zz[31:0]), .sign(s32), .zero(z32));
  bsd_sign_detector                  u64 (.z(zz),       .sign(s64), .zero(z64));

  int checks = 0;
  int failures = 0;
  int n_neg = 0, n_zero = 0, n_pos = 0, n_uncorrected_wrong = 0, n_examples = 0;
  int msnz_hits [NMAX];

  function automatic int dec(bsd_digit_t d);
    return d.v ? (d.s ? -1 : 1) : 0;
  endfunction

  function automatic bsd_digit_t enc(int d);
    return (d < 0) ? BSD_NEG : (d > 0) ? BSD_POS : BSD_ZERO;
  endfunction

  // Integer value of the low n digits of zz.
  function automatic logic signed [71:0] value_of(int n);
    logic signed [71:0] v = '0;
    for (int k = n - 1; k >= 0; k--) v = 2 * v + 72'(signed'(dec(zz[k])));
    return v;
  endfunction

  // Flags a tree with OR-ed zero flags in its secondary units would give
  // for all 64 digits (the primary units are the same in both versions).
  function automatic bsd_flags_t uncorrected_tree();
    bsd_flags_t f [NMAX];
    int units = NMAX / 2;
    for (int p = 0; p < units; p++) begin
      f[p].sign = (zz[2*p+1].s & zz[2*p+1].v) | (zz[2*p].s & zz[2*p].v & ~zz[2*p+1].v);
      f[p].zero = ~zz[2*p+1].v & ~zz[2*p].v;
    end
    while (units > 1) begin
      units /= 2;
      for (int p = 0; p < units; p++) begin
        bsd_flags_t hi = f[2*p+1], lo = f[2*p];
        f[p].sign = hi.sign | (lo.sign & hi.zero);
        f[p].zero = hi.zero | lo.zero;
      end
    end
    return f[0];
  endfunction

  task automatic check_one(string name, int n, logic s, logic z);
    logic signed [71:0] v = value_of(n);
    checks++;
    if (s !== (v < 0) || z !== (v == 0)) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: value=%0d sign=%b zero=%b, expected sign=%b zero=%b",
                 name, v, s, z, v < 0, v == 0);
    end
  endtask

  task automatic apply_and_check();
    logic signed [71:0] v;
    bsd_flags_t old;
    #1;
    check_one("N=2",  2,  s2,  z2);
    check_one("N=4",  4,  s4,  z4);
    check_one("N=8",  8,  s8,  z8);
    check_one("N=16", 16, s16, z16);
    check_one("N=32", 32, s32, z32);
    check_one("N=64", 64, s64, z64);
    v = value_of(NMAX);
    if (v < 0) n_neg++; else if (v == 0) n_zero++; else n_pos++;
    for (int k = NMAX - 1; k >= 0; k--)
      if (zz[k].v) begin msnz_hits[k]++; break; end
    old = uncorrected_tree();
    if (old.sign !== (v < 0) || old.zero !== (v == 0)) n_uncorrected_wrong++;
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (msnz_hits[k]) msnz_hits[k] = 0;

    // Worked example 1: digits 3..0 = 1, -1, 0, 0 (value +4).
    zz = '0;
    zz[3] = BSD_POS; zz[2] = BSD_NEG;
    apply_and_check();
    checks++;
    if (s4 !== 1'b0 || z4 !== 1'b0) begin
      failures++; $display("FAIL example 1: sign=%b zero=%b", s4, z4);
    end else n_examples++;

    // Worked example 2: digits 7..0 = 1, 1, 0, 0, -1, 0, -1, 0 (value +182).
    zz = '0;
    zz[7] = BSD_POS; zz[6] = BSD_POS; zz[3] = BSD_NEG; zz[1] = BSD_NEG;
    apply_and_check();
    checks++;
    if (s8 !== 1'b0 || z8 !== 1'b0) begin
      failures++; $display("FAIL example 2: sign=%b zero=%b", s8, z8);
    end else n_examples++;

    // All zero.
    zz = '0;
    apply_and_check();

    // Every legal pattern of the low 8 digits, high digits zero then random.
    for (int pass = 0; pass < 2; pass++) begin
      for (int code = 0; code < 6561; code++) begin
        int c;
        c = code;
        for (int k = 0; k < NMAX; k++) begin
          if (k < 8) begin
            zz[k] = enc(c % 3 - 1);
            c /= 3;
          end else begin
            zz[k] = (pass == 0) ? BSD_ZERO : enc(int'($urandom_range(2)) - 1);
          end
        end
        apply_and_check();
      end
    end

    // Most significant non-zero digit at each position, lower digits random
    // with a varying share of zeros.
    for (int rep = 0; rep < 40; rep++) begin
      for (int top = 0; top < NMAX; top++) begin
        int zero_pct;
        zero_pct = int'($urandom_range(90));
        zz = '0;
        zz[top] = ($urandom_range(1) == 1) ? BSD_NEG : BSD_POS;
        for (int k = 0; k < top; k++)
          if (int'($urandom_range(99)) >= zero_pct)
            zz[k] = ($urandom_range(1) == 1) ? BSD_NEG : BSD_POS;
        apply_and_check();
      end
    end

    // Every mechanism must have been exercised.
    checks++;
    if (n_neg == 0 || n_zero == 0 || n_pos == 0) begin
      failures++; $display("FAIL coverage: neg=%0d zero=%0d pos=%0d", n_neg, n_zero, n_pos);
    end
    checks++;
    if (n_uncorrected_wrong == 0) begin
      failures++; $display("FAIL coverage: no vector separates the corrected zero flag");
    end
    checks++;
    if (n_examples != 2) begin
      failures++; $display("FAIL coverage: worked examples passed %0d of 2", n_examples);
    end
    for (int k = 0; k < NMAX; k++) begin
      checks++;
      if (msnz_hits[k] == 0) begin
        failures++; $display("FAIL coverage: no vector with leading digit at %0d", k);
      end
    end
    $display("coverage: negative=%0d zero=%0d positive=%0d uncorrected-tree-wrong=%0d examples=%0d",
             n_neg, n_zero, n_pos, n_uncorrected_wrong, n_examples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
