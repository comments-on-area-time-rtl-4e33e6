// tb_bsd_primary_unit -- exhaustive self-checking test of the first-level
// unit of the BSD sign detector.
//
// Applies all nine legal pairs of digits (-1, 0, +1 for each of the two
// inputs), works out the pair's value 2*hi + lo as an integer and checks
// that the unit's sign flag equals (value < 0) and its zero flag equals
// (value == 0). The unused digit code 10 is never applied. A watchdog ends
// the run with a failure if it does not finish in time.
module tb_bsd_primary_unit;
  import bsd_pkg::*;

  bsd_digit_t d_hi, d_lo;
  bsd_flags_t flags;
  int checks = 0;
  int failures = 0;

  bsd_primary_unit dut (.d_hi(d_hi), .d_lo(d_lo), .flags(flags));

  function automatic bsd_digit_t enc(int d);
    return (d < 0) ? BSD_NEG : (d > 0) ? BSD_POS : BSD_ZERO;
  endfunction

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -1; a <= 1; a++) begin
      for (int b = -1; b <= 1; b++) begin
        int value;
        d_hi = enc(a);
        d_lo = enc(b);
        #1;
        value = 2 * a + b;
        checks++;
        if (flags.sign !== (value < 0) || flags.zero !== (value == 0)) begin
          failures++;
          $display("FAIL hi=%0d lo=%0d: sign=%b zero=%b, expected sign=%b zero=%b",
                   a, b, flags.sign, flags.zero, value < 0, value == 0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
