// tb_bsd_secondary_unit -- self-checking test of the merging unit of the
// BSD sign detector.
//
// Builds two groups of four signed digits each from every legal digit
// pattern (81 x 81 pairs), turns each group into its flags by its integer
// value, feeds those flags to the unit and checks the result against the
// integer value of the eight-digit number hi * 16 + lo: sign must equal
// (value < 0) and zero must equal (value == 0). Every legal flag pair
// {negative, zero, positive} x {negative, zero, positive} is covered many
// times. A watchdog ends the run with a failure if it does not finish.
module tb_bsd_secondary_unit;
  import bsd_pkg::*;

  bsd_flags_t f_hi, f_lo, flags;
  int checks = 0;
  int failures = 0;

  bsd_secondary_unit dut (.f_hi(f_hi), .f_lo(f_lo), .flags(flags));

  // Value of a 4-digit group whose digits are the base-3 digits of code,
  // mapped 0,1,2 -> -1,0,+1.
  function automatic int group_value(int code);
    int v = 0;
    for (int k = 3; k >= 0; k--) begin
      int d = (code / (3 ** k)) % 3 - 1;
      v = 2 * v + d;
    end
    return v;
  endfunction

  function automatic bsd_flags_t flags_of(int v);
    return '{sign: (v < 0), zero: (v == 0)};
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 81; a++) begin
      for (int b = 0; b < 81; b++) begin
        int hv, lv, value;
        hv = group_value(a);
        lv = group_value(b);
        f_hi = flags_of(hv);
        f_lo = flags_of(lv);
        #1;
        value = 16 * hv + lv;
        checks++;
        if (flags.sign !== (value < 0) || flags.zero !== (value == 0)) begin
          failures++;
          if (failures < 10)
            $display("FAIL hi=%0d lo=%0d: sign=%b zero=%b, expected sign=%b zero=%b",
                     hv, lv, flags.sign, flags.zero, value < 0, value == 0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
