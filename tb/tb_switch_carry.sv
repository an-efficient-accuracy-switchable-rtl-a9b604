// tb_switch_carry: exhaustive self-check of the switchable final-carry
// stage. All 16 combinations of m8, m9, m10 and approx are applied. The
// expected exact carry is the majority of m8, m9, m10 (counted as "two or
// more ones"); the expected approximate carry is the value the carry out of
// the upper half takes with its carry-in forced to 0, which is 1 only when
// m9 and m10 are both 1. A watchdog ends the run with a failure after 1000
// steps of 1 ns.
module tb_switch_carry;
  timeunit 1ns; timeprecision 1ps;

  logic m8, m9, m10, approx;
  logic c8, c8_exact;
  int   checks = 0;
  int   failures = 0;
  int   n_ones;
  logic exp_exact, exp_c8;

  switch_carry dut (.m8(m8), .m9(m9), .m10(m10), .approx(approx), .c8(c8), .c8_exact(c8_exact));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {approx, m10, m9, m8} = 4'(v);
      #1;
      n_ones    = int'(m8) + int'(m9) + int'(m10);
      exp_exact = (n_ones >= 2);
      exp_c8    = approx ? (n_ones == 3 || (n_ones == 2 && !m8)) : exp_exact;
      checks += 2;
      if (c8_exact !== exp_exact || c8 !== exp_c8) begin
        failures++;
        $display("FAIL approx=%0b m10=%0b m9=%0b m8=%0b c8=%0b c8_exact=%0b", approx, m10, m9, m8,
                 c8, c8_exact);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
