// tb_maj_sum_gen: exhaustive self-check of the majority sum generator at
// its default width of 8. For every a, b and carry-in the testbench works
// out the ripple carries itself (integer addition of the low bits), drives
// them on the carry input, and expects s = (a + b + cin) mod 256.
// 131072 vectors, one per 1 ns step; watchdog after 200000 steps.
module tb_maj_sum_gen;
  timeunit 1ns; timeprecision 1ps;

  localparam int W = 8;

  logic [W-1:0] a, b, s;
  logic [W:0]   carry;
  logic         cin;
  int           checks = 0;
  int           failures = 0;

  maj_sum_gen dut (.a(a), .b(b), .carry(carry), .s(s));

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {cin, a, b} = 17'(v);
      for (int i = 0; i <= W; i++)
        carry[i] = 1'((((int'(a) & ((1 << i) - 1)) + (int'(b) & ((1 << i) - 1)) + int'(cin)) >> i) & 1);
      #1;
      checks++;
      if (s !== 8'((int'(a) + int'(b) + int'(cin)) & 255)) begin
        failures++;
        if (failures <= 10) $display("FAIL a=%02h b=%02h cin=%0b s=%02h", a, b, cin, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
