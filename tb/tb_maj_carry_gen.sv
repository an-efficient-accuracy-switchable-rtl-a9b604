// tb_maj_carry_gen: exhaustive self-check of the majority prefix carry
// network. Every combination of a, b (8 bits each) and c0 is applied
// (131072 vectors, one per 1 ns step). Expected values come from integer
// addition:
//   carry[i]  = bit i of (a[i-1:0] + b[i-1:0] + c0), i = 1..7
//   m8        = carry into bit 4
//   M(m10,m9,m8) = carry out of the full 8-bit sum
//   m10 & m9  = carry out of a[7:4] + b[7:4] + 0
//   m10 | m9  = carry out of a[7:4] + b[7:4] + 1
// A watchdog ends the run with a failure after 200000 steps.
module tb_maj_carry_gen;
  timeunit 1ns; timeprecision 1ps;

  logic [7:0] a, b;
  logic       c0;
  logic [7:1] carry;
  logic       m8, m9, m10;
  int         checks = 0;
  int         failures = 0;

  maj_carry_gen dut (.a(a), .b(b), .c0(c0), .carry(carry), .m8(m8), .m9(m9), .m10(m10));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s a=%02h b=%02h c0=%0b got=%0b exp=%0b", what, a, b, c0, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      {c0, a, b} = 17'(v);
      #1;
      for (int i = 1; i < 8; i++) begin
        automatic int lo_a = int'(a) & ((1 << i) - 1);
        automatic int lo_b = int'(b) & ((1 << i) - 1);
        check(carry[i], 1'(((lo_a + lo_b + int'(c0)) >> i) & 1), $sformatf("carry[%0d]", i));
      end
      check(m8, 1'((((int'(a) & 15) + (int'(b) & 15) + int'(c0)) >> 4) & 1), "m8");
      check((m10 & m9) | (m8 & (m10 | m9)), 1'(((int'(a) + int'(b) + int'(c0)) >> 8) & 1), "c8");
      check(m10 & m9, 1'(((int'(a[7:4]) + int'(b[7:4])) >> 4) & 1), "c8|c4=0");
      check(m10 | m9, 1'(((int'(a[7:4]) + int'(b[7:4]) + 1) >> 4) & 1), "c8|c4=1");
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
