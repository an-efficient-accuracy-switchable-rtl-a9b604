// tb_asmp_adder: end-to-end self-check of the accuracy-switchable adder at
// its only (default) size.
//
// Every a, b and cin is applied twice, first in exact mode and then in
// approximate mode, so the mode input switches on every vector (262144
// vectors, one per 1 ns step). Expected values come from integer addition:
//   exact mode:       {cout, sum} = a + b + cin
//   approximate mode: sum as above; cout = carry out of a[7:4] + b[7:4]
// The testbench counts how often each mechanism occurred and fails if one
// never did: exact-mode additions, approximate-mode additions, mode
// switches, and approximate carries that differ from the exact one (the
// lower half's carry propagating through the upper half). It prints the
// approximate mode's error rate and mean error distance.
// A watchdog ends the run with a failure after 400000 steps.
module tb_asmp_adder;
  timeunit 1ns; timeprecision 1ps;

  logic [7:0] a, b, sum;
  logic       cin, approx, cout;
  logic       prev_approx;
  int         checks = 0;
  int         failures = 0;
  int         n_exact = 0, n_approx = 0, n_switch = 0, n_approx_err = 0;
  int         err_dist = 0;
  int         full;
  logic       exp_cout_apx;

  asmp_adder dut (.a(a), .b(b), .cin(cin), .approx(approx), .sum(sum), .cout(cout));

  task automatic fail(input string what);
    failures++;
    if (failures <= 10)
      $display("FAIL %s a=%02h b=%02h cin=%0b approx=%0b sum=%02h cout=%0b", what, a, b, cin,
               approx, sum, cout);
  endtask

  initial begin
    prev_approx = 1'b0;
    for (int v = 0; v < (1 << 17); v++) begin
      {cin, a, b} = 17'(v);
      full = int'(a) + int'(b) + int'(cin);
      exp_cout_apx = 1'((int'(a[7:4]) + int'(b[7:4])) >> 4);
      for (int md = 0; md < 2; md++) begin
        approx = 1'(md);
        #1;
        if (approx != prev_approx) n_switch++;
        prev_approx = approx;
        checks++;
        if (sum !== 8'(full & 255)) fail("sum");
        checks++;
        if (!approx) begin
          n_exact++;
          if (cout !== 1'(full >> 8)) fail("exact cout");
        end else begin
          n_approx++;
          if (cout !== exp_cout_apx) fail("approx cout");
          if (cout != 1'(full >> 8)) begin
            n_approx_err++;
            err_dist += full - int'({cout, sum});
          end
        end
      end
    end
    $display("exact additions=%0d approximate additions=%0d mode switches=%0d", n_exact, n_approx,
             n_switch);
    $display("approximate carry-out errors=%0d (error rate %0.4f), mean error distance %0.3f",
             n_approx_err, real'(n_approx_err) / real'(n_approx),
             real'(err_dist) / real'(n_approx));
    checks++; if (n_exact == 0)      begin failures++; $display("FAIL no exact-mode addition"); end
    checks++; if (n_approx == 0)     begin failures++; $display("FAIL no approximate addition"); end
    checks++; if (n_switch == 0)     begin failures++; $display("FAIL no mode switch"); end
    checks++; if (n_approx_err == 0) begin failures++; $display("FAIL no approximate error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
