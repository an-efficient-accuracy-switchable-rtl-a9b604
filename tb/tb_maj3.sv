// tb_maj3: exhaustive self-check of the three-input majority gate.
// All eight input patterns are applied; the expected output is "two or more
// inputs are 1", worked out by counting ones. A watchdog ends the run with a
// failure if it has not finished within 1000 steps of 1 ns.
module tb_maj3;
  timeunit 1ns; timeprecision 1ps;

  logic x, y, z, m;
  int   checks = 0;
  int   failures = 0;

  maj3 dut (.x(x), .y(y), .z(z), .m(m));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      checks++;
      if (m !== ((int'(x) + int'(y) + int'(z)) >= 2)) begin
        failures++;
        $display("FAIL maj3 x=%0b y=%0b z=%0b m=%0b", x, y, z, m);
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
