// tb_half_adder: exhaustive self-check of the half_adder cell.
// Applies all four input combinations and compares {co, s} with a + b.
// A watchdog ends the run if it hangs.
`timescale 1ns / 1ps
module tb_half_adder;
  logic a, b, s, co;
  int   checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .co(co));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> co=%0d s=%0d", a, b, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
