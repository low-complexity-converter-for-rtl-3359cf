// tb_full_adder: exhaustive self-check of the full_adder cell.
// Applies all eight input combinations and compares {co, s} with the
// integer sum a + b + ci. A watchdog ends the run if it hangs.
`timescale 1ns / 1ps
module tb_full_adder;
  logic a, b, ci, s, co;
  int   checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks++;
      if ({co, s} != 2'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d -> co=%0d s=%0d", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
