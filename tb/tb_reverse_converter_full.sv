// tb_reverse_converter_full: end-to-end check of the reverse converter with
// every parameter at its default (n = 86, 258-bit dynamic range, zero
// correction on).
//
// Numbers X from the dynamic range [0, 2^258 - 2^86) are forward-converted
// with plain remainders (x1 = (X>>86) mod 2^86+1, x2 = (X>>86) mod 2^86-1,
// x3 = X mod 2^86), applied, and the 258-bit output compared with X. Corner
// values come first (zero, top of range, x1 = 2^86, x1 = x2, x1 = 2^86 - 1),
// then random numbers. Counts the CPA carry out, x1 = 2^86, the corrected
// second zero S' = all ones and a carry into bit 86 of the modified adder;
// each must occur. A watchdog ends the run if it hangs.
`timescale 1ns / 1ps
module tb_reverse_converter_full;
  import tb_rns_pkg::*;

  localparam int N     = 86;
  localparam int COUNT = 20000;

  logic [N:0]     x1;
  logic [N-1:0]   x2, x3;
  logic [3*N-1:0] x;

  int checks = 0, failures = 0;
  int n_cout = 0, n_x1top = 0, n_zero = 0, n_carry_n = 0;

  reverse_converter dut (.x1(x1), .x2(x2), .x3(x3), .x(x));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t xin, r1, r2, r3;
    wide_t corner [6];
    corner[0] = 0;
    corner[1] = pow2(3 * N) - pow2(N) - 1;
    corner[2] = pow2(2 * N);
    corner[3] = pow2(N) * 5 + 3;
    corner[4] = (pow2(N) - 1) << N;
    corner[5] = ((pow2(N) + 1) * (pow2(N) - 2)) << N;
    for (int k = 0; k < COUNT + 6; k++) begin
      xin = (k < 6) ? corner[k] : rand_below(pow2(3 * N) - pow2(N));
      forward(N, xin, r1, r2, r3);
      x1 = r1[N:0];
      x2 = r2[N-1:0];
      x3 = r3[N-1:0];
      #1;
      checks++;
      if (dut.cout) n_cout++;
      if (r1 == pow2(N)) n_x1top++;
      if (&dut.s_prime) n_zero++;
      if (wide_t'(dut.s_prime) + (r1 % pow2(N)) + wide_t'(dut.cout) >= pow2(N)) n_carry_n++;
      if (wide_t'(x) != xin) begin
        failures++;
        if (failures < 10)
          $display("FAIL X=%0h residues <%0h,%0h,%0h>: got %0h", xin, r1, r2, r3, x);
      end
    end
    $display("cout=%0d x1=2^n:%0d second-zero=%0d carry-into-n=%0d",
             n_cout, n_x1top, n_zero, n_carry_n);
    checks++;
    if (n_cout == 0 || n_x1top == 0 || n_zero == 0 || n_carry_n == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
