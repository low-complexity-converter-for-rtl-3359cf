// tb_opu2: self-check of OPU2 at n = 3 (exhaustive) with and without the
// zero correction, and at the default n = 86 (default parameters, random).
// References: s4 == x1; with FIX_ZERO = 1, s3 == (S' mod (2^n - 1)) * (2^n + 1);
// with FIX_ZERO = 0, s3 == S' * (2^n + 1). Counts how often the all-ones
// S' (second zero) was applied. A watchdog ends the run if it hangs.
`timescale 1ns / 1ps
module tb_opu2;
  import tb_rns_pkg::*;

  localparam int NS = 3;
  localparam int NL = 86;

  logic [NS-1:0]   sp_s;
  logic [NS:0]     x1_s;
  logic [2*NS-1:0] s3_f, s4_f, s3_p, s4_p;
  logic [NL-1:0]   sp_l;
  logic [NL:0]     x1_l;
  logic [2*NL-1:0] s3_l, s4_l;

  int checks = 0, failures = 0, all_ones = 0;

  opu2 #(.N(NS), .FIX_ZERO(1'b1)) dut_fix (.s_prime(sp_s), .x1(x1_s), .s3(s3_f), .s4(s4_f));
  opu2 #(.N(NS), .FIX_ZERO(1'b0)) dut_pub (.s_prime(sp_s), .x1(x1_s), .s3(s3_p), .s4(s4_p));
  opu2                            dut_l   (.s_prime(sp_l), .x1(x1_l), .s3(s3_l), .s4(s4_l));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, bit fix, wide_t sp, wide_t x1, wide_t s3, wide_t s4);
    wide_t m2 = pow2(n) - 1;
    wide_t e3 = fix ? (sp % m2) * (pow2(n) + 1) : sp * (pow2(n) + 1);
    checks++;
    if (sp == m2) all_ones++;
    if (s3 != e3 || s4 != x1) begin
      failures++;
      $display("FAIL n=%0d fix=%0d S'=%0h x1=%0h: s3=%0h (exp %0h) s4=%0h",
               n, fix, sp, x1, s3, e3, s4);
    end
  endtask

  initial begin
    wide_t a, b;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j <= 8; j++) begin
        sp_s = NS'(i);
        x1_s = (NS+1)'(j);
        #1;
        check(NS, 1'b1, wide_t'(sp_s), wide_t'(x1_s), wide_t'(s3_f), wide_t'(s4_f));
        check(NS, 1'b0, wide_t'(sp_s), wide_t'(x1_s), wide_t'(s3_p), wide_t'(s4_p));
      end
    for (int k = 0; k < 1000; k++) begin
      a = (k == 0) ? pow2(NL) - 1 : rand_below(pow2(NL));
      b = (k == 1) ? pow2(NL) : rand_below(pow2(NL) + 1);
      sp_l = a[NL-1:0];
      x1_l = b[NL:0];
      #1;
      check(NL, 1'b1, a, b, wide_t'(s3_l), wide_t'(s4_l));
    end
    if (all_ones == 0) begin
      failures++;
      $display("FAIL all-ones S' never applied");
    end
    $display("all-ones S' cases: %0d", all_ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
