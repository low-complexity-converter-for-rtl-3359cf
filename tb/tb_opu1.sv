// tb_opu1: self-check of OPU1 at n = 3 (exhaustive over canonical residues)
// and at the default n = 86 (corner values and random residues).
// References: s1 == x2 * 2^(n-1) mod (2^n - 1) and
// s2 == -x1 * 2^(n-1) mod (2^n - 1), compared as residues because s2 may
// be the all-ones form of zero. For x1 = 2^n the exact pattern 0111...1 is
// checked as well. A watchdog ends the run if it hangs.
`timescale 1ns / 1ps
module tb_opu1;
  import tb_rns_pkg::*;

  localparam int NS = 3;
  localparam int NL = 86;

  logic [NS:0]   x1s;
  logic [NS-1:0] x2s, s1s, s2s;
  logic [NL:0]   x1l;
  logic [NL-1:0] x2l, s1l, s2l;

  int checks = 0, failures = 0;

  opu1 #(.N(NS)) dut_s (.x1(x1s), .x2(x2s), .s1(s1s), .s2(s2s));
  opu1           dut_l (.x1(x1l), .x2(x2l), .s1(s1l), .s2(s2l));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, wide_t x1, wide_t x2, wide_t s1, wide_t s2);
    wide_t m2 = pow2(n) - 1;
    wide_t r1 = (x2 * pow2(n - 1)) % m2;
    wide_t r2 = (m2 - (x1 * pow2(n - 1)) % m2) % m2;
    checks++;
    if (s1 != r1 || (s2 % m2) != r2) begin
      failures++;
      $display("FAIL n=%0d x1=%0h x2=%0h: s1=%0h (exp %0h) s2=%0h (exp %0h mod m2)",
               n, x1, x2, s1, r1, s2, r2);
    end
    if (x1 == pow2(n)) begin
      checks++;
      if (s2 != pow2(n - 1) - 1) begin
        failures++;
        $display("FAIL n=%0d x1=2^n: s2=%0h, expected 0111..1", n, s2);
      end
    end
  endtask

  initial begin
    wide_t a, b;
    // exhaustive at n = 3: x1 in [0, 8], x2 in [0, 6]
    for (int i = 0; i <= 8; i++)
      for (int j = 0; j <= 6; j++) begin
        x1s = (NS+1)'(i);
        x2s = NS'(j);
        #1;
        check(NS, wide_t'(x1s), wide_t'(x2s), wide_t'(s1s), wide_t'(s2s));
      end
    // n = 86: corners then random
    for (int k = 0; k < 2000; k++) begin
      case (k)
        0: begin a = 0;              b = 0;              end
        1: begin a = pow2(NL);       b = pow2(NL) - 2;   end
        2: begin a = pow2(NL) - 1;   b = 1;              end
        3: begin a = 1;              b = pow2(NL) - 2;   end
        default: begin
          a = rand_below(pow2(NL) + 1);
          b = rand_below(pow2(NL) - 1);
        end
      endcase
      x1l = a[NL:0];
      x2l = b[NL-1:0];
      #1;
      check(NL, a, b, wide_t'(s1l), wide_t'(s2l));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
