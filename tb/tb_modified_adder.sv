// tb_modified_adder: self-check of the modified adder at n = 3 (exhaustive
// over the inputs the converter can present) and at the default n = 86
// (corners and random). The converter presents a = S'||S', b = x1 with
// x1 <= 2^n, and never S' = all ones together with cin = 1; those are the
// inputs applied. Reference: (a + b + cin * (2^n + 1)) mod 2^2n in wide
// integers. Counts cases with cin = 1, with x1 = 2^n, and with a carry into
// bit n. A watchdog ends the run if it hangs.
`timescale 1ns / 1ps
module tb_modified_adder;
  import tb_rns_pkg::*;

  localparam int NS = 3;
  localparam int NL = 86;

  logic [2*NS-1:0] as, bs, ss;
  logic            cs;
  logic [2*NL-1:0] al, bl, sl;
  logic            cl;

  int checks = 0, failures = 0;
  int n_cin = 0, n_x1top = 0, n_carry_n = 0;

  modified_adder #(.N(NS)) dut_s (.a(as), .b(bs), .cin(cs), .sum(ss));
  modified_adder           dut_l (.a(al), .b(bl), .cin(cl), .sum(sl));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, wide_t sp, wide_t x1, logic c, wide_t sum);
    wide_t a = sp * (pow2(n) + 1);
    wide_t e = (a + x1 + (c ? pow2(n) + 1 : 0)) % pow2(2 * n);
    checks++;
    if (c) n_cin++;
    if (x1 == pow2(n)) n_x1top++;
    if ((sp + (x1 % pow2(n)) + c) >= pow2(n)) n_carry_n++;
    if (sum != e) begin
      failures++;
      $display("FAIL n=%0d S'=%0h x1=%0h cin=%0d: sum=%0h exp %0h", n, sp, x1, c, sum, e);
    end
  endtask

  initial begin
    wide_t sp, x1;
    logic  c;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j <= 8; j++)
        for (int k = 0; k < 2; k++) begin
          if (i == 7 && k == 1) continue;
          as = {NS'(i), NS'(i)};
          bs = (2*NS)'(j);
          cs = k[0];
          #1;
          check(NS, wide_t'(i), wide_t'(j), cs, wide_t'(ss));
        end
    for (int k = 0; k < 2000; k++) begin
      case (k)
        0: begin sp = pow2(NL) - 1; x1 = pow2(NL);     c = 1'b0; end
        1: begin sp = pow2(NL) - 2; x1 = pow2(NL) - 1; c = 1'b1; end
        2: begin sp = pow2(NL) - 2; x1 = pow2(NL);     c = 1'b1; end
        default: begin
          sp = rand_below(pow2(NL));
          x1 = rand_below(pow2(NL) + 1);
          c  = ($urandom & 1) != 0;
          if (sp == pow2(NL) - 1) c = 1'b0;
        end
      endcase
      al = {sp[NL-1:0], sp[NL-1:0]};
      bl = (2*NL)'(x1);
      cl = c;
      #1;
      check(NL, sp, x1, c, wide_t'(sl));
    end
    if (n_cin == 0 || n_x1top == 0 || n_carry_n == 0) begin
      failures++;
      $display("FAIL a case class was never reached");
    end
    $display("cin=1: %0d, x1=2^n: %0d, carry into bit n: %0d", n_cin, n_x1top, n_carry_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
