// tb_cpa: self-check of the N-bit carry-propagate adder at n = 4
// (exhaustive) and at the default n = 86 (corners and random operands).
// Reference: {cout, s} == a + b computed in wide integers. Counts that
// both cout values were seen. A watchdog ends the run if it hangs.
`timescale 1ns / 1ps
module tb_cpa;
  import tb_rns_pkg::*;

  localparam int NS = 4;
  localparam int NL = 86;

  logic [NS-1:0] as, bs, ss;
  logic          cs;
  logic [NL-1:0] al, bl, sl;
  logic          cl;

  int checks = 0, failures = 0, couts = 0;

  cpa #(.N(NS)) dut_s (.a(as), .b(bs), .s(ss), .cout(cs));
  cpa           dut_l (.a(al), .b(bl), .s(sl), .cout(cl));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, wide_t a, wide_t b, wide_t s, logic c);
    wide_t got = (wide_t'(c) << n) | s;
    checks++;
    if (c) couts++;
    if (got != a + b) begin
      failures++;
      $display("FAIL n=%0d %0h + %0h gave %0h", n, a, b, got);
    end
  endtask

  initial begin
    wide_t a, b;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        as = NS'(i);
        bs = NS'(j);
        #1;
        check(NS, wide_t'(as), wide_t'(bs), wide_t'(ss), cs);
      end
    for (int k = 0; k < 2000; k++) begin
      case (k)
        0: begin a = pow2(NL) - 1; b = 1;            end
        1: begin a = pow2(NL) - 1; b = pow2(NL) - 1; end
        2: begin a = 0;            b = 0;            end
        default: begin
          a = rand_below(pow2(NL));
          b = rand_below(pow2(NL));
        end
      endcase
      al = a[NL-1:0];
      bl = b[NL-1:0];
      #1;
      check(NL, a, b, wide_t'(sl), cl);
    end
    if (couts == 0) begin
      failures++;
      $display("FAIL carry out never seen");
    end
    $display("carry-out cases: %0d", couts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
