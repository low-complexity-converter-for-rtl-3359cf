// tb_rc_harness: drives one reverse_converter instance of size N and checks
// it end to end, for use by the converter testbenches.
//
// Each vector starts from a binary number X in [0, 2^3N - 2^N), the dynamic
// range of the moduli set. The harness forward-converts it with plain
// remainders (x1 = (X>>N) mod 2^N+1, x2 = (X>>N) mod 2^N-1, x3 = X mod 2^N),
// applies the residues and compares the converter's output with X. With
// FIX_ZERO = 0 (the circuit as published) the expected output for the
// inputs where the CPA returns S' = 2^N - 1 is (X>>N) - 1 mod 2^2N, i.e. the
// published circuit's known wrong answer; those cases are counted in
// n_flaw. EXHAUSTIVE = 1 walks every upper part X>>N (random x3); otherwise
// COUNT random vectors are applied after a set of corner values.
//
// It also counts how often each mechanism of the datapath was exercised:
// CPA carry out, x1 = 2^N (the XOR in OPU1), S' = all ones (second zero,
// corrected when FIX_ZERO = 1), and a carry into bit N of the modified
// adder. One vector is applied per time unit; done rises at the end.
`timescale 1ns / 1ps
module tb_rc_harness #(
  parameter int N          = 3,
  parameter bit FIX_ZERO   = 1'b1,
  parameter bit EXHAUSTIVE = 1'b1,
  parameter int COUNT      = 100
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_cout,
  output int   n_x1top,
  output int   n_zero,
  output int   n_carry_n,
  output int   n_flaw
);
  import tb_rns_pkg::*;

  logic [N:0]     x1;
  logic [N-1:0]   x2, x3;
  logic [3*N-1:0] x;

  reverse_converter #(.N(N), .FIX_ZERO(FIX_ZERO)) dut (.x1(x1), .x2(x2), .x3(x3), .x(x));

  task automatic apply(wide_t xin);
    wide_t r1, r2, r3, xh, exp_x;
    forward(N, xin, r1, r2, r3);
    x1 = r1[N:0];
    x2 = r2[N-1:0];
    x3 = r3[N-1:0];
    #1;
    xh = xin >> N;
    exp_x = xin;
    if (!FIX_ZERO && published_flaw(N, r1, r2)) begin
      n_flaw++;
      exp_x = (((xh + pow2(2 * N) - 1) % pow2(2 * N)) << N) | r3;
    end
    checks++;
    if (dut.cout) n_cout++;
    if (r1 == pow2(N)) n_x1top++;
    if (&dut.s_prime) n_zero++;
    if (wide_t'(dut.s3[N-1:0]) + wide_t'(dut.s4[N-1:0]) + wide_t'(dut.cout) >= pow2(N))
      n_carry_n++;
    if (wide_t'(x) != exp_x) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d FIX=%0d X=%0h residues <%0h,%0h,%0h>: got %0h expected %0h",
                 N, FIX_ZERO, xin, r1, r2, r3, x, exp_x);
    end
  endtask

  initial begin
    wide_t top_range, xin;
    wide_t corner [6];
    int    total;
    done = 1'b0;
    checks = 0; failures = 0; n_cout = 0; n_x1top = 0;
    n_zero = 0; n_carry_n = 0; n_flaw = 0;
    x1 = '0; x2 = '0; x3 = '0;
    wait (start);
    top_range = pow2(2 * N) - 1;   // X>>N lies in [0, 2^2N - 2]
    // corners: zero, top of range, x1 = 2^N, x1 = x2, x1 = 2^N - 1,
    // largest multiple of 2^N + 1
    corner[0] = 0;
    corner[1] = pow2(3 * N) - pow2(N) - 1;
    corner[2] = pow2(2 * N);
    corner[3] = pow2(N) * 5 + 3;
    corner[4] = (pow2(N) - 1) << N;
    corner[5] = ((pow2(N) + 1) * (pow2(N) - 2)) << N;
    total = EXHAUSTIVE ? int'(top_range) : COUNT + 6;
    for (int k = 0; k < total; k++) begin
      if (EXHAUSTIVE) xin = (wide_t'(k) << N) | rand_below(pow2(N));
      else if (k < 6) xin = corner[k];
      else            xin = rand_below(pow2(3 * N) - pow2(N));
      apply(xin);
    end
    done = 1'b1;
  end
endmodule
