// tb_reverse_converter: end-to-end self-check of the two-part RNS reverse
// converter.
//
// 1. The worked example for n = 3: residues <8, 6, 7> of the moduli
//    {9, 7, 8} must give X = 503, with the intermediate values S1 = 011,
//    S2 = 011, S' = 110, cout = 0, S3 = 110110, S4 = 001000.
// 2. n = 3, exhaustive over the dynamic range, with the zero correction,
//    and the same without it (the circuit as published), where exactly 2^n
//    upper parts are expected to come out wrong by one.
// 3. n = 8, exhaustive over X>>n with random low parts.
// (The sizes of the published FPGA comparison, n = 11, 22, 43, are run by
// tb_converter_sizes, the default n = 86 by tb_reverse_converter_full.)
// Every datapath mechanism (CPA carry out, x1 = 2^n, second zero,
// carry into bit n of the modified adder) must have occurred at least once
// at every size, or a failure is counted. A watchdog ends the run if it
// hangs.
`timescale 1ns / 1ps
module tb_reverse_converter;

  localparam int NH = 3;   // number of harnesses

  logic start;
  logic [NH-1:0] done;
  int chk [NH], fl [NH], nc [NH], nx [NH], nz [NH], nb [NH], nf [NH];
  int checks = 0, failures = 0;

  // example instance, n = 3
  logic [3:0] ex1;
  logic [2:0] ex2, ex3;
  logic [8:0] exx;
  reverse_converter #(.N(3)) u_example (.x1(ex1), .x2(ex2), .x3(ex3), .x(exx));

  tb_rc_harness #(.N(3),  .FIX_ZERO(1'b1), .EXHAUSTIVE(1'b1)) h0 (start, done[0], chk[0], fl[0], nc[0], nx[0], nz[0], nb[0], nf[0]);
  tb_rc_harness #(.N(3),  .FIX_ZERO(1'b0), .EXHAUSTIVE(1'b1)) h1 (start, done[1], chk[1], fl[1], nc[1], nx[1], nz[1], nb[1], nf[1]);
  tb_rc_harness #(.N(8),  .FIX_ZERO(1'b1), .EXHAUSTIVE(1'b1)) h2 (start, done[2], chk[2], fl[2], nc[2], nx[2], nz[2], nb[2], nf[2]);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL example %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    start = 1'b0;
    ex1 = 4'b1000;
    ex2 = 3'b110;
    ex3 = 3'b111;
    #1;
    expect_eq("X", longint'(exx), 503);
    expect_eq("S1", longint'(u_example.s1), 3);
    expect_eq("S2", longint'(u_example.s2), 3);
    expect_eq("S'", longint'(u_example.s_prime), 6);
    expect_eq("cout", longint'(u_example.cout), 0);
    expect_eq("S3", longint'(u_example.s3), 'b110110);
    expect_eq("S4", longint'(u_example.s4), 'b001000);
    expect_eq("X(a)", longint'(u_example.xa), 'b111110);

    start = 1'b1;
    wait (&done);
    for (int i = 0; i < NH; i++) begin
      checks += chk[i];
      failures += fl[i];
      $display("harness %0d: checks=%0d failures=%0d cout=%0d x1=2^n:%0d second-zero=%0d carry-into-n=%0d published-flaw=%0d",
               i, chk[i], fl[i], nc[i], nx[i], nz[i], nb[i], nf[i]);
      checks++;
      if (nc[i] == 0 || nx[i] == 0 || nz[i] == 0 || nb[i] == 0) begin
        failures++;
        $display("FAIL harness %0d: a mechanism never occurred", i);
      end
    end
    // the published circuit must be wrong for exactly 2^3 = 8 upper parts
    // (each tried once in the exhaustive n = 3 run)
    expect_eq("published-flaw count n=3", longint'(nf[1]), 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
