// reverse_converter: two-part RNS to binary converter for the moduli set
// {2^N + 1, 2^N - 1, 2^N}.
//
// In the two-part representation the low N bits of a 3N-bit number X are
// kept in binary (x3 = X mod 2^N) and only the upper part Xh = X >> N is kept
// as residues x1 = Xh mod (2^N + 1) and x2 = Xh mod (2^N - 1). The converter
// recovers Xh by mixed-radix conversion,
//   Xh = x1 + S * (2^N + 1),  S = |(x2 - x1) * 2^(N-1)|_(2^N - 1),
// and appends x3: X = Xh || x3. The datapath is
//   OPU1    : s1 = rotate(x2), s2 = rotate(~x1) with one XOR   (no adder)
//   CPA     : {cout, S'} = s1 + s2, plain N-bit adder          (no end-around carry)
//   OPU2    : S3 = S' || S', S4 = x1                           (wiring)
//   Adder1  : Xh = S3 + S4 + cout * (2^N + 1), N+1 FA + N-1 HA
// Instance names and the default N = 86 (a 258-bit result) follow the
// published RTL view of the converter; the datapath follows its block
// diagram. FIX_ZERO = 1 (default) adds a zero detector in OPU2 that this
// design introduces to fix the published circuit's wrong result when
// S' = 2^N - 1; FIX_ZERO = 0 gives the circuit exactly as published (see
// opu2.sv).
//
// Interface: x1 (N+1 bits, <= 2^N), x2 (N bits, <= 2^N - 2), x3 (N bits) in;
// x (3N bits) out. Purely combinational, no clock or reset; the critical
// path is one INV, one XOR, N HA and 2N FA delays.
module reverse_converter #(
  parameter int unsigned N        = 86,
  parameter bit          FIX_ZERO = 1'b1
) (
  input  logic [N:0]     x1,
  input  logic [N-1:0]   x2,
  input  logic [N-1:0]   x3,
  output logic [3*N-1:0] x
);

  logic [N-1:0]   s1, s2;
  logic [N-1:0]   s_prime;
  logic           cout;
  logic [2*N-1:0] s3, s4;
  logic [2*N-1:0] xa;

  opu1 #(.N(N)) OPU1 (
    .x1(x1),
    .x2(x2),
    .s1(s1),
    .s2(s2)
  );

  cpa #(.N(N)) CPAcout (
    .a   (s1),
    .b   (s2),
    .s   (s_prime),
    .cout(cout)
  );

  opu2 #(.N(N), .FIX_ZERO(FIX_ZERO)) OPU2 (
    .s_prime(s_prime),
    .x1     (x1),
    .s3     (s3),
    .s4     (s4)
  );

  modified_adder #(.N(N)) Adder1 (
    .a  (s3),
    .b  (s4),
    .cin(cout),
    .sum(xa)
  );

  assign x = {xa, x3};

endmodule
