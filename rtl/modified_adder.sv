// modified_adder: final 2N-bit adder of the reverse converter.
//
// Computes sum = a + b + cin * (2^N + 1) modulo 2^2N, where a = S3 = S'||S',
// b = S4 = x1 (only bits N:0 can be set) and cin is the CPA's carry out.
// The carry that the CPA did not feed back (no end-around carry) is added
// here at both places where S appears: bit 0 and bit N.
//
// Structure, as counted in the converter's cost table: N+1 full adders for
// bits 0..N and N-1 half adders for bits N+1..2N-1, a single ripple chain.
//   bit 0      : FA(a[0], b[0], cin)
//   bits 1..N-1: FA(a[i], b[i], carry)
//   bit N      : FA(a[N], b[N] | carry, cin)
//   bits > N   : HA(a[i], carry)
// Bit N receives four bits. The published design does not say how these fit
// one FA; this design merges b[N] = x1[N] with the carry from bit N-1 by an
// OR. That is exact for canonical inputs: x1[N] = 1 means x1 = 2^N, so
// x1[N-1:0] = 0, and a carry out of bit N-1 would then need S' = all ones
// together with cin = 1, which the CPA never produces. So one OR gate is
// added to the published count. The carry out of bit 2N-1 is dropped because
// X(a) < 2^2N - 1. A deferred assertion flags the case the merge cannot
// handle (b[N] and the carry into bit N both 1), which only non-canonical
// residues can cause. Bits 2N-1:N+1 of b are not read: OPU2 ties them to zero,
// which is the reason the upper part needs only half adders.
//
// Interface: a, b (2N bits), cin in; sum (2N bits) out. Purely
// combinational; delay N-1 HA plus N+1 FA.
module modified_adder #(
  parameter int unsigned N = 86
) (
  input  logic [2*N-1:0] a,
  input  logic [2*N-1:0] b,
  input  logic           cin,
  output logic [2*N-1:0] sum
);

  // c[i] is the carry into bit i; the carry into bit 0 is cin.
  logic [2*N:1] c;
  logic         b_n;   // b[N] merged with the carry into bit N

  full_adder u_fa0 (
    .a (a[0]),
    .b (b[0]),
    .ci(cin),
    .s (sum[0]),
    .co(c[1])
  );

  for (genvar i = 1; i < N; i++) begin : g_lo
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (sum[i]),
      .co(c[i+1])
    );
  end

  assign b_n = b[N] | c[N];

  // The OR merge above is exact only if b[N] and the carry into bit N are
  // never both set, which holds for every input the converter can present.
  always_comb begin
    assert final (!(b[N] && c[N]))
      else $error("modified_adder: x1[N] and carry into bit N both set (non-canonical input)");
  end

  full_adder u_fan (
    .a (a[N]),
    .b (b_n),
    .ci(cin),
    .s (sum[N]),
    .co(c[N+1])
  );

  for (genvar i = N + 1; i < 2 * N; i++) begin : g_hi
    half_adder u_ha (
      .a (a[i]),
      .b (c[i]),
      .s (sum[i]),
      .co(c[i+1])
    );
  end

endmodule
