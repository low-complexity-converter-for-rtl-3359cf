// cpa: N-bit ripple carry-propagate adder of the reverse converter.
//
// Adds s1 and s2 from OPU1. A modulo 2^N - 1 adder would feed its carry out
// back in (end-around carry), which doubles the carry path. The converter
// instead keeps the plain sum here, s (called S') and cout, and adds cout
// later in the modified adder, where the final value S' + cout is needed
// anyway. The adder is a half adder at bit 0 followed by N-1 full adders,
// as in the converter's cost table.
//
// Interface: a, b (N bits) in; s (N bits) and cout out, with
// {cout, s} = a + b. Purely combinational; delay one HA plus N-1 FA.
module cpa #(
  parameter int unsigned N = 86
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);

  // c[i] is the carry into bit i (bit 0 has none).
  logic [N:1] c;

  half_adder u_ha0 (
    .a (a[0]),
    .b (b[0]),
    .s (s[0]),
    .co(c[1])
  );

  for (genvar i = 1; i < N; i++) begin : g_fa
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign cout = c[N];

endmodule
