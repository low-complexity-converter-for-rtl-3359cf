// opu2: second operand propagation unit of the reverse converter.
//
// The first 2N bits of the result are X(a) = x1 + S * (2^N + 1) with
// S = S' + cout. Multiplying by 2^N + 1 is the same as writing S twice, so
// X(a) = (S' || S') + (0...0 || x1) + cout * (2^N + 1). OPU2 forms the two
// vectors of that sum:
//   s3 = {S', S'}              (2N bits)
//   s4 = x1 zero-extended      (2N bits, bits 2N-1:N+1 always zero)
// and the modified adder adds them together with cout. In the converter as
// published this unit is wiring only.
//
// FIX_ZERO (this design's addition, default on): the plain CPA can return
// S' = 2^N - 1 with cout = 0, the second form of zero modulo 2^N - 1. This
// happens exactly when x1 = x2 <= 2^N - 2 or when x1 = 2^N and x2 = 1. The
// published sum then adds 2^2N - 1 and the 2N-bit X(a) wraps to x1 - 1. With
// FIX_ZERO = 1 an N-input AND detects S' = all ones and clears s3, which
// costs that detector and N AND gates. FIX_ZERO = 0 reproduces the published
// wiring-only unit, including the wrong results.
//
// Interface: s_prime (N bits) and x1 (N+1 bits) in; s3, s4 (2N bits) out.
// Purely combinational.
module opu2 #(
  parameter int unsigned N        = 86,
  parameter bit          FIX_ZERO = 1'b1
) (
  input  logic [N-1:0]   s_prime,
  input  logic [N:0]     x1,
  output logic [2*N-1:0] s3,
  output logic [2*N-1:0] s4
);

  logic [N-1:0] s_eff;

  always_comb begin
    if (FIX_ZERO && (&s_prime)) s_eff = '0;
    else                        s_eff = s_prime;
    s3 = {s_eff, s_eff};
    s4 = {{(N-1){1'b0}}, x1};
  end

endmodule
