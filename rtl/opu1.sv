// opu1: first operand propagation unit of the reverse converter.
//
// The mixed-radix digit of the converter is
//   S = | (x2 - x1) * 2^(N-1) |_(2^N - 1)
// because 2^(N-1) is the inverse of 2^N + 1 modulo 2^N - 1. OPU1 produces
// the two terms of that sum without any adder:
//   s1 = | x2 * 2^(N-1) |_(2^N-1)  : multiplying by 2^(N-1) modulo 2^N - 1 is
//        a circular left shift by N-1, i.e. a right rotation by one bit,
//        so s1 = {x2[0], x2[N-1:1]}.
//   s2 = | -x1 * 2^(N-1) |_(2^N-1) : negation modulo 2^N - 1 is the one's
//        complement, so for x1[N] = 0 this is {~x1[0], ~x1[N-1:1]}. When
//        x1[N] = 1 the only canonical residue is x1 = 2^N, whose term is
//        0111...1; a single XOR of ~x1[0] with x1[N] covers both cases.
// The cost is N inverters and one XOR, delay one inverter plus one XOR, as
// the converter's published cost table states. The bit assignment follows
// the converter's equations; nothing here is a local choice except the
// port names.
//
// Interface: x1 (N+1 bits, residue mod 2^N+1, must be <= 2^N) and x2
// (N bits, residue mod 2^N-1, must be <= 2^N-2) in; s1, s2 (N bits) out.
// Purely combinational.
module opu1 #(
  parameter int unsigned N = 86
) (
  input  logic [N:0]   x1,
  input  logic [N-1:0] x2,
  output logic [N-1:0] s1,
  output logic [N-1:0] s2
);

  always_comb begin
    s1 = {x2[0], x2[N-1:1]};
    s2 = {~x1[0] ^ x1[N], ~x1[N-1:1]};
  end

endmodule
