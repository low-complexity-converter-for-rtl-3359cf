// full_adder: one-bit full adder cell.
//
// Adds three bits and returns a sum bit and a carry bit:
//   s  = a ^ b ^ ci
//   co = (a & b) | (ci & (a ^ b))       (the majority of a, b, ci)
// This is the FA cell from which the converter's carry-propagate adder and
// its modified adder are built; the converter's cost figures are counted in
// these cells (area 7, delay 4 in the unit-gate model). The gate equations
// are the usual two-half-adder form, not something specific to the
// converter. The carry input is used once, in the last AND-OR stage, which
// keeps the carry chain of a long ripple adder a single path from ci to co.
//
// Interface: a, b, ci in; s, co out. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (ci & (a ^ b));
  end

endmodule
