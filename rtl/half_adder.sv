// half_adder: one-bit half adder cell.
//
// Adds two bits and returns a sum bit and a carry bit:
//   s  = a ^ b
//   co = a & b
// Used at bit 0 of the carry-propagate adder and in the upper n-1 bits of
// the modified adder, where only one operand bit and a carry remain (unit
// gate model: area 4, delay 2). Textbook gate equations.
//
// Interface: a, b in; s, co out. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b;
    co = a & b;
  end

endmodule
