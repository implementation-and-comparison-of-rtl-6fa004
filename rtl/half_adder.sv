// half_adder: one-bit half adder, s = a ^ b and c = a & b.
// It is bit 0 of every ripple carry adder whose carry in is a constant 0,
// and both adders of the 2x2 Vedic block. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
