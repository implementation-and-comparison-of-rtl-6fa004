// full_adder: one-bit full adder in two-XOR, two-AND, one-OR form:
// s = a ^ b ^ ci, co = (a & b) | ((a ^ b) & ci). Purely combinational.
// The gate form is this design's choice; it is the 13-unit cell of the
// unit-gate area model (XOR = 5 units).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = (a & b) | (p & ci);
endmodule
