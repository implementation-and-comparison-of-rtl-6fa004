// bec: W-bit binary to excess-1 converter, x = b + 1 (mod 2^W).
// Bit 0 is inverted; every higher bit i is XORed with the AND of all bits
// below it: x0 = ~b0, x1 = b1 ^ b0, x2 = b2 ^ (b0 & b1), and so on. The AND
// terms are formed as a running chain, one AND gate per bit from bit 2 on.
// Purely combinational. In a modified carry select group it replaces the
// carry-in-1 ripple carry adder. It turns the carry-in-0 result {carry, sum}
// into the carry-in-1 result, so a K-bit group needs a (K+1)-bit BEC.
module bec #(
  parameter int W = 3
) (
  input  logic [W-1:0] b,
  output logic [W-1:0] x
);
  // all_ones[i] = b[0] & ... & b[i-1]
  logic [W-1:0] all_ones;

  assign all_ones[0] = 1'b1;
  assign x[0] = ~b[0];

  for (genvar i = 1; i < W; i++) begin : g_bit
    // For i = 1 the AND with the constant 1 reduces to a wire.
    assign all_ones[i] = all_ones[i-1] & b[i-1];
    assign x[i] = b[i] ^ all_ones[i];
  end
endmodule
