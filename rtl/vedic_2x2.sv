// vedic_2x2: 2x2-bit multiplier by the Urdhva Tiryakbhyam ("vertically and
// crosswise") rule, the leaf of the recursive Vedic multiplier.
//   vertical:    p[0] = a0 & b0
//   crosswise:   {c1, p[1]} = a1&b0 + a0&b1      (half adder)
//   vertical:    {p[3], p[2]} = a1&b1 + c1       (half adder)
// Four AND gates and two half adders, as in the published block. Purely
// combinational; p = a * b.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic c1;

  assign p[0] = a[0] & b[0];
  half_adder u_ha_cross (.a(a[0] & b[1]), .b(a[1] & b[0]), .s(p[1]), .c(c1));
  half_adder u_ha_high  (.a(a[1] & b[1]), .b(c1),          .s(p[2]), .c(p[3]));
endmodule
