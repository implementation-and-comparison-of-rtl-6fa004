// rca: W-bit ripple carry adder, a chain of W full adders.
// {co, s} = a + b + ci. Combinational; the carry ripples from bit 0 to
// bit W-1, so its delay grows linearly with W.
module rca #(
  parameter int W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);
  logic [W:0] c;
  assign c[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[W];
endmodule
