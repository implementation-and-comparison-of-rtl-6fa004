// vedic_csla_top: the four NxN Vedic multipliers of the design side by side,
// one for each carry select adder architecture (regular linear, BEC-modified
// linear, regular square-root, BEC-modified square-root). They share the
// operands a and b, and each gives its own 2N-bit product. All four compute
// a * b; they differ only in the adder structure inside, which is what the
// design compares (gate count and carry path). Purely combinational.
// N = 128 is the largest size of the published design, and its default.
// The C3 carry of each multiplier is always 0. An immediate assertion
// checks it in simulation, and it is not brought out. Holding all four
// variants in one top is this design's choice.
module vedic_csla_top
  import vedic_pkg::*;
#(
  parameter int N = 128
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p_reg_linear,
  output logic [2*N-1:0] p_mod_linear,
  output logic [2*N-1:0] p_reg_sqrt,
  output logic [2*N-1:0] p_mod_sqrt
);
  logic [3:0] c3;  // always 0, see vedic_mult

  vedic_mult #(.N(N), .KIND(REG_LINEAR)) u_vm_reg_linear (.a(a), .b(b), .p(p_reg_linear), .c3(c3[0]));
  vedic_mult #(.N(N), .KIND(MOD_LINEAR)) u_vm_mod_linear (.a(a), .b(b), .p(p_mod_linear), .c3(c3[1]));
  vedic_mult #(.N(N), .KIND(REG_SQRT))   u_vm_reg_sqrt   (.a(a), .b(b), .p(p_reg_sqrt),   .c3(c3[2]));
  vedic_mult #(.N(N), .KIND(MOD_SQRT))   u_vm_mod_sqrt   (.a(a), .b(b), .p(p_mod_sqrt),   .c3(c3[3]));

  // C3 is provably 0; flag it if it ever is not.
  always_comb begin
    assert (c3 == 4'b0000 || $isunknown(c3))
      else $error("vedic_csla_top: CSLA3 carry out is set");
  end
endmodule
