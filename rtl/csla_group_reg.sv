// csla_group_reg: one group of a regular carry select adder.
// Two K-bit ripple carry adders add the same slices at once, one with carry
// in 0 (a half adder followed by K-1 full adders) and one with carry in 1
// (K full adders). A (K+1)-bit 2:1 mux, steered by the carry out of the
// previous group (sel), passes one {carry, sum} word on. Combinational. The
// delay from sel to the outputs is one mux, whatever K is.
module csla_group_reg #(
  parameter int K = 4
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic         sel,
  output logic [K-1:0] s,
  output logic         co
);
  logic [K:0] r0;  // {carry, sum} with carry in 0
  logic [K:0] r1;  // {carry, sum} with carry in 1
  logic       c0_ha;

  half_adder u_ha (.a(a[0]), .b(b[0]), .s(r0[0]), .c(c0_ha));

  if (K > 1) begin : g_rca0
    rca #(.W(K-1)) u_rca0 (
      .a(a[K-1:1]), .b(b[K-1:1]), .ci(c0_ha), .s(r0[K-1:1]), .co(r0[K])
    );
  end else begin : g_rca0_none
    assign r0[1] = c0_ha;
  end

  rca #(.W(K)) u_rca1 (.a(a), .b(b), .ci(1'b1), .s(r1[K-1:0]), .co(r1[K]));

  mux2 #(.W(K+1)) u_mux (.d0(r0), .d1(r1), .sel(sel), .y({co, s}));
endmodule
