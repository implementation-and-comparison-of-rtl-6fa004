// csla_group_mod: one group of a modified (BEC based) carry select adder.
// One K-bit ripple carry adder with carry in 0 (a half adder followed by K-1
// full adders) gives the (K+1)-bit word {carry, sum}. A (K+1)-bit
// binary-to-excess-1 converter adds one to that word, which is the result
// the carry-in-1 adder of a regular group would give. A (K+1)-bit 2:1 mux,
// steered by the carry out of the previous group (sel), picks the RCA word
// (sel = 0) or the BEC word (sel = 1). Combinational. The delay from sel to
// the outputs is one mux.
module csla_group_mod #(
  parameter int K = 4
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic         sel,
  output logic [K-1:0] s,
  output logic         co
);
  logic [K:0] r0;  // {carry, sum} with carry in 0
  logic [K:0] r1;  // r0 + 1
  logic       c0_ha;

  half_adder u_ha (.a(a[0]), .b(b[0]), .s(r0[0]), .c(c0_ha));

  if (K > 1) begin : g_rca0
    rca #(.W(K-1)) u_rca0 (
      .a(a[K-1:1]), .b(b[K-1:1]), .ci(c0_ha), .s(r0[K-1:1]), .co(r0[K])
    );
  end else begin : g_rca0_none
    assign r0[1] = c0_ha;
  end

  bec #(.W(K+1)) u_bec (.b(r0), .x(r1));

  mux2 #(.W(K+1)) u_mux (.d0(r0), .d1(r1), .sel(sel), .y({co, s}));
endmodule
