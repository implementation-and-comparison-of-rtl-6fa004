// vedic_mult: NxN-bit Vedic multiplier, p = a * b.
//
// The multiplier is the recursive Urdhva Tiryakbhyam ("vertically and
// crosswise") structure. An SxS product is made of four (S/2)x(S/2)
// products and three S-bit carry select adders. With H = S/2, x = {xh, xl}
// and y = {yh, yl}, the four sub-products ll = xl*yl, lh = xl*yh,
// hl = xh*yl and hh = xh*yh (S bits each) are combined as
//   CSLA1: {c1, m} = lh + hl
//   CSLA2: {c2, t} = m + {H zeros, ll[S-1:H]}
//   CSLA3: {c3, u} = hh + {H-1 zeros, c1 | c2, t[S-1:H]}
//   x*y   = {u, t[H-1:0], ll[H-1:0]}
// c1 and c2 are never both 1 (lh + hl + ll/2^H < 2^(S+1)), so the OR gate
// that merges them is exact, and c3 is always 0. The c3 of the outermost
// level is brought out as in the published block diagrams. The carry inputs
// of all adders are tied to 0. The 2x2 leaves are vedic_2x2 blocks.
//
// The recursion is unrolled into levels. Level lv (1 .. log2 N) holds all
// products of size S = 2^lv. Node (i, j) of a level multiplies
// a[i*S +: S] by b[j*S +: S] and is stored at index i*D + j, with
// D = N/S. Level 1 is made of 2x2 blocks; each node of a higher level takes
// its four sub-products from the level below. The netlist is the same as
// the nested block diagrams.
//
// KIND picks the carry select adder architecture (see csla). N must be a
// power of two, at least 4. Purely combinational, no clock.
module vedic_mult
  import vedic_pkg::*;
#(
  parameter int         N    = 128,
  parameter csla_kind_e KIND = MOD_LINEAR
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p,
  output logic           c3
);
  localparam int LEVELS = $clog2(N);

  if (N < 4 || (N & (N - 1)) != 0) begin : g_bad_n
    $fatal(1, "vedic_mult: N = %0d is not a power of two >= 4", N);
  end

  for (genvar lv = 1; lv <= LEVELS; lv++) begin : g_lvl
    localparam int S = 2 ** lv;  // operand width at this level
    localparam int H = S / 2;
    localparam int D = N / S;    // nodes per operand
    localparam int PREV = (lv > 1) ? lv - 1 : 1;  // the level below

    logic [2*S-1:0] prod [D*D];

    for (genvar i = 0; i < D; i++) begin : g_i
      for (genvar j = 0; j < D; j++) begin : g_j
        if (lv == 1) begin : g_leaf
          vedic_2x2 u_2x2 (.a(a[i*S +: S]), .b(b[j*S +: S]), .p(prod[i*D + j]));
        end else begin : g_node
          localparam int DC = 2 * D;  // nodes per operand one level down

          logic [S-1:0] ll, lh, hl, hh;  // partial products
          logic [S-1:0] m, t, u;         // CSLA sums
          logic         c1, c2, c;

          assign ll = g_lvl[PREV].prod[(2*i)   * DC + 2*j];
          assign lh = g_lvl[PREV].prod[(2*i)   * DC + 2*j + 1];
          assign hl = g_lvl[PREV].prod[(2*i+1) * DC + 2*j];
          assign hh = g_lvl[PREV].prod[(2*i+1) * DC + 2*j + 1];

          csla #(.WIDTH(S), .KIND(KIND)) u_csla1 (
            .a(lh), .b(hl), .cin(1'b0), .sum(m), .cout(c1)
          );
          csla #(.WIDTH(S), .KIND(KIND)) u_csla2 (
            .a(m), .b({{H{1'b0}}, ll[S-1:H]}), .cin(1'b0), .sum(t), .cout(c2)
          );

          assign c = c1 | c2;

          if (lv == LEVELS) begin : g_out
            csla #(.WIDTH(S), .KIND(KIND)) u_csla3 (
              .a(hh), .b({{(H-1){1'b0}}, c, t[S-1:H]}), .cin(1'b0),
              .sum(u), .cout(c3)
            );
          end else begin : g_inner
            // C3 of an inner multiplier is always 0 and, as in the block
            // diagrams, goes nowhere.
            csla #(.WIDTH(S), .KIND(KIND)) u_csla3 (
              .a(hh), .b({{(H-1){1'b0}}, c, t[S-1:H]}), .cin(1'b0),
              .sum(u), .cout()
            );
          end

          assign prod[i*D + j] = {u, t[H-1:0], ll[H-1:0]};
        end
      end
    end
  end

  assign p = g_lvl[LEVELS].prod[0];
endmodule
