// csla: WIDTH-bit carry select adder, {cout, sum} = a + b + cin.
//
// The word is cut into groups (see vedic_pkg for the schedule). Group 0 is a
// plain ripple carry adder that takes cin. Every other group computes its
// result for both possible incoming carries ahead of time. The carry out of
// the group below then only steers that group's mux, so the long carry path
// is one mux per group instead of one full adder per bit.
//
// KIND picks one of four architectures:
//   REG_LINEAR  4-bit groups, each with two RCAs (carry in 0 and 1) and a mux
//   MOD_LINEAR  4-bit groups, each with one RCA, a 5-bit BEC and a mux
//   REG_SQRT    groups of 2, 2, 3, 4, 5 bits per 16 bits, two RCAs each
//   MOD_SQRT    groups of 2, 2, 3, 4, 5 bits per 16 bits, RCA + BEC each
// The 16-bit structures are those of the published design. Above 16 bits a
// SQRT adder is a chain of 16-bit SQRT adders, and below 16 bits the sequence
// is cut off at the width. Both are this design's reading of the published
// gate counts. Widths: multiples of 4 for LINEAR; 4, 8, 12 or multiples of 16
// for SQRT. Others stop elaboration.
//
// Purely combinational, no clock.
module csla
  import vedic_pkg::*;
#(
  parameter int         WIDTH = 16,
  parameter csla_kind_e KIND  = MOD_SQRT
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int NG = csla_num_groups(KIND, WIDTH);

  if (!csla_width_ok(KIND, WIDTH)) begin : g_bad_width
    $fatal(1, "csla: WIDTH %0d is not supported by this architecture", WIDTH);
  end

  // c[g] is the carry into group g; c[NG] is the carry out.
  logic [NG:0] c;
  assign c[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int LO = csla_group_lo(KIND, WIDTH, g);
    localparam int K  = csla_group_size(KIND, WIDTH, g);

    if (csla_group_plain(KIND, WIDTH, g)) begin : g_plain
      rca #(.W(K)) u_rca (
        .a(a[LO+K-1:LO]), .b(b[LO+K-1:LO]), .ci(c[g]),
        .s(sum[LO+K-1:LO]), .co(c[g+1])
      );
    end else if (is_modified(KIND)) begin : g_mod
      csla_group_mod #(.K(K)) u_grp (
        .a(a[LO+K-1:LO]), .b(b[LO+K-1:LO]), .sel(c[g]),
        .s(sum[LO+K-1:LO]), .co(c[g+1])
      );
    end else begin : g_reg
      csla_group_reg #(.K(K)) u_grp (
        .a(a[LO+K-1:LO]), .b(b[LO+K-1:LO]), .sel(c[g]),
        .s(sum[LO+K-1:LO]), .co(c[g+1])
      );
    end
  end

  assign cout = c[NG];
endmodule
