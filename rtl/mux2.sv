// mux2: W-bit 2:1 multiplexer with one shared select, y = sel ? d1 : d0.
// A "Mux 2W:W" of a carry select adder is one of these. The select is the
// carry out of the previous group. Written in AND-OR form with one inverted
// select (4 unit gates per bit). Purely combinational.
module mux2 #(
  parameter int W = 5
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         sel,
  output logic [W-1:0] y
);
  logic nsel;
  assign nsel = ~sel;
  assign y = (d0 & {W{nsel}}) | (d1 & {W{sel}});
endmodule
