// bcse_basic_unit: one basic unit of the 2-bit BCSE constant multiplier.
//
// The coefficient is cut into 2-bit groups. For each group the unit returns
// the partial product group*x, choosing among the four values a 2-bit group
// can take:
//   [0 0] -> 0,  [0 1] -> x,  [1 0] -> 2x,  [1 1] -> 3x.
// The first three need no adder (2x is a wired shift). 3x is the binary
// common subexpression; it is formed once per multiplier (x + 2x) and fed to
// every basic unit, so the unit itself is a 4-way selector. When the group is
// a constant, synthesis reduces it to wiring.
//
// Interface: x1, x2, x3 are x, 2x and 3x, already sign-extended to W bits;
// h is the coefficient group; pp is the selected partial product.
// Timing: purely combinational.
module bcse_basic_unit #(
  parameter int unsigned W = 18
) (
  input  logic signed [W-1:0] x1,
  input  logic signed [W-1:0] x2,
  input  logic signed [W-1:0] x3,
  input  logic        [1:0]   h,
  output logic signed [W-1:0] pp
);

  always_comb begin
    unique case (h)
      2'b00:   pp = '0;
      2'b01:   pp = x1;
      2'b10:   pp = x2;
      default: pp = x3;
    endcase
  end

endmodule
