// bcse_const_mult: multiplier by a constant coefficient using the 2-bit
// binary common subexpression (BCSE) method.
//
// y = COEF * x is computed by shifts and adds only. The coefficient
// magnitude is split into 2-bit groups g_i (i = 0 is the least significant),
// so |COEF| * x = sum_i g_i * x * 4^i. The only non-trivial group value,
// [1 1], needs 3x = x + 2x; that single adder is shared by all groups. Each
// group's partial product comes from a bcse_basic_unit and is shifted left by
// 2i bits by wiring. The shifted partial products are summed in a balanced
// adder tree, so for a 16-bit coefficient (8 groups) the logic depth is
// 1 (for 3x) + 3 (tree) = 4 adders. A negative coefficient multiplies by its
// magnitude and negates the sum. All group selections depend only on the
// parameter COEF, so zero groups vanish in synthesis.
//
// The split into groups, the shared 3x term and the depth of 4 follow the
// design; the balanced tree and the sign handling are this module's choice.
//
// Interface: x is a signed IN_W-bit operand, y the exact signed
// (IN_W+COEF_W)-bit product. COEF must not be -2^(COEF_W-1).
// Timing: purely combinational.
module bcse_const_mult #(
  parameter int unsigned              IN_W   = 17,
  parameter int unsigned              COEF_W = 16,
  parameter logic signed [COEF_W-1:0] COEF   = 16'sd14506
) (
  input  logic signed [IN_W-1:0]        x,
  output logic signed [IN_W+COEF_W-1:0] y
);

  localparam int unsigned OUT_W = IN_W + COEF_W;
  localparam int unsigned PP_W  = IN_W + 2;             // holds 3x
  localparam int unsigned NGRP  = (COEF_W + 1) / 2;     // 2-bit groups
  localparam int unsigned NP2   = 1 << $clog2(NGRP);    // tree leaves
  localparam bit          NEG   = COEF[COEF_W-1];
  localparam logic [COEF_W:0] MAG =
      NEG ? (COEF_W+1)'(-COEF) : (COEF_W+1)'(COEF);     // |COEF|, one spare bit

  logic signed [PP_W-1:0]  x1, x2, x3;
  logic signed [PP_W-1:0]  pp   [NGRP];
  logic signed [OUT_W-1:0] node [2*NP2-1];               // heap-ordered adder tree

  assign x1 = PP_W'(x);
  assign x2 = x1 <<< 1;
  assign x3 = x1 + x2;                                   // the shared subexpression

  for (genvar g = 0; g < NGRP; g++) begin : g_unit
    bcse_basic_unit #(.W(PP_W)) u_bu (
      .x1 (x1),
      .x2 (x2),
      .x3 (x3),
      .h  (MAG[2*g +: 2]),
      .pp (pp[g])
    );
  end

  always_comb begin
    logic signed [OUT_W-1:0] ext;
    for (int i = 0; i < NP2; i++) begin
      if (i < NGRP) begin
        ext = OUT_W'(pp[i]);
        node[NP2-1+i] = ext <<< (2*i);
      end else begin
        node[NP2-1+i] = '0;
      end
    end
    for (int n = NP2 - 2; n >= 0; n--)
      node[n] = node[2*n+1] + node[2*n+2];
  end

  assign y = NEG ? -node[0] : node[0];

endmodule
