// rrc_interp_filter: square-root raised-cosine FIR interpolation filter
// built with 2-bit BCSE constant multipliers.
//
// Each input sample is turned into INTERP_L = 4 output samples shaped by a
// root-raised-cosine pulse (roll-off 0.22). The 49-tap prototype is cut to a
// centred rectangular window of NTAPS = 7 taps, which removes most adders and
// delay elements, and every coefficient multiplication is a shift-and-add
// network sharing the 3x subexpression (2-bit BCSE), with no multipliers.
//
// Structure (one clock, at the output rate):
//   data_generator    samples rrc_in once every INTERP_L enabled cycles
//   coef_interp_unit  zero-stuffs the samples into a 7-tap delay line,
//                     pre-adds the symmetric tap pairs and multiplies them by
//                     the 4 distinct coefficients
//   accum_unit        adds the products and registers the output
//
// Interface: clk, active-low asynchronous reset_n, clk_en (when low the
// whole filter holds), rrc_in (signed DATA_W bits) sampled at the rising
// edge of a cycle with in_ready && clk_en; rrc_out is the output sample
// rounded and saturated to DATA_W bits, rrc_sat flags a clipped rrc_out,
// rrc_acc the exact sum (COEF_W-2 fractional bits; coefficients are Q2.14
// at COEF_W = 16 with a centre tap of 1.0).
// Timing: one output sample per enabled cycle. An input sample sampled at
// enabled edge E0 first contributes to the output after enabled edge E0+2:
// rrc_out after edge E0+2+m is sum_j h[j] * u[n+m-j] with u the zero-stuffed
// input. The longest path, 1 pre-adder + 4 BCSE adder levels + the
// accumulation chain, is unpipelined, as in the design.
//
// The block split, the interpolation factor, the window, the input width and
// the active-low reset follow the design; the clock/clk_en scheme, the
// handshake and the output format are this implementation's choices.
module rrc_interp_filter #(
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned COEF_W   = 16,
  parameter int unsigned NTAPS    = rrc_pkg::WIN_TAPS,
  parameter int unsigned INTERP_L = rrc_pkg::INTERP_L,
  localparam int unsigned NMULT   = (NTAPS + 1) / 2,
  localparam int unsigned PROD_W  = DATA_W + 1 + COEF_W,
  localparam int unsigned ACC_W   = PROD_W + $clog2(NMULT)
) (
  input  logic                     clk,
  input  logic                     reset_n,
  input  logic                     clk_en,
  input  logic signed [DATA_W-1:0] rrc_in,
  output logic                     in_ready,
  output logic signed [DATA_W-1:0] rrc_out,
  output logic                     rrc_sat,
  output logic signed [ACC_W-1:0]  rrc_acc
);

  logic signed [DATA_W-1:0] x_reg;
  logic                     x_new;
  logic signed [PROD_W-1:0] prod [NMULT];

  data_generator #(
    .DATA_W   (DATA_W),
    .INTERP_L (INTERP_L)
  ) u_data_gen (
    .clk      (clk),
    .reset_n  (reset_n),
    .clk_en   (clk_en),
    .rrc_in   (rrc_in),
    .in_ready (in_ready),
    .x_reg    (x_reg),
    .x_new    (x_new)
  );

  coef_interp_unit #(
    .DATA_W (DATA_W),
    .COEF_W (COEF_W),
    .NTAPS  (NTAPS)
  ) u_coef_interp (
    .clk     (clk),
    .reset_n (reset_n),
    .clk_en  (clk_en),
    .x_in    (x_reg),
    .x_new   (x_new),
    .prod    (prod)
  );

  accum_unit #(
    .PROD_W (PROD_W),
    .NMULT  (NMULT),
    .DATA_W (DATA_W),
    .FRAC   (COEF_W - 2)
  ) u_accum (
    .clk     (clk),
    .reset_n (reset_n),
    .clk_en  (clk_en),
    .prod    (prod),
    .acc_out (rrc_acc),
    .y_out   (rrc_out),
    .sat     (rrc_sat)
  );

endmodule
