// coef_interp_unit: coefficient generator and interpolation unit.
//
// Interpolation by zero stuffing happens ahead of the filter taps: every
// enabled cycle the tap delay line u[] shifts by one, taking the new input
// sample when x_new is high and a zero otherwise, so u[] holds the upsampled
// sequence. The NTAPS coefficients are the centred rectangular window of the
// 49-tap root-raised-cosine prototype (rrc_pkg), rounded to COEF_W bits.
// Because the window is symmetric, taps j and NTAPS-1-j share a coefficient:
// their samples are pre-added and only NMULT = (NTAPS+1)/2 constant
// multipliers are built, each a 2-bit BCSE shift-and-add network
// (bcse_const_mult). The products go to the accumulation unit.
//
// The window of 7 taps, the interpolation factor, and the BCSE multipliers
// follow the design; the direct-form delay line with pre-adders is this
// implementation's reading of how the taps are arranged.
//
// Interface: x_in/x_new from the data generator; prod[i] is the product of
// coefficient i (tap i and its mirror) with the pre-added sample pair.
// Timing: u[] is registered on clk when clk_en is high; the products are
// combinational from u[]. Reset (reset_n low, asynchronous) clears u[].
module coef_interp_unit #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned NTAPS  = 7,
  localparam int unsigned NMULT  = (NTAPS + 1) / 2,
  localparam int unsigned PROD_W = DATA_W + 1 + COEF_W
) (
  input  logic                     clk,
  input  logic                     reset_n,
  input  logic                     clk_en,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic                     x_new,
  output logic signed [PROD_W-1:0] prod [NMULT]
);

  localparam int unsigned SUM_W = DATA_W + 1;

  logic signed [DATA_W-1:0] u   [NTAPS];
  logic signed [SUM_W-1:0]  sum [NMULT];

  // Zero-stuffing tap delay line
  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      for (int j = 0; j < NTAPS; j++) u[j] <= '0;
    end else if (clk_en) begin
      u[0] <= x_new ? x_in : '0;
      for (int j = 1; j < NTAPS; j++) u[j] <= u[j-1];
    end
  end

  // Symmetric pre-adders; an odd window has an unpaired centre tap
  always_comb begin
    for (int i = 0; i < NMULT; i++) begin
      if (NTAPS - 1 - i == i) sum[i] = SUM_W'(u[i]);
      else                    sum[i] = SUM_W'(u[i]) + SUM_W'(u[NTAPS-1-i]);
    end
  end

  for (genvar i = 0; i < NMULT; i++) begin : g_mult
    localparam logic signed [COEF_W-1:0] C = COEF_W'(rrc_pkg::coef_q(COEF_W, NTAPS, i));
    bcse_const_mult #(
      .IN_W   (SUM_W),
      .COEF_W (COEF_W),
      .COEF   (C)
    ) u_mult (
      .x (sum[i]),
      .y (prod[i])
    );
  end

  initial begin
    assert (NTAPS % 2 == 1 && NTAPS <= rrc_pkg::PROTO_TAPS)
      else $error("NTAPS must be odd and at most %0d", rrc_pkg::PROTO_TAPS);
    assert (COEF_W >= 8 && COEF_W <= 32)
      else $error("COEF_W must be in 8..32");
  end

endmodule
