// accum_unit: coefficient selector and accumulation unit.
//
// Sums the NMULT products of the coefficient unit into one output sample
// with a string of adders (a ripple chain, as the design describes it) and
// registers the result. Two registered outputs are given: acc_out is the
// exact sum, in the products' fixed-point format (FRAC fractional bits);
// y_out is that sum rounded to nearest (ties toward +infinity) to DATA_W
// integer bits and saturated to the DATA_W signed range. The output
// rounding and saturation are this implementation's choice.
//
// Interface: prod[] signed PROD_W-bit products; sat is high for an output
// sample whose y_out was clipped.
// Timing: outputs update on clk when clk_en is high, one cycle after prod[]
// is presented. Reset (reset_n low, asynchronous) clears them.
module accum_unit #(
  parameter int unsigned PROD_W = 33,
  parameter int unsigned NMULT  = 4,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned FRAC   = 14,
  localparam int unsigned ACC_W = PROD_W + $clog2(NMULT)
) (
  input  logic                     clk,
  input  logic                     reset_n,
  input  logic                     clk_en,
  input  logic signed [PROD_W-1:0] prod [NMULT],
  output logic signed [ACC_W-1:0]  acc_out,
  output logic signed [DATA_W-1:0] y_out,
  output logic                     sat
);

  localparam logic signed [ACC_W-1:0] MAXV = (ACC_W'(1) <<< (DATA_W - 1)) - 1;
  localparam logic signed [ACC_W-1:0] MINV = -(MAXV + 1);

  logic signed [ACC_W-1:0] chain [NMULT];
  logic signed [ACC_W-1:0] rnd;
  logic signed [DATA_W-1:0] y_d;
  logic                     sat_d;

  // String of adders
  always_comb begin
    chain[0] = ACC_W'(prod[0]);
    for (int i = 1; i < NMULT; i++) chain[i] = chain[i-1] + ACC_W'(prod[i]);
  end

  // Round to nearest and saturate; FRAC <= PROD_W - DATA_W keeps the sum of
  // the rounding constant in range.
  always_comb begin
    rnd = (chain[NMULT-1] + (ACC_W'(1) <<< (FRAC - 1))) >>> FRAC;
    if (rnd > MAXV) begin
      y_d   = MAXV[DATA_W-1:0];
      sat_d = 1'b1;
    end else if (rnd < MINV) begin
      y_d   = MINV[DATA_W-1:0];
      sat_d = 1'b1;
    end else begin
      y_d   = rnd[DATA_W-1:0];
      sat_d = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      acc_out <= '0;
      y_out   <= '0;
      sat     <= 1'b0;
    end else if (clk_en) begin
      acc_out <= chain[NMULT-1];
      y_out   <= y_d;
      sat     <= sat_d;
    end
  end

endmodule
