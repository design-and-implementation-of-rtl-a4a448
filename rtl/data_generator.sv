// data_generator: input stage of the RRC interpolation filter.
//
// The filter runs on one clock at the output (interpolated) rate, and
// clk_en qualifies every cycle: while it is low the whole filter holds its
// state. A phase counter counts the INTERP_L output samples that belong to
// one input sample. In phase 0 the block registers the input word rrc_in
// into x_reg and raises x_new for the following cycle, which tells the
// interpolation unit to push that sample into its delay line; in the other
// phases x_new is low and zeros are stuffed instead.
//
// The design names this block with the inputs rrc_in (16 bits), clk, clk_en
// and an active-low reset; a single input standard is used, so there is no
// standard-select multiplexer. The phase counter and the in_ready/x_new
// handshake are this implementation's choice.
//
// Interface: in_ready is high in the cycle in which rrc_in is sampled (at
// the next rising edge, if clk_en is high). The source must therefore hold
// each sample until a cycle with in_ready && clk_en.
// Timing: x_reg/x_new are valid one enabled cycle after the sampling edge.
// Reset (reset_n low, asynchronous) clears the counter and the registers.
module data_generator #(
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned INTERP_L = 4
) (
  input  logic                     clk,
  input  logic                     reset_n,
  input  logic                     clk_en,
  input  logic signed [DATA_W-1:0] rrc_in,
  output logic                     in_ready,
  output logic signed [DATA_W-1:0] x_reg,
  output logic                     x_new
);

  localparam int unsigned PH_W = (INTERP_L > 1) ? $clog2(INTERP_L) : 1;

  logic [PH_W-1:0] phase;

  assign in_ready = (phase == '0);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      phase <= '0;
      x_reg <= '0;
      x_new <= 1'b0;
    end else if (clk_en) begin
      phase <= (phase == PH_W'(INTERP_L - 1)) ? '0 : phase + 1'b1;
      x_new <= in_ready;
      if (in_ready) x_reg <= rrc_in;
    end
  end

endmodule
