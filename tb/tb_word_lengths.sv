// tb_word_lengths: runs the filter at the four word lengths for which the
// design reports area and delay (8, 12, 16 and 32 bits, data and
// coefficients alike), each against the floating-point-derived reference
// of rrc_checker, side by side from one clock.
module tb_word_lengths;

  localparam int NCYC = 3000;
  localparam int NW = 4;
  localparam int WL [NW] = '{8, 12, 16, 32};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done  [NW];
  int   chk_n [NW], fail_n [NW], sat_n [NW], stall_n [NW], rst_n [NW], smp_n [NW], imp_n [NW];

  for (genvar k = 0; k < NW; k++) begin : g_w
    localparam int W  = WL[k];
    localparam int AW = 2 * W + 1 + 2;
    logic reset_n, clk_en, in_ready, rrc_sat;
    logic signed [W-1:0]  rrc_in, rrc_out;
    logic signed [AW-1:0] rrc_acc;

    rrc_interp_filter #(.DATA_W(W), .COEF_W(W)) dut (
      .clk, .reset_n, .clk_en, .rrc_in, .in_ready, .rrc_out, .rrc_sat, .rrc_acc
    );

    rrc_checker #(.DATA_W(W), .COEF_W(W), .NTAPS(7), .L(4), .ACC_W(AW), .NCYC(NCYC)) u_chk (
      .clk, .reset_n, .clk_en, .rrc_in, .in_ready, .rrc_out, .rrc_sat, .rrc_acc,
      .done (done[k]), .checks (chk_n[k]), .failures (fail_n[k]), .n_stall (stall_n[k]),
      .n_sat (sat_n[k]), .n_reset (rst_n[k]), .n_samples (smp_n[k]),
      .n_impulse (imp_n[k])
    );
  end

  initial begin
    int checks, failures;
    wait (done[0] && done[1] && done[2] && done[3]);
    checks = 0; failures = 0;
    for (int k = 0; k < NW; k++) begin
      $display("W=%0d checks=%0d failures=%0d saturated=%0d samples=%0d",
               WL[k], chk_n[k], fail_n[k], sat_n[k], smp_n[k]);
      checks += chk_n[k] + 1;
      failures += fail_n[k];
      if (sat_n[k] == 0) begin
        failures++;
        $display("FAIL W=%0d never saturated", WL[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC * 2 + 1000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

endmodule
