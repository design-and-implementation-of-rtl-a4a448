// tb_rrc_interp_filter: end-to-end test of the RRC FIR interpolation filter
// at its default configuration (16-bit data and coefficients, 7 taps,
// interpolation by 4).
//
// rrc_checker drives random and full-scale samples with random clk_en
// stalls, an impulse and a mid-run reset, and compares every output sample
// with a floating-point-derived reference. This test also requires each
// mechanism to happen: clk_en stalls, output saturation, a reset during
// operation, an isolated impulse, and a steady input rate of one sample per 4 enabled cycles.
module tb_rrc_interp_filter;

  localparam int NCYC = 6000;

  logic clk = 1'b0;
  logic reset_n, clk_en, in_ready, rrc_sat, done;
  logic signed [15:0] rrc_in, rrc_out;
  logic signed [34:0] rrc_acc;
  int checks, failures, n_stall, n_sat, n_reset, n_samples, n_impulse;
  int extra_checks = 0, extra_fail = 0;

  always #5 clk = ~clk;

  rrc_interp_filter dut (
    .clk, .reset_n, .clk_en, .rrc_in, .in_ready, .rrc_out, .rrc_sat, .rrc_acc
  );

  rrc_checker #(
    .DATA_W (16), .COEF_W (16), .NTAPS (7), .L (4), .ACC_W (35), .NCYC (NCYC)
  ) u_chk (
    .clk, .reset_n, .clk_en, .rrc_in, .in_ready, .rrc_out, .rrc_sat, .rrc_acc,
    .done, .checks, .failures, .n_stall, .n_sat, .n_reset, .n_samples, .n_impulse
  );

  // Rate: in_ready is high in exactly one of every 4 enabled cycles
  int en_cycles = 0, ready_cycles = 0;
  always @(posedge clk) if (reset_n && clk_en) begin
    en_cycles++;
    if (in_ready) ready_cycles++;
  end

  task automatic need(input bit ok, input string what);
    extra_checks++;
    if (!ok) begin
      extra_fail++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    wait (done);
    need(n_stall > 0,   "no clk_en stall happened");
    need(n_sat > 0,     "no output saturation happened");
    need(n_reset > 0,   "no reset during operation happened");
    need(n_samples > 0, "no input sample was taken");
    need(n_impulse == 1, "the impulse was not taken exactly once");
    need(ready_cycles * 4 >= en_cycles - 4 && ready_cycles * 4 <= en_cycles + 4,
         $sformatf("input rate: %0d samples in %0d enabled cycles", ready_cycles, en_cycles));
    $display("stalls=%0d saturated=%0d resets=%0d samples=%0d impulses=%0d",
             n_stall, n_sat, n_reset, n_samples, n_impulse);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_fail);
    $finish;
  end

  initial begin
    repeat (NCYC * 2 + 1000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_fail + 1);
    $finish;
  end

endmodule
