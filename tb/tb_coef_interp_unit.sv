// tb_coef_interp_unit: checks the coefficient generator and interpolation
// unit. x_in/x_new are driven directly (a new sample every 4 enabled
// cycles, zeros stuffed between). The model keeps its own zero-stuffed
// history and recomputes the four products (h[i] * (u[i] + u[6-i]), centre
// tap alone) with coefficients computed here from the root-raised-cosine
// formula (roll-off 0.22, 4 samples per symbol, centre tap 1.0 in Q2.14).
module tb_coef_interp_unit;

  localparam real PI = 3.14159265358979323846, B = 0.22;
  logic clk = 1'b0, reset_n = 1'b0, clk_en = 1'b0, x_new = 1'b0;
  logic signed [15:0] x_in = '0;
  logic signed [32:0] prod [4];
  longint u [7];
  longint c [4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  coef_interp_unit #(.DATA_W(16), .COEF_W(16), .NTAPS(7)) dut (
    .clk, .reset_n, .clk_en, .x_in, .x_new, .prod
  );

  function automatic real rrc(real t);
    if (t == 0.0) return 1.0 - B + 4.0 * B / PI;
    return ($sin(PI * t * (1.0 - B)) + 4.0 * B * t * $cos(PI * t * (1.0 + B)))
         / (PI * t * (1.0 - (4.0 * B * t) ** 2));
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    automatic int ph = 0;
    foreach (u[j]) u[j] = 0;
    // taps 0..3 sit 3, 2, 1, 0 output samples from the window centre
    for (int i = 0; i < 4; i++) c[i] = longint'(rrc(real'(3 - i) / 4.0) / rrc(0.0) * 16384.0);
    chk(c[0] == 3811 && c[1] == 9661 && c[2] == 14506 && c[3] == 16384, "reference coefficients");
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      clk_en = ($urandom_range(0, 4) != 0);
      x_new  = (ph == 0);
      x_in   = 16'($urandom);
      @(posedge clk);
      if (clk_en) begin
        for (int j = 6; j > 0; j--) u[j] = u[j-1];
        u[0] = x_new ? longint'(x_in) : 0;
        ph = (ph + 1) % 4;
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        longint s;
        s = (i == 3) ? u[3] : u[i] + u[6-i];
        chk(longint'(prod[i]) == c[i] * s, $sformatf("prod[%0d]", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
