// tb_accum_unit: checks the accumulation unit: the registered exact sum of
// four 33-bit products, and the output word rounded by 14 fractional bits and
// saturated to 16 bits, including forced positive and negative overflow.
// Outputs must hold while clk_en is low.
module tb_accum_unit;

  localparam int PW = 33, N = 4, DW = 16, FR = 14, AW = PW + 2;
  logic clk = 1'b0, reset_n = 1'b0, clk_en = 1'b0;
  logic signed [PW-1:0] prod [N];
  logic signed [AW-1:0] acc_out;
  logic signed [DW-1:0] y_out;
  logic sat;
  int checks = 0, failures = 0, n_sat = 0;
  longint e_acc = 0, e_y = 0;
  bit e_sat = 0;

  always #5 clk = ~clk;

  accum_unit #(.PROD_W(PW), .NMULT(N), .DATA_W(DW), .FRAC(FR)) dut (
    .clk, .reset_n, .clk_en, .prod, .acc_out, .y_out, .sat
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    foreach (prod[i]) prod[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      clk_en = ($urandom_range(0, 4) != 0);
      foreach (prod[i]) begin
        // mostly moderate values (within the 16-bit output range), some large
        if (cyc % 5 == 0) prod[i] = PW'($urandom) ^ (PW'($urandom) << 20);
        else              prod[i] = PW'($signed(28'($urandom)) >>> 1);
      end
      @(posedge clk);
      if (clk_en) begin
        longint r;
        e_acc = 0;
        foreach (prod[i]) e_acc += longint'(prod[i]);
        r = (e_acc + (64'sd1 <<< (FR - 1))) >>> FR;
        e_sat = (r > 32767) || (r < -32768);
        e_y = (r > 32767) ? 32767 : (r < -32768) ? -32768 : r;
      end
      #1;
      chk(longint'(acc_out) == e_acc, "acc_out");
      chk(longint'(y_out) == e_y, $sformatf("y_out %0d exp %0d", y_out, e_y));
      chk(sat == e_sat, "sat");
      if (sat) n_sat++;
    end
    chk(n_sat > 0, "no saturation seen");
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
