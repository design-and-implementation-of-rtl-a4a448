// tb_bcse_basic_unit: checks the BCSE basic unit for all four 2-bit
// coefficient groups over random and extreme operands: the partial product
// must equal group * x, with x, 2x and 3x supplied as the multiplier does.
module tb_bcse_basic_unit;

  localparam int W = 19;
  logic signed [W-1:0] x1, x2, x3, pp;
  logic        [1:0]   h;
  int checks = 0, failures = 0;

  bcse_basic_unit #(.W(W)) dut (.x1, .x2, .x3, .h, .pp);

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic signed [W-3:0] x;
      x  = (i == 0) ? {1'b1, {(W-3){1'b0}}} : (i == 1) ? {1'b0, {(W-3){1'b1}}} : (W-2)'($urandom);
      x1 = W'(x);
      x2 = W'(x) * 2;
      x3 = W'(x) * 3;
      for (int g = 0; g < 4; g++) begin
        h = 2'(g);
        #1;
        checks++;
        if (pp !== W'(W'(x) * g)) begin
          failures++;
          $display("FAIL x=%0d h=%0d pp=%0d", x, g, pp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
