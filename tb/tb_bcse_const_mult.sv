// tb_bcse_const_mult: checks the 2-bit BCSE constant multiplier for several
// coefficients (the four window coefficients, a negative one, and patterns
// with every group equal to [0 1], [1 0] and [1 1]) against the product
// computed with the '*' operator, for random and extreme 17-bit operands.
module tb_bcse_const_mult;

  localparam int IN_W = 17, CW = 16, NC = 8;
  localparam logic signed [CW-1:0] COEFS [NC] = '{
    16'sd16384, 16'sd14506, 16'sd9661, 16'sd3811,
    -16'sd3088, 16'sh5555, 16'sh2AAA, 16'sh7FFF
  };

  logic signed [IN_W-1:0]    x;
  logic signed [IN_W+CW-1:0] y [NC];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g_dut
    bcse_const_mult #(.IN_W(IN_W), .COEF_W(CW), .COEF(COEFS[i])) dut (.x(x), .y(y[i]));
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      case (n)
        0:       x = {1'b1, {(IN_W-1){1'b0}}};
        1:       x = {1'b0, {(IN_W-1){1'b1}}};
        2:       x = '0;
        3:       x = -1;
        default: x = IN_W'($urandom);
      endcase
      #1;
      for (int i = 0; i < NC; i++) begin
        longint e;
        e = longint'(x) * longint'(COEFS[i]);
        checks++;
        if (longint'(y[i]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL coef=%0d x=%0d y=%0d exp=%0d", COEFS[i], x, y[i], e);
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
