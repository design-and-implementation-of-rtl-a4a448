// tb_data_generator: checks the input stage. With random rrc_in every cycle
// and random clk_en, in_ready must be high in every 4th enabled cycle
// (starting right after reset), x_reg must hold the word present at the last
// enabled in_ready edge, and x_new must mark the enabled cycle after it.
// Nothing may change while clk_en is low; a mid-run reset restarts phase 0.
module tb_data_generator;

  logic clk = 1'b0, reset_n = 1'b0, clk_en = 1'b0;
  logic signed [15:0] rrc_in = '0, x_reg;
  logic in_ready, x_new;
  int checks = 0, failures = 0;
  int ph = 0, n_taken = 0;
  logic signed [15:0] m_x = '0;
  logic m_new = 1'b0;

  always #5 clk = ~clk;

  data_generator #(.DATA_W(16), .INTERP_L(4)) dut (
    .clk, .reset_n, .clk_en, .rrc_in, .in_ready, .x_reg, .x_new
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      reset_n = (cyc != 1500);
      if (!reset_n) begin ph = 0; m_x = '0; m_new = 1'b0; end
      clk_en = ($urandom_range(0, 3) != 0);
      rrc_in = 16'($urandom);
      #1 chk(in_ready == (ph == 0), "in_ready");
      @(posedge clk);
      if (reset_n && clk_en) begin
        m_new = (ph == 0);
        if (ph == 0) begin m_x = rrc_in; n_taken++; end
        ph = (ph + 1) % 4;
      end
      #1;
      chk(x_reg == m_x, "x_reg");
      chk(x_new == m_new, "x_new");
    end
    chk(n_taken > 500, "too few samples taken");
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
