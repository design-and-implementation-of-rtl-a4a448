// rrc_checker: stimulus generator and reference model for the RRC FIR
// interpolation filter, shared by the end-to-end and word-length tests.
//
// It drives reset_n, clk_en and rrc_in of one filter instance and checks
// in_ready, rrc_acc, rrc_out and rrc_sat after every clock edge against a
// model written independently of the RTL: the coefficients are recomputed
// from the root-raised-cosine formula in floating point, the input stream is
// zero-stuffed by the model's own phase counter, and each output is the
// convolution of the last NTAPS stuffed samples, two enabled edges late.
// Arithmetic is done on 128-bit integers so every word length can be checked.
//
// Stimulus, in order: random full-range samples with random clk_en stalls;
// a burst of full-scale positive and then negative samples (saturation);
// an impulse; an asynchronous reset in the middle of a run; random again.
// It counts each of these events; done rises after NCYC cycles.
module rrc_checker #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned COEF_W = 16,
  parameter int unsigned NTAPS  = 7,
  parameter int unsigned L      = 4,
  parameter int unsigned ACC_W  = 35,
  parameter int unsigned NCYC   = 4000
) (
  input  logic                     clk,
  output logic                     reset_n,
  output logic                     clk_en,
  output logic signed [DATA_W-1:0] rrc_in,
  input  logic                     in_ready,
  input  logic signed [DATA_W-1:0] rrc_out,
  input  logic                     rrc_sat,
  input  logic signed [ACC_W-1:0]  rrc_acc,
  output logic                     done,
  output int                       checks,
  output int                       failures,
  output int                       n_stall,
  output int                       n_sat,
  output int                       n_reset,
  output int                       n_samples,
  output int                       n_impulse
);

  typedef logic signed [127:0] w_t;
  localparam real PI   = 3.14159265358979323846;
  localparam real BETA = 0.22;
  localparam int  FRAC = COEF_W - 2;

  w_t c    [NTAPS];
  w_t hist [NTAPS+2];     // hist[0]: stuffed sample of the latest enabled edge
  int ph;

  function automatic real rrc(real t);
    if (t == 0.0) return 1.0 - BETA + 4.0 * BETA / PI;
    return ($sin(PI * t * (1.0 - BETA)) + 4.0 * BETA * t * $cos(PI * t * (1.0 + BETA)))
         / (PI * t * (1.0 - (4.0 * BETA * t) ** 2));
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL [W=%0d] %s at %0t", DATA_W, what, $time);
    end
  endtask

  function automatic w_t exp_acc();
    w_t s = 0;
    for (int j = 0; j < NTAPS; j++) s += c[j] * hist[2+j];
    return s;
  endfunction

  task automatic check_outputs();
    w_t a, r, mx, mn, y;
    bit s;
    a  = exp_acc();
    r  = (a + (w_t'(1) <<< (FRAC - 1))) >>> FRAC;
    mx = (w_t'(1) <<< (DATA_W - 1)) - 1;
    mn = -(mx + 1);
    s  = (r > mx) || (r < mn);
    y  = (r > mx) ? mx : (r < mn) ? mn : r;
    check(w_t'(rrc_acc) == a, $sformatf("rrc_acc %0d expected %0d", rrc_acc, a));
    check(w_t'(rrc_out) == y, $sformatf("rrc_out %0d expected %0d", rrc_out, y));
    check(rrc_sat == s, "rrc_sat");
  endtask

  function automatic logic signed [DATA_W-1:0] rand_word();
    logic [127:0] r = {$urandom, $urandom, $urandom, $urandom};
    return r[DATA_W-1:0];
  endfunction

  initial begin
    logic signed [DATA_W-1:0] maxw, minw;
    maxw = {1'b0, {(DATA_W-1){1'b1}}};
    minw = {1'b1, {(DATA_W-1){1'b0}}};
    done = 0; checks = 0; failures = 0;
    n_stall = 0; n_sat = 0; n_reset = 0; n_samples = 0; n_impulse = 0;
    reset_n = 0; clk_en = 0; rrc_in = '0;
    ph = 0;
    foreach (hist[k]) hist[k] = 0;

    // Coefficients from the formula, checked against the RTL's table
    for (int j = 0; j < NTAPS; j++) begin
      real t, v;
      t    = (real'(j) - real'((NTAPS - 1) / 2)) / real'(L);
      v    = rrc(t) / rrc(0.0) * (2.0 ** FRAC);
      c[j] = w_t'(longint'(v));
      check(w_t'(rrc_pkg::coef_q(COEF_W, NTAPS, j)) == c[j],
            $sformatf("coefficient %0d: table %0d formula %0d", j,
                      rrc_pkg::coef_q(COEF_W, NTAPS, j), c[j]));
    end

    repeat (3) @(posedge clk);
    @(negedge clk) reset_n = 1;

    for (int cyc = 0; cyc < NCYC; cyc++) begin
      @(negedge clk);
      // choose this cycle's inputs
      clk_en = ($urandom_range(0, 9) != 0);
      if (cyc < NCYC / 4)                rrc_in = rand_word();
      else if (cyc < NCYC / 4 + 60)      rrc_in = maxw;
      else if (cyc < NCYC / 4 + 120)     rrc_in = minw;
      else if (cyc < NCYC / 4 + 200)     rrc_in = (cyc >= NCYC / 4 + 128 && n_impulse == 0) ? DATA_W'(37) : '0;
      else                               rrc_in = rand_word();
      if (cyc == NCYC / 2) begin
        // asynchronous reset in the middle of a run
        #1 reset_n = 0;
        n_reset++;
        ph = 0;
        foreach (hist[k]) hist[k] = 0;
        #1 check_outputs();
        check(in_ready == 1'b1, "in_ready during reset");
      end else begin
        reset_n = 1;
      end
      if (!clk_en) n_stall++;
      #1 check(in_ready == (ph == 0), "in_ready phase");

      @(posedge clk);
      if (reset_n && clk_en) begin
        for (int k = NTAPS + 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = (ph == 0) ? w_t'(rrc_in) : w_t'(0);
        if (ph == 0) n_samples++;
        if (ph == 0 && cyc >= NCYC / 4 + 128 && cyc < NCYC / 4 + 200 && rrc_in == DATA_W'(37))
          n_impulse++;
        ph = (ph + 1) % L;
      end
      #1 check_outputs();
      if (rrc_sat) n_sat++;
    end
    done = 1;
  end

endmodule
