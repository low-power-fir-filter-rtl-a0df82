// approx_fir_tb -- end-to-end test of the approximate FIR filter at its
// default parameters.
//
// A reference model kept in the testbench holds its own sample history and
// computes, for every accepted sample, both the result the approximate adder
// chain must give (using the closed form of the approximation: low K bits of
// each sum are the new product's low bits, the carry into bit K is bit K-1 of
// the running sum) and the exactly filtered value. Every cycle the DUT output
// is compared with the approximate model, out_valid with the one-cycle
// latency, and the approximate result is held to within one LSB of the exact
// one.
//
// Stimulus, in order: reset, an impulse (output must reproduce the scaled
// coefficients), a step (settles to the DC gain), 5 kHz and 16 kHz sines at
// the 48 kHz sample rate (pass-band and stop-band of the specification), a
// sign-matched full-scale sequence that drives the output into saturation,
// and random samples with random idle cycles. It counts how often the
// approximation changed the output, how often saturation and idle cycles
// occurred, and fails if any of them never happened.
module approx_fir_tb;
  import fir_pkg::*;

  localparam int unsigned K     = 8;   // default APPROX_LSBS of the DUT
  localparam int unsigned SHIFT = 16;  // default OUT_SHIFT of the DUT
  localparam real         PI    = 3.14159265358979;

  logic    clk = 1'b0;
  logic    rst;
  logic    in_valid;
  sample_t data_in;
  logic    out_valid;
  sample_t data_out;
  logic    saturated;

  approx_fir dut (.clk, .rst, .in_valid, .data_in, .out_valid, .data_out, .saturated);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_approx_diff = 0, n_saturated = 0, n_idle = 0, n_samples = 0;

  sample_t hist [TAPS];          // model history, hist[0] newest
  sample_t exp_out, exact_out;
  logic    exp_valid, exp_sat;

  // ---- reference model ----------------------------------------------------
  function automatic acc_t model_add(acc_t x, acc_t y);
    logic [ACC_W-K-1:0] hi;
    hi = x[ACC_W-1:K] + y[ACC_W-1:K] + (ACC_W-K)'(x[K-1]);
    return {hi, y[K-1:0]};
  endfunction

  function automatic sample_t clip(acc_t v, output logic sat);
    acc_t s;
    s = v >>> SHIFT;
    sat = 1'b1;
    if (s > acc_t'(32767))       return 16'sh7FFF;
    else if (s < -acc_t'(32768)) return 16'sh8000;
    sat = 1'b0;
    return sample_t'(s);
  endfunction

  task automatic model_step(sample_t x);
    acc_t run, ex, p;
    logic sat_dummy;
    for (int k = TAPS-1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    run = acc_t'(hist[0]) * acc_t'(COEFS[0]);
    ex  = run;
    for (int k = 1; k < TAPS; k++) begin
      p   = acc_t'(hist[k]) * acc_t'(COEFS[k]);
      run = model_add(run, p);
      ex  = ex + p;
    end
    exp_out   = clip(run, exp_sat);
    exact_out = clip(ex, sat_dummy);
  endtask

  // ---- one clock cycle: drive, clock, compare --------------------------------
  task automatic cycle(logic v, sample_t x);
    @(negedge clk);
    in_valid = v;
    data_in  = x;
    @(posedge clk);
    exp_valid = v;
    if (v) begin
      model_step(x);
      n_samples++;
    end else begin
      n_idle++;
    end
    #1;
    checks++;
    if (out_valid !== exp_valid) begin
      failures++;
      $display("FAIL t=%0t out_valid=%b expected %b", $time, out_valid, exp_valid);
    end
    if (v) begin
      checks++;
      if (data_out !== exp_out || saturated !== exp_sat) begin
        failures++;
        $display("FAIL t=%0t data_out=%0d sat=%b expected %0d sat=%b",
                 $time, data_out, saturated, exp_out, exp_sat);
      end
      checks++;
      if (int'(exp_out) - int'(exact_out) > 1 || int'(exact_out) - int'(exp_out) > 1) begin
        failures++;
        $display("FAIL approximation error too large: %0d vs exact %0d", exp_out, exact_out);
      end
      if (exp_out != exact_out) n_approx_diff++;
      if (exp_sat) n_saturated++;
    end
  endtask

  // ---- watchdog ----------------------------------------------------------------
  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   peak;
  real  amp;
  sample_t x;

  initial begin
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    rst = 1'b1; in_valid = 1'b0; data_in = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0 || data_out !== '0) begin
      failures++;
      $display("FAIL outputs not cleared by reset");
    end
    @(negedge clk);
    rst = 1'b0;

    // Impulse: output k must be about COEFS[k] * 32767 / 2^16.
    cycle(1'b1, 16'sh7FFF);
    checks++;
    if (int'(data_out) - int'(COEFS[0]) / 2 > 1 || int'(COEFS[0]) / 2 - int'(data_out) > 1) begin
      failures++;
      $display("FAIL impulse tap 0: %0d", data_out);
    end
    for (int k = 1; k < TAPS + 4; k++) begin
      if (k % 7 == 3) cycle(1'b0, 16'sh1234);   // idle cycle: must not shift
      cycle(1'b1, '0);
      if (k < TAPS) begin
        checks++;
        if (int'(data_out) - int'(COEFS[k]) / 2 > 1 || int'(COEFS[k]) / 2 - int'(data_out) > 1) begin
          failures++;
          $display("FAIL impulse tap %0d: %0d expected about %0d", k, data_out, int'(COEFS[k]) / 2);
        end
      end
    end

    // Step: settles to 10000 * 61846 / 65536 = 9437.
    for (int n = 0; n < 2 * TAPS; n++) cycle(1'b1, 16'sd10000);
    checks++;
    if (int'(data_out) < 9427 || int'(data_out) > 9447) begin
      failures++;
      $display("FAIL step settles at %0d, expected about 9437", data_out);
    end

    // Pass-band sine, 5 kHz at 48 kHz.
    peak = 0;
    for (int n = 0; n < 240; n++) begin
      x = sample_t'($rtoi(16000.0 * $sin(2.0 * PI * 5000.0 * n / 48000.0)));
      cycle(1'b1, x);
      if (n >= 2 * TAPS && int'(data_out) > peak) peak = int'(data_out);
    end
    amp = real'(peak) / 16000.0;
    $display("5 kHz gain %f", amp);
    checks++;
    if (amp < 0.85 || amp > 1.10) begin
      failures++;
      $display("FAIL pass-band gain %f", amp);
    end

    // Stop-band sine, 16 kHz at 48 kHz.
    peak = 0;
    for (int n = 0; n < 240; n++) begin
      x = sample_t'($rtoi(16000.0 * $sin(2.0 * PI * 16000.0 * n / 48000.0)));
      cycle(1'b1, x);
      if (n >= 2 * TAPS && int'(data_out) > peak) peak = int'(data_out);
    end
    amp = real'(peak) / 16000.0;
    $display("16 kHz gain %f", amp);
    checks++;
    if (amp > 0.05) begin
      failures++;
      $display("FAIL stop-band gain %f", amp);
    end

    // Sign-matched full-scale input: the last output of the run exceeds
    // the 16-bit range and must saturate.
    for (int j = 0; j < TAPS; j++)
      cycle(1'b1, (COEFS[TAPS-1-j] < 0) ? 16'sh8001 : 16'sh7FFF);
    checks++;
    if (data_out !== 16'sh7FFF || saturated !== 1'b1) begin
      failures++;
      $display("FAIL expected positive saturation, got %0d", data_out);
    end
    for (int j = 0; j < TAPS; j++)
      cycle(1'b1, (COEFS[TAPS-1-j] < 0) ? 16'sh7FFF : 16'sh8000);
    checks++;
    if (data_out !== 16'sh8000 || saturated !== 1'b1) begin
      failures++;
      $display("FAIL expected negative saturation, got %0d", data_out);
    end

    // Random samples with random idle cycles.
    for (int n = 0; n < 600; n++)
      cycle(($urandom % 4) != 0, sample_t'($urandom));

    $display("samples=%0d idle=%0d approx_changed_output=%0d saturated=%0d",
             n_samples, n_idle, n_approx_diff, n_saturated);
    checks++;
    if (n_approx_diff == 0) begin failures++; $display("FAIL approximation never changed the output"); end
    checks++;
    if (n_saturated == 0)   begin failures++; $display("FAIL saturation never happened"); end
    checks++;
    if (n_idle == 0)        begin failures++; $display("FAIL no idle cycle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
