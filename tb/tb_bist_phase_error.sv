// Phase-error testbench of bist_sd_adc: the residue tone.
//
// The phase compensator delays the reference bitstream by exactly two
// clocks, which is the in-band group delay of the nominal modulator. A gain
// error of the first integrator (MUT_ALPHA1 away from 1/2) moves that delay
// to about 1/MUT_ALPHA1 clocks. In step 4 the reference then no longer
// cancels the response completely: a residue tone of amplitude
// 2 A sin(pi theta f/f_clk) is left, with A the response amplitude and theta
// the delay error in clocks. The BIST counts that tone as THD+N, so it caps
// the SNDR result, and since the phase error grows with frequency the cap
// matters only for high tones.
//
// Two copies of the top run the same tests side by side: one at the default
// parameters and one with MUT_ALPHA1 = 0.49 (delay about 2.04 clocks). For
// bins 41 (about 1 kHz) and 797 (about 18.7 kHz) at -6 dBFS the testbench
// takes the DFT at the tone bin of what the estimators see: the step-2
// response (through the modulator), the step-3 reference (through z^-2) and
// the step-4 residue. From steps 2 and 3 it measures the delay error and,
// by superposition with the amplitudes the BIST itself chose for step 4,
// predicts the residue tone. Checks: P_THDN equals the mean square of the
// recorded residue; the measured delay error is close to 1/alpha1 - 2; the
// residue tone matches the prediction and 2 A sin(pi theta f/f_clk); the
// default copy shows no such tone, and at 1 kHz its residue holds neither
// offset nor tone above -110 dBFS; the SNDR result stays below the cap the
// residue sets, and it falls at 18.7 kHz but not at 1 kHz.
module tb_bist_phase_error;
  import bist_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real ALPHA1 = 0.49;
  localparam int  NSMP = 2048;

  logic clk = 0, rst_n = 0, bist_start = 0;
  logic signed [23:0] v_asig = '0;
  logic sio_shift = 0, sio_in = 0;
  logic done_i, done_l, sout_i, sout_l, val_i, val_l;
  logic signed [DEC_W-1:0] dec_i, dec_l;
  step_e step_i, step_l;
  int checks = 0, failures = 0;

  bist_sd_adc dut_i (
    .clk, .rst_n, .bist_start, .bist_done(done_i), .v_asig,
    .sio_shift, .sio_in, .sio_out(sout_i), .dec_out(dec_i), .dec_valid(val_i),
    .step(step_i));

  bist_sd_adc #(.MUT_ALPHA1(ALPHA1)) dut_l (
    .clk, .rst_n, .bist_start, .bist_done(done_l), .v_asig,
    .sio_shift, .sio_in, .sio_out(sout_l), .dec_out(dec_l), .dec_valid(val_l),
    .step(step_l));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // what the estimators see: step-4 residue of both copies, step-2
  // response and step-3 reference of the copy with the gain error
  real res_i[$], res_l[$], s2_l[$], s3_l[$];
  always @(posedge clk) begin
    if (dut_i.est_acc && step_i == STEP_THDN) res_i.push_back(real'(dut_i.y_res) / 2097152.0);
    if (dut_l.est_acc && step_l == STEP_THDN) res_l.push_back(real'(dut_l.y_res) / 2097152.0);
    if (dut_l.est_acc && step_l == STEP_AMP)  s2_l.push_back(real'(dut_l.y_a) / 2097152.0);
    if (dut_l.est_acc && step_l == STEP_REF)  s3_l.push_back(real'(dut_l.y_a) / 2097152.0);
  end

  // complex tone at bin k: (2/N) sum x(n) e^{-j 2 pi k n / N}
  function automatic void tone(ref real x[$], input int k, output real re, output real im);
    re = 0.0;
    im = 0.0;
    for (int n = 0; n < x.size(); n++) begin
      re += x[n] * $cos(2.0 * PI * k * n / x.size());
      im -= x[n] * $sin(2.0 * PI * k * n / x.size());
    end
    re = re * 2.0 / x.size();
    im = im * 2.0 / x.size();
  endfunction

  function automatic real tone_amp(ref real x[$], input int k);
    real re, im;
    tone(x, k, re, im);
    return $sqrt(re * re + im * im);
  endfunction

  function automatic real mean_sq(ref real x[$]);
    real s = 0.0;
    foreach (x[n]) s += x[n] * x[n];
    return s / x.size();
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // P_THDN of the scanned-out result against the recorded residue
  task automatic check_power(input string who, input logic [RES_W-1:0] res, ref real x[$]);
    bist_results_t r;
    real p, ms;
    r  = res;
    p  = real'(r.p_thdn) / (2.0 ** 42);
    ms = mean_sq(x);
    check({who, " P_THDN = mean square of residue"},
          x.size() == NSMP && p > 0.98 * ms && p < 1.02 * ms);
  endtask

  function automatic real sndr_of(input logic [RES_W-1:0] res);
    bist_results_t r;
    real a, p;
    r = res;
    a = real'(r.y_oa2) / 2097152.0;
    p = real'(r.p_thdn) / (2.0 ** 42);
    return 10.0 * $log10(a * a / 2.0 / p);
  endfunction

  // one BIST run on both copies; returns both result words
  task automatic run_test(input int bin, input real at_dbfs,
                          output logic [RES_W-1:0] ri, output logic [RES_W-1:0] rl);
    real at;
    logic [63:0] setup;
    at = 10.0 ** (at_dbfs / 20.0);
    setup[63:32] = 32'(longint'(64.0 * 2.0 * (1.0 - $cos(2.0 * PI * bin / 262144.0)) * (2.0 ** 32) + 0.5));
    setup[31:0]  = 32'(longint'(at * PI / 4.0 * (2.0 ** 32) + 0.5));
    res_i.delete();
    res_l.delete();
    s2_l.delete();
    s3_l.delete();
    for (int i = 63; i >= 0; i--) begin
      sio_in = setup[i]; sio_shift = 1;
      @(negedge clk);
    end
    sio_shift = 0;
    bist_start = 1;
    @(negedge clk) bist_start = 0;
    @(negedge clk);
    while (!(done_i && done_l)) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int i = RES_W - 1; i >= 0; i--) begin
      ri[i] = sout_i; rl[i] = sout_l; sio_shift = 1;
      @(negedge clk);
    end
    sio_shift = 0;
  endtask

  initial begin
    logic [RES_W-1:0] ri, rl;
    real at_set, w, r2, i2, r3, i3, theta, amp, pr_re, pr_im, r_pred, r_eq, r_i, r_l;
    real s41_i, s41_l, s_i, s_l, oa2, oa3;
    bist_results_t r;
    at_set = 10.0 ** (-6.0 / 20.0) * PI / 4.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);

    // about 1 kHz: the phase error is too small to matter
    run_test(41, -6.0, ri, rl);
    check_power("1 kHz default", ri, res_i);
    check_power("1 kHz alpha1", rl, res_l);
    s41_i = sndr_of(ri);
    s41_l = sndr_of(rl);
    $display("bin   41: SNDR default %6.2f dB, alpha1 %6.2f dB; residue tone %0.1f / %0.1f dBFS",
             s41_i, s41_l, 20.0 * $log10(tone_amp(res_i, 41)), 20.0 * $log10(tone_amp(res_l, 41)));
    check("1 kHz SNDR barely affected by the gain error", s41_l > s41_i - 2.5);
    // nominal modulator: offset and tone are both removed from the step-4
    // residue to below -110 dBFS (3.16e-6 of full scale)
    begin
      real m;
      m = 0.0;
      foreach (res_i[n]) m += res_i[n];
      m = m / res_i.size();
      $display("          default copy: residue mean %0.1f dBFS (offset before: %0.1f dBFS)",
               20.0 * $log10(m < 0 ? -m : m), 20.0 * $log10(6.6e-4));
      check("step-4 residue offset below -110 dBFS", m < 3.16e-6 && m > -3.16e-6);
      check("step-4 residue tone below -110 dBFS at 1 kHz", tone_amp(res_i, 41) < 3.16e-6);
    end

    // about 18.7 kHz: the residue tone caps the result
    run_test(797, -6.0, ri, rl);
    check_power("18.7 kHz default", ri, res_i);
    check_power("18.7 kHz alpha1", rl, res_l);
    s_i = sndr_of(ri);
    s_l = sndr_of(rl);
    w = 2.0 * PI * 797 / 262144.0;
    tone(s2_l, 797, r2, i2);
    tone(s3_l, 797, r3, i3);
    // delay of the modulator path beyond the reference path, in clocks
    theta = -($atan2(i2, r2) - $atan2(i3, r3)) / w;
    r = rl;
    oa2 = real'(r.y_oa2) / 2097152.0;
    oa3 = real'(r.y_oa3) / 2097152.0;
    // step 4 drives the modulator with Y_OA3 and the reference with Y_OA2
    // instead of A_T pi/4: scale the step-2 and step-3 tones accordingly
    pr_re  = (r2 * oa3 - r3 * oa2) / at_set;
    pr_im  = (i2 * oa3 - i3 * oa2) / at_set;
    r_pred = $sqrt(pr_re * pr_re + pr_im * pr_im);
    amp    = $sqrt(r2 * r2 + i2 * i2) * oa3 / at_set;
    r_eq   = 2.0 * amp * $sin(PI * theta * 797.0 / 262144.0);
    r_i    = tone_amp(res_i, 797);
    r_l    = tone_amp(res_l, 797);
    $display("bin  797: delay error %0.4f clocks (1/alpha1 - 2 = %0.4f)", theta, 1.0 / ALPHA1 - 2.0);
    $display("          residue tone %0.1f dBFS; superposition %0.1f dBFS, 2A sin(pi theta f/fclk) %0.1f dBFS; default copy %0.1f dBFS",
             20.0 * $log10(r_l), 20.0 * $log10(r_pred), 20.0 * $log10(r_eq), 20.0 * $log10(r_i));
    // the SNDR result divides Y_OA2^2/2 by P_THDN, which holds r_l^2/2
    $display("          SNDR: default %6.2f dB, alpha1 %6.2f dB, cap from the residue %6.2f dB",
             s_i, s_l, 20.0 * $log10(oa2 / r_l));
    check("delay error close to 1/alpha1 - 2",
          theta > 0.75 * (1.0 / ALPHA1 - 2.0) && theta < 1.25 * (1.0 / ALPHA1 - 2.0));
    check("residue tone matches superposition", r_l > 0.71 * r_pred && r_l < 1.41 * r_pred);
    check("residue tone matches 2 A sin(pi theta f/fclk)", r_l > 0.71 * r_eq && r_l < 1.41 * r_eq);
    check("default copy leaves a much smaller residue", r_i < r_l / 4.0);
    check("SNDR result below the residue cap", s_l < 20.0 * $log10(oa2 / r_l) + 0.1);
    check("delay error lowers the 18.7 kHz SNDR", s_l < s_i - 3.0);
    check("delay error hurts 18.7 kHz more than 1 kHz", (s41_l - s_l) - (s41_i - s_i) > 3.0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
