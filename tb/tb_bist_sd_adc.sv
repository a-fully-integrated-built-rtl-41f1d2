// End-to-end testbench of bist_sd_adc at its default parameters
// (N = 2048 decimated samples per step, OSR = 128).
//
// 1. Normal mode: a DC analog input is converted; the decimated output must
//    equal it plus the modulator model's offset.
// 2. The setup parameters for a -6 dBFS tone at 41 * f_clk / 262144
//    (about 961 Hz) are scanned in: a21 = 64 * 2 (1 - cos w) and
//    A_T * pi/4.
// 3. The BIST runs its four steps; the results are scanned out and checked:
//    Y_OS against the model offset, Y_OA2 and Y_OA3 against A_T times the
//    sinc^4 response of the decimation filter at the tone frequency,
//    P_THDN against the tone power (the tone must be removed: SNDR between
//    65 and 110 dB) and the cycle count of the whole test.
// 4. As an independent reference for P_THDN, the decimated output of step 2
//    is captured and a sine of the known frequency plus a constant is
//    fitted to it by least squares; the power of what is left (the THD+N
//    of the converter, as a conventional spectral test would measure it)
//    must agree with P_THDN within 3 dB. The fit sees the stimulus of step
//    2 (A_T*pi/4, 2.1 dB below A_T), and near full scale this modulator's
//    noise rises with the level, so a small positive difference is expected.
// Every mechanism of the procedure is counted and must have happened.
module tb_bist_sd_adc;
  import bist_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real AT = 0.5;          // -6 dBFS
  localparam int  BIN = 41;          // tone bin in 262144 clocks
  localparam real MODEL_OFFSET = 6.6e-4;

  logic clk = 0, rst_n = 0, bist_start = 0, bist_done;
  logic signed [23:0] v_asig = '0;
  logic sio_shift = 0, sio_in = 0, sio_out;
  logic signed [DEC_W-1:0] dec_out;
  logic dec_valid;
  step_e step;
  int checks = 0, failures = 0;

  bist_sd_adc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- step-2 decimated output, for the reference fit ----
  real cap[$];
  always @(posedge clk) if (dut.est_acc && step == STEP_AMP) cap.push_back(real'(dec_out) / 2097152.0);

  // ---- mechanism counters ----
  int n_step[5], n_normal, n_muxa[4], n_oa_feedback, n_os_sub, n_mul;
  step_e prev_step = STEP_IDLE;
  always @(posedge clk) if (rst_n) begin
    if (step != prev_step) n_step[step]++;
    prev_step <= step;
    if (step == STEP_IDLE && dec_valid) n_normal++;
    if (dut.u_dec.valid) case (step)
      STEP_IDLE, STEP_OFFSET, STEP_AMP: n_muxa[0]++;
      STEP_REF:  n_muxa[1]++;
      STEP_THDN: n_muxa[2]++;
      default: ;
    endcase
    if (dut.bsg_init && step == STEP_THDN && dut.amp_s != dut.at_pi4 && dut.amp_r != dut.at_pi4) n_oa_feedback++;
    if (dec_valid && step != STEP_IDLE && step != STEP_OFFSET && dut.y_os != 0) n_os_sub++;
    if (dut.u_pwr.m_done) n_mul++;
  end

  task automatic check_close(string what, real got, real exp, real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s: got %e expected %e (tol %e)", what, got, exp, tol);
    end else $display("ok   %s: %e (expected %e)", what, got, exp);
  endtask

  function automatic real sinc4(real f_over_fclk);
    real n, d;
    n = $sin(PI * f_over_fclk * OSR);
    d = OSR * $sin(PI * f_over_fclk);
    return (n / d) ** 4;
  endfunction

  initial begin
    real w, a21r, hdec, y_os, y_oa2, y_oa3, p, sndr, sum;
    logic [63:0] setup;
    logic [RES_W-1:0] res;
    bist_results_t r;
    int n, t0, t1;

    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. normal mode conversion of a DC input
    v_asig = 24'(int'(0.25 * 8388608.0));
    n = 0; sum = 0;
    while (n < 40) begin
      @(negedge clk);
      if (dec_valid) begin
        n++;
        if (n > 8) sum += real'(dec_out) / 2097152.0;
      end
    end
    check_close("normal-mode DC conversion", sum / 32.0, 0.25 + MODEL_OFFSET, 2e-4);
    v_asig = '0;

    // 2. scan in the setup parameters
    w = 2.0 * PI * BIN / 262144.0;
    a21r = 64.0 * 2.0 * (1.0 - $cos(w));
    setup[63:32] = 32'(longint'(a21r * (2.0 ** 32) + 0.5));
    setup[31:0]  = 32'(longint'(AT * PI / 4.0 * (2.0 ** 32) + 0.5));
    for (int i = 63; i >= 0; i--) begin
      sio_in = setup[i]; sio_shift = 1;
      @(negedge clk);
    end
    sio_shift = 0;

    // 3. run the BIST
    bist_start = 1; t0 = int'($time);
    @(negedge clk);
    bist_start = 0;
    while (!bist_done) @(negedge clk);
    t1 = int'($time);
    repeat (3) @(negedge clk);
    for (int i = RES_W - 1; i >= 0; i--) begin
      res[i] = sio_out; sio_shift = 1;
      @(negedge clk);
    end
    sio_shift = 0;
    r = res;

    hdec  = sinc4(real'(BIN) / 262144.0);
    y_os  = real'(r.y_os) / 2097152.0;
    y_oa2 = real'(r.y_oa2) / 2097152.0;
    y_oa3 = real'(r.y_oa3) / 2097152.0;
    p     = real'(r.p_thdn) / (2.0 ** 42);
    check_close("Y_OS (offset)", y_os, MODEL_OFFSET, 3e-5);
    check_close("Y_OA2 (response amplitude)", y_oa2, AT * hdec, AT * 3e-3);
    check_close("Y_OA3 (reference amplitude)", y_oa3, AT * hdec, AT * 3e-3);
    sndr = 10.0 * $log10(y_oa2 * y_oa2 / 2.0 / p);
    $display("     P_THDN %e, SNDR %0.2f dB", p, sndr);
    checks++;
    if (!(sndr > 65.0 && sndr < 110.0)) begin failures++; $display("FAIL SNDR out of range"); end
    // reference THD+N power from a sine fit to the step-2 output
    begin
      real wd, c, sn, k0, cs, ss, dc, resid, pref;
      wd = 2.0 * PI * $acos(1.0 - real'(setup[63:32]) / (2.0 ** 32) / 128.0) / (2.0 * PI) * OSR;
      cs = 0; ss = 0; dc = 0;
      foreach (cap[i]) begin
        cs += cap[i] * $cos(wd * i);
        ss += cap[i] * $sin(wd * i);
        dc += cap[i];
      end
      cs = 2.0 * cs / cap.size(); ss = 2.0 * ss / cap.size(); dc = dc / cap.size();
      resid = 0;
      foreach (cap[i]) begin
        c = cap[i] - dc - cs * $cos(wd * i) - ss * $sin(wd * i);
        resid += c * c;
      end
      pref = resid / cap.size();
      $display("     reference THD+N from sine fit: %e (%0d samples), BIST/reference %0.2f dB",
               pref, cap.size(), 10.0 * $log10(p / pref));
      checks++;
      if (cap.size() != N_SAMPLES || 10.0 * $log10(p / pref) > 3.0 || 10.0 * $log10(p / pref) < -3.0) begin
        failures++; $display("FAIL P_THDN differs from the reference");
      end
    end
    // cycle count: each step waits for SETTLE + N decimated samples (the
    // first may come less than one period after the restart) plus a few
    // control cycles: 262144 clocks of analysed bitstream per step
    n = (t1 - t0) / 10;
    checks++;
    if (n < 4 * (3 + N_SAMPLES) * OSR || n > 4 * (4 + N_SAMPLES) * OSR + 200) begin
      failures++; $display("FAIL test took %0d clocks", n);
    end else $display("ok   test took %0d clocks", n);

    // mechanisms
    for (int s = 1; s <= 4; s++) begin
      checks++;
      if (n_step[s] != 1) begin failures++; $display("FAIL step %0d entered %0d times", s, n_step[s]); end
    end
    checks += 6;
    if (n_normal == 0)      begin failures++; $display("FAIL no normal-mode conversion"); end
    if (n_muxa[1] == 0)     begin failures++; $display("FAIL reference path never filtered"); end
    if (n_muxa[2] == 0)     begin failures++; $display("FAIL difference never filtered"); end
    if (n_oa_feedback != 1) begin failures++; $display("FAIL amplitude feedback %0d", n_oa_feedback); end
    if (n_os_sub == 0)      begin failures++; $display("FAIL offset never subtracted"); end
    if (n_mul < N_SAMPLES)  begin failures++; $display("FAIL %0d serial multiplications", n_mul); end
    $display("mechanisms: steps %0d/%0d/%0d/%0d, normal %0d, ref %0d, diff %0d, feedback %0d, offset-sub %0d, mult %0d",
             n_step[1], n_step[2], n_step[3], n_step[4], n_normal, n_muxa[1], n_muxa[2], n_oa_feedback, n_os_sub, n_mul);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
