// Workload testbench of bist_sd_adc at its default parameters: runs the
// complete four-step BIST for the single-tone tests of the published
// measurements, an amplitude sweep at about 1 kHz (-3, -6, -20, -40 and
// -60 dBFS; the -60 dBFS result gives the dynamic range) and a frequency
// sweep at -6 dBFS (about 5, 12.2 and 18.7 kHz). For each test the setup
// words are scanned in, the results scanned out, and the amplitude
// estimate, the offset estimate and the SNDR range are checked; the SNDR
// must fall by roughly the amplitude step in the noise-limited region.
module tb_bist_workloads;
  import bist_pkg::*;
  localparam real PI = 3.14159265358979;
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
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real sinc4(real f_over_fclk);
    return ($sin(PI * f_over_fclk * OSR) / (OSR * $sin(PI * f_over_fclk))) ** 4;
  endfunction

  // One BIST run; returns the SNDR in dB.
  task automatic run_test(input int bin, input real at_dbfs, output real sndr);
    real at, w, a21r, hdec, y_os, y_oa2, p, tol;
    logic [63:0] setup;
    logic [RES_W-1:0] res;
    bist_results_t r;
    at = 10.0 ** (at_dbfs / 20.0);
    w = 2.0 * PI * bin / 262144.0;
    a21r = 64.0 * 2.0 * (1.0 - $cos(w));
    setup[63:32] = 32'(longint'(a21r * (2.0 ** 32) + 0.5));
    setup[31:0]  = 32'(longint'(at * PI / 4.0 * (2.0 ** 32) + 0.5));
    for (int i = 63; i >= 0; i--) begin
      sio_in = setup[i]; sio_shift = 1;
      @(negedge clk);
    end
    sio_shift = 0;
    bist_start = 1;
    @(negedge clk) bist_start = 0;
    @(negedge clk);
    while (!bist_done) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int i = RES_W - 1; i >= 0; i--) begin
      res[i] = sio_out; sio_shift = 1;
      @(negedge clk);
    end
    sio_shift = 0;
    r = res;
    hdec  = sinc4(real'(bin) / 262144.0);
    y_os  = real'(r.y_os) / 2097152.0;
    y_oa2 = real'(r.y_oa2) / 2097152.0;
    p     = real'(r.p_thdn) / (2.0 ** 42);
    sndr  = (p > 0) ? 10.0 * $log10(y_oa2 * y_oa2 / 2.0 / p) : 999.0;
    $display("f = %7.1f Hz  A_T = %6.1f dBFS: Y_OS %e  Y_OA2 %e (exp %e)  SNDR %6.2f dB",
             6.144e6 * bin / 262144.0, at_dbfs, y_os, y_oa2, at * hdec, sndr);
    checks += 2;
    // amplitude within 0.5 % (plus 2e-4 absolute for the smallest tones);
    // at high frequencies the generator's start-up transient adds up to
    // about 1 % (the procedure measures the amplitude, so this is harmless)
    tol = at * hdec * 5e-3 * (1.0 + real'(bin) / 200.0) + 2e-4;
    if (y_oa2 - at * hdec > tol || at * hdec - y_oa2 > tol) begin
      failures++; $display("FAIL amplitude");
    end
    if (y_os - MODEL_OFFSET > 5e-5 || MODEL_OFFSET - y_os > 5e-5) begin
      failures++; $display("FAIL offset");
    end
  endtask

  initial begin
    real s[8];
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    // amplitude sweep, 41 cycles in 262144 clocks (about 961 Hz)
    run_test(41, -3.0, s[0]);
    run_test(41, -6.0, s[1]);
    run_test(41, -20.0, s[2]);
    run_test(41, -40.0, s[3]);
    run_test(41, -60.0, s[4]);
    // frequency sweep at -6 dBFS (odd bins: about 5.0, 12.2 and 18.7 kHz)
    run_test(213, -6.0, s[5]);
    run_test(521, -6.0, s[6]);
    run_test(797, -6.0, s[7]);
    $display("dynamic range (SNDR at -60 dBFS + 60 dB): %0.1f dB", s[4] + 60.0);
    // noise-limited region: 20 dB less amplitude, about 20 dB less SNDR
    checks += 3;
    if (s[2] - s[3] < 15.0 || s[2] - s[3] > 25.0) begin failures++; $display("FAIL -20/-40 dBFS SNDR step"); end
    if (s[3] - s[4] < 15.0 || s[3] - s[4] > 25.0) begin failures++; $display("FAIL -40/-60 dBFS SNDR step"); end
    if (s[1] < 65.0 || s[1] > 110.0) begin failures++; $display("FAIL -6 dBFS SNDR"); end
    for (int i = 5; i < 8; i++) begin
      checks++;
      if (s[i] < 55.0) begin failures++; $display("FAIL high-frequency SNDR"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
