// Stimulus-purity testbench of bsg at its default parameters: the in-band
// SNDR of the generated bitstream.
//
// The bitstream stimulus must be much cleaner than the converter it tests.
// For each tone the generator is started with amplitude 0.5 (-6 dBFS) and a
// coherent frequency word, and one record of 262144 bits (the length of one
// BIST step) is taken after a short warm-up. The record is weighted with a
// minimum four-term Blackman-Harris window and its spectrum is computed bin
// by bin (Goertzel) up to 24 kHz at 6.144 MHz. Signal power is the tone bin
// +-4 bins (the window's main lobe); noise plus distortion is every other
// bin from bin 4 to the band edge. The SNDR is reported for a 20 kHz and a
// 24 kHz band. Checks, 20 kHz band: above 100 dB at about 1 kHz, above
// 90 dB up to 18.7 kHz, above 82 dB at 20 kHz; 24 kHz band: above 104 dB at
// 1 kHz and above 84 dB at 20 kHz; tone power within 0.15 dB of -6 dBFS.
// (Measured on the published chip: 107.8 dB at 1 kHz and 86 dB at 20 kHz,
// above 90 dB up to 18.7 kHz.)
module tb_bsg_purity;
  localparam real PI    = 3.14159265358979;
  localparam int  NREC  = 262144;
  localparam int  WARM  = 4096;
  localparam int  B20   = 853;   // 20 kHz in bins of 6.144 MHz / 262144
  localparam int  B24   = 1024;  // 24 kHz

  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [31:0] a21 = '0, amp = '0;
  logic y_bit;
  int checks = 0, failures = 0;

  bsg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4 * (NREC + WARM) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real win[NREC];
  real xw[NREC];

  function automatic real bin_power(int k);
    real c, s0, s1 = 0.0, s2 = 0.0;
    c = 2.0 * $cos(2.0 * PI * k / NREC);
    for (int n = 0; n < NREC; n++) begin
      s0 = xw[n] + c * s1 - s2;
      s2 = s1;
      s1 = s0;
    end
    return s1 * s1 + s2 * s2 - c * s1 * s2;
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one record; returns the 20 kHz and 24 kHz SNDR
  task automatic run_tone(input int bin, output real sndr20, output real sndr24);
    real w, p, ps = 0.0, pn20 = 0.0, pn24 = 0.0, wsum = 0.0, tone_db;
    w = 2.0 * PI * bin / NREC;
    a21 = 32'(longint'(64.0 * 2.0 * (1.0 - $cos(w)) * (2.0 ** 32) + 0.5));
    amp = 32'h8000_0000;
    @(negedge clk) init = 1; en = 1;
    @(negedge clk) init = 0;
    repeat (WARM) @(negedge clk);
    for (int n = 0; n < NREC; n++) begin
      xw[n] = win[n] * (y_bit ? 1.0 : -1.0);
      @(negedge clk);
    end
    en = 0;
    for (int k = 4; k <= B24; k++) begin
      p = bin_power(k);
      if (k >= bin - 4 && k <= bin + 4) ps += p;
      else begin
        pn24 += p;
        if (k <= B20) pn20 += p;
      end
    end
    foreach (win[n]) wsum += win[n] * win[n];
    // sum of the main-lobe bins = (A^2/4) * NREC * sum(win^2) for a tone
    // of amplitude A, so the tone level relative to full scale (1) is:
    tone_db = 10.0 * $log10(4.0 * ps / (NREC * wsum));
    sndr20 = 10.0 * $log10(ps / pn20);
    sndr24 = 10.0 * $log10(ps / pn24);
    $display("bin %4d (%7.1f Hz): tone %6.2f dBFS, SNDR %6.1f dB (20 kHz), %6.1f dB (24 kHz)",
             bin, 6.144e6 * bin / NREC, tone_db, sndr20, sndr24);
    check($sformatf("bin %0d tone level", bin), tone_db > -6.17 && tone_db < -5.87);
  endtask

  initial begin
    real s, s24, t;
    for (int n = 0; n < NREC; n++) begin
      t = 2.0 * PI * n / NREC;
      win[n] = 0.35875 - 0.48829 * $cos(t) + 0.14128 * $cos(2.0 * t) - 0.01168 * $cos(3.0 * t);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_tone(41, s, s24);    // about 1 kHz
    check("1 kHz stimulus SNDR above 100 dB", s > 100.0);
    check("1 kHz stimulus SNDR above 104 dB in 24 kHz", s24 > 104.0);
    run_tone(521, s, s24);   // about 12.2 kHz
    check("12.2 kHz stimulus SNDR above 90 dB", s > 90.0);
    run_tone(797, s, s24);   // about 18.7 kHz
    check("18.7 kHz stimulus SNDR above 90 dB", s > 90.0);
    run_tone(853, s, s24);   // about 20 kHz
    check("20 kHz stimulus SNDR above 82 dB", s > 82.0);
    check("20 kHz stimulus SNDR above 84 dB in 24 kHz", s24 > 84.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
