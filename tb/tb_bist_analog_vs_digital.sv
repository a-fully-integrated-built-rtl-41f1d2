// Analog-versus-digital testbench of bist_sd_adc at its default parameters.
//
// The same converter is measured two ways at about 1 kHz (bin 41) for
// -3, -6, -20 and -40 dBFS:
//  * digitally, by the complete four-step BIST (the stimulus is a
//    sigma-delta bitstream through the test-mode input, the SNDR comes from
//    Y_OA2 and P_THDN read over the serial interface);
//  * in normal mode, with a sampled sine on v_asig. The testbench analyses
//    the decimated output itself: after the filter has settled it takes
//    2048 samples, which hold exactly 41 tone periods, and splits them by
//    projection into DC, the tone and the rest (THD+N).
// A bitstream stimulus swings the modulator's first integrator harder and
// carries extra shaped noise, so the digital result may not exceed the
// analog one, and the gap is largest near full scale, where the digital
// results bend down past -6 dBFS while the analog ones do not. At low
// levels the gap must stay under 6 dB. (The published chip, whose thermal
// noise hides part of the difference, measured under 3 dB there; this
// modulator model has only quantization noise.)
module tb_bist_analog_vs_digital;
  import bist_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int  BIN = 41;

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
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // digital test: one BIST run, SNDR from the scanned-out results
  task automatic bist_sndr(input real at, output real sndr);
    logic [63:0] setup;
    logic [RES_W-1:0] res;
    bist_results_t r;
    real a, p;
    setup[63:32] = 32'(longint'(64.0 * 2.0 * (1.0 - $cos(2.0 * PI * BIN / 262144.0)) * (2.0 ** 32) + 0.5));
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
    a = real'(r.y_oa2) / 2097152.0;
    p = real'(r.p_thdn) / (2.0 ** 42);
    sndr = 10.0 * $log10(a * a / 2.0 / p);
  endtask

  // analog test: sine on v_asig in normal mode, projection of 2048 samples
  task automatic analog_sndr(input real at, output real sndr);
    real y[2048];
    real c = 0.0, s = 0.0, m = 0.0, e = 0.0, wd, pt;
    int n = 0, skip = 8;
    longint k = 0;
    wd = 2.0 * PI * BIN / 2048.0;
    while (n < 2048) begin
      v_asig = 24'(longint'($floor(at * $sin(2.0 * PI * BIN * real'(k) / 262144.0) * 8388608.0 + 0.5)));
      k++;
      @(posedge clk);
      if (dec_valid) begin
        if (skip > 0) skip--;
        else begin
          y[n] = real'(dec_out) / 2097152.0;
          n++;
        end
      end
      @(negedge clk);
    end
    v_asig = '0;
    for (int i = 0; i < 2048; i++) begin
      c += y[i] * $cos(wd * i);
      s += y[i] * $sin(wd * i);
      m += y[i];
      e += y[i] * y[i];
    end
    c = 2.0 * c / 2048.0;
    s = 2.0 * s / 2048.0;
    m = m / 2048.0;
    pt = (c * c + s * s) / 2.0;
    // THD+N: what is left after the DC and the tone are removed
    sndr = 10.0 * $log10(pt / (e / 2048.0 - m * m - pt));
  endtask

  initial begin
    real lv[4], sa[4], sd[4];
    lv = '{-3.0, -6.0, -20.0, -40.0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    foreach (lv[i]) begin
      analog_sndr(10.0 ** (lv[i] / 20.0), sa[i]);
      bist_sndr(10.0 ** (lv[i] / 20.0), sd[i]);
      $display("A_T %6.1f dBFS: analog test %6.2f dB, digital BIST %6.2f dB, difference %5.2f dB",
               lv[i], sa[i], sd[i], sa[i] - sd[i]);
      check($sformatf("%0.0f dBFS digital not above analog", lv[i]), sd[i] < sa[i] + 1.5);
    end
    check("-20 dBFS gap under 6 dB", sa[2] - sd[2] < 6.0);
    check("-40 dBFS gap under 6 dB", sa[3] - sd[3] < 6.0);
    check("gap largest near full scale", (sa[0] - sd[0]) > (sa[2] - sd[2]) + 3.0);
    check("digital results bend down past -6 dBFS", sd[0] < sd[1]);
    check("analog results do not bend down at -3 dBFS", sa[0] > sa[1] - 1.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
