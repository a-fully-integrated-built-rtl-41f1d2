// Testbench for bsg: the generated bitstream is compared bit by bit with an
// integer model of the resonator and modulator, and analysed with a DFT:
// the tone must sit exactly on the coherent bin set by a21
// (f = acos(1 - a12*a21/2) / 2pi) with the amplitude loaded into Register 2,
// and the neighbouring in-band bins must stay far below it.
module tb_bsg;
  localparam int NPT = 262144;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, init = 0, en = 0;
  logic [31:0] a21, amp;
  logic y_bit;
  int checks = 0, failures = 0;

  bsg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte bits[NPT];

  // Integer model (FRAC = 40, a12 = 2^-6)
  longint r1, r2, q1, q2, q3, a21l;
  function automatic longint sat(longint v);
    longint lim = 64'sd1 <<< 43;
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction
  function automatic bit model_step();
    longint v, e, y, n1, n2, n3;
    bit b;
    v = q3 + r2;
    b = (v >= 0);
    y = b ? (64'sd1 <<< 40) : -(64'sd1 <<< 40);
    e = r2 - y;
    n1 = q1 + (e >>> 4);
    n2 = q2 + q1 + (e >>> 1) - (q3 >>> 12);
    n3 = q3 + q2 + e;
    q1 = sat(n1); q2 = sat(n2); q3 = sat(n3);
    r1 = b ? r1 - a21l : r1 + a21l;
    r2 = r2 + (r1 >>> 6);
    return b;
  endfunction

  function automatic real dft_mag(int bin);
    real c, s, w;
    c = 0; s = 0;
    w = 2.0 * PI * bin / NPT;
    for (int k = 0; k < NPT; k++) begin
      c += bits[k] * $cos(w * k);
      s += bits[k] * $sin(w * k);
    end
    return 2.0 * $sqrt(c * c + s * s) / NPT;
  endfunction

  task automatic run_tone(int bin, real ampl, real amp_tol, real side_tol);
    real w, a21r, mag, side;
    int mism;
    w = 2.0 * PI * bin / NPT;
    a21r = 2.0 * (1.0 - $cos(w)) * 64.0;
    a21 = 32'(longint'(a21r * (2.0 ** 32) + 0.5));
    amp = 32'(longint'(ampl * (2.0 ** 32)));
    init = 1; @(posedge clk); #1 init = 0; en = 1;
    r1 = 0; r2 = longint'(amp) <<< 8; q1 = 0; q2 = 0; q3 = 0; a21l = longint'(a21) <<< 8;
    mism = 0;
    for (int k = 0; k < NPT; k++) begin
      #1;
      bits[k] = y_bit ? 8'sd1 : -8'sd1;
      if (y_bit != model_step()) mism++;
      @(posedge clk);
    end
    en = 0;
    checks++;
    if (mism != 0) begin failures++; $display("bin %0d: %0d bit mismatches", bin, mism); end
    mag = dft_mag(bin);
    checks++;
    if (mag < ampl * (1.0 - amp_tol) || mag > ampl * (1.0 + amp_tol)) begin
      failures++; $display("bin %0d: amplitude %f expected %f", bin, mag, ampl);
    end
    // bins a few cycles away must stay far below the tone (leakage, noise)
    for (int d = 3; d <= 9; d += 3) begin
      side = dft_mag(bin + d);
      checks++;
      if (side > mag * side_tol) begin
        failures++; $display("bin %0d: side bin +%0d at %e", bin, d, side);
      end
    end
    $display("tone bin %0d amplitude %f", bin, mag);
  endtask

  initial begin
    a21 = '0; amp = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_tone(41, 0.5 * PI / 4.0, 0.001, 1e-3);  // about 1 kHz at 6.144 MHz, -6 dBFS * pi/4
    // -3 dBFS, the largest level the generator is meant for
    run_tone(41, 0.7071, 0.001, 1e-3);
    // about 18.7 kHz: the start-up transient of Register 1 = 0 changes the
    // amplitude by about 1 %; the tone must stay > 40 dB above its side bins
    run_tone(798, 0.25, 0.02, 1e-2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
