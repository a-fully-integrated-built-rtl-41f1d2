// Testbench for crfb_sdm3: compares the output bitstream bit by bit with a
// 64-bit integer model of the difference equations, checks that the mean of
// the bitstream equals a DC input (STF = 1) for several levels, including
// one that saturates the integrators and recovery from it, and checks a
// sine input against its low-passed output.
module tb_crfb_sdm3;
  localparam int W = 46, FRAC = 40;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic signed [W-1:0] u;
  logic y_bit;
  int checks = 0, failures = 0;

  crfb_sdm3 #(.W(W), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m1, m2, m3;
  function automatic longint sat(longint v);
    longint lim = 64'sd1 <<< (FRAC + 3);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction
  function automatic bit ref_step(longint uu);
    longint v, e, y, n1, n2, n3;
    v = m3 + uu;
    y = (v >= 0) ? (64'sd1 <<< FRAC) : -(64'sd1 <<< FRAC);
    e = uu - y;
    n1 = m1 + (e >>> 4);
    n2 = m2 + m1 + (e >>> 1) - (m3 >>> 12);
    n3 = m3 + m2 + e;
    m1 = sat(n1); m2 = sat(n2); m3 = sat(n3);
    return v >= 0;
  endfunction

  task automatic run_dc(real level, int n);
    longint uu;
    int ones, mism;
    real mean;
    uu = longint'(level * (2.0 ** FRAC));
    u = W'(uu);
    clr = 1; @(posedge clk); #1 clr = 0; en = 1;
    m1 = 0; m2 = 0; m3 = 0;
    ones = 0; mism = 0;
    for (int k = 0; k < n; k++) begin
      #1;
      if (y_bit != ref_step(uu)) mism++;
      ones += y_bit;
      @(posedge clk);
    end
    en = 0;
    mean = 2.0 * ones / n - 1.0;
    checks += 2;
    if (mism != 0) begin failures++; $display("DC %f: %0d bit mismatches", level, mism); end
    if (mean - level > 2e-3 || level - mean > 2e-3) begin
      failures++; $display("DC %f: mean %f", level, mean);
    end
  endtask

  initial begin
    u = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_dc(0.0, 16384);
    run_dc(0.3, 16384);
    run_dc(-0.55, 16384);
    run_dc(0.7, 16384);
    run_dc(0.85, 16384);   // drives the integrators into saturation
    run_dc(-0.2, 16384);   // and recovers
    // Sine input: a 64-tap moving average of the bitstream follows the input.
    begin
      real bits[$];
      real err, s, x;
      int nerr;
      clr = 1; @(posedge clk); #1 clr = 0; en = 1;
      nerr = 0;
      for (int k = 0; k < 40000; k++) begin
        x = 0.5 * $sin(2.0 * 3.14159265358979 * k / 8000.0);
        u = W'(longint'(x * (2.0 ** FRAC)));
        #1;
        bits.push_back(y_bit ? 1.0 : -1.0);
        if (bits.size() > 256) void'(bits.pop_front());
        if (k > 2000 && (k % 100) == 0) begin
          s = 0;
          foreach (bits[i]) s += bits[i];
          s = s / 256.0;
          // moving average centred 128 samples back
          err = s - 0.5 * $sin(2.0 * 3.14159265358979 * (k - 127.5) / 8000.0);
          checks++;
          if (err > 0.03 || err < -0.03) nerr++;
        end
        @(posedge clk);
      end
      failures += nerr;
      if (nerr != 0) $display("sine tracking errors: %0d", nerr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
