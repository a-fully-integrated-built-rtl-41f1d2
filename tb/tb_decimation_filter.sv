// Testbench for decimation_filter at its default parameters: random -1/0/+1
// input; every output sample is compared with the direct-form sinc^4
// response, y = floor(sum c_k x(t-4-k) / 2^7), with c the convolution of
// four 128-sample boxes (the last four inputs before the output instant are
// still inside the integrator pipeline, and 2^28 / 2^7 = 2^21 is the full
// scale). Also checks the output spacing (one sample per 128 clocks), the
// DC gain of 2^21 and the doubling mode.
module tb_decimation_filter;
  localparam int R = 128, ORD = 4, L = ORD * (R - 1) + 1, SHIFT = ORD * 7 - 21;
  logic clk = 0, rst_n = 0, double_out = 0;
  logic signed [1:0] x = '0;
  logic signed [23:0] y;
  logic valid;
  int checks = 0, failures = 0;

  decimation_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint c[L];
  int hist[$];
  longint expected;
  int edge_i, last_valid, nout;

  // c = box * box * box * box, built one convolution at a time
  initial begin
    longint t[L];
    int len;
    foreach (c[i]) c[i] = (i < R) ? 1 : 0;
    len = R;
    for (int o = 1; o < ORD; o++) begin
      foreach (t[i]) t[i] = 0;
      for (int i = 0; i < len; i++) for (int j = 0; j < R; j++) t[i+j] += c[i];
      len += R - 1;
      c = t;
    end
  end

  // Sample the input at each edge and compute the expected output at the
  // edges where the filter emits (edge index 127 mod 128 after reset).
  always @(posedge clk) if (rst_n) begin
    if (edge_i % R == R - 1) begin
      expected = 0;
      for (int k = 0; k < L; k++)
        if (edge_i - ORD - k >= 0) expected += c[k] * hist[edge_i - ORD - k];
      expected = expected >>> SHIFT;
      if (double_out) expected *= 2;
    end
    hist.push_back(int'(x));
    edge_i++;
  end

  always @(posedge clk) if (rst_n && valid) begin
    nout++;
    if (nout > 3) begin
      checks += 2;
      if (longint'(y) != expected) begin
        failures++;
        if (failures < 10) $display("out %0d: y=%0d expected %0d", nout, y, expected);
      end
      if (edge_i - last_valid != R) begin failures++; $display("spacing %0d", edge_i - last_valid); end
    end
    last_valid = edge_i;
  end

  initial begin
    edge_i = 0; nout = 0; last_valid = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 60 * R; k++) begin
      @(negedge clk);
      x = 2'($signed(int'($urandom_range(2)) - 1));
      if (k == 30 * R) double_out = 1;
    end
    // DC gain: +1 held
    double_out = 0;
    x = 2'sd1;
    repeat (6 * R) @(negedge clk);
    checks++;
    if (y != 24'sd2097152) begin failures++; $display("DC gain output %0d", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
