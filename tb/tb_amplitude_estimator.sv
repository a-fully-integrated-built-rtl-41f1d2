// Testbench for amplitude_estimator: random samples must give exactly
// floor(sum|x| / 1024); a coherent sine of amplitude A must give (4/pi) A
// to within 0.1 %.
module tb_amplitude_estimator;
  localparam int N = 2048;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, clear = 0, acc = 0, latch = 0;
  logic signed [23:0] x = '0;
  logic [23:0] y_oa;
  int checks = 0, failures = 0;

  amplitude_estimator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic start_run();
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
  endtask

  task automatic end_run();
    acc = 0; latch = 1;
    @(negedge clk) latch = 0;
  endtask

  initial begin
    longint sum;
    int v;
    real a, got;
    @(negedge clk) rst_n = 1;
    // random data
    start_run();
    sum = 0;
    for (int k = 0; k < N; k++) begin
      v = int'($urandom_range(8000000)) - 4000000;
      x = 24'(v); acc = 1; sum += (v < 0) ? -longint'(v) : longint'(v);
      @(negedge clk);
    end
    end_run();
    checks++;
    if (longint'(y_oa) != (sum >> 10)) begin failures++; $display("Y_OA %0d expected %0d", y_oa, sum >> 10); end
    // coherent sines, 2^21 = 1.0
    for (int t = 0; t < 3; t++) begin
      a = (t == 0) ? 0.5 : (t == 1) ? 0.1 : 0.7;
      start_run();
      for (int k = 0; k < N; k++) begin
        x = 24'(int'(a * 2097152.0 * $sin(2.0 * PI * 43.0 * k / N + 0.3)));
        acc = 1;
        @(negedge clk);
      end
      end_run();
      got = y_oa / 2097152.0;
      checks++;
      if (got < 4.0 / PI * a * 0.999 || got > 4.0 / PI * a * 1.001) begin
        failures++; $display("sine %f: Y_OA %f expected %f", a, got, 4.0 / PI * a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
