// Testbench for power_estimator: samples arrive every 128 clocks as in the
// BIST; P_THDN must equal floor(sum x^2 / 2048) exactly, each serial
// multiplication must finish (busy low) within 24 + 3 clocks, and a sine of
// amplitude A must give A^2/2.
module tb_power_estimator;
  localparam int N = 2048, DW = 24;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, clear = 0, acc = 0, latch = 0, busy;
  logic signed [DW-1:0] x = '0;
  logic [2*DW-1:0] p_thdn;
  int checks = 0, failures = 0;

  power_estimator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int mode, input real a);
    longint sum;
    int v, lat, worst;
    real got;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    sum = 0; worst = 0;
    for (int k = 0; k < N; k++) begin
      if (mode == 0) v = int'($urandom_range(16000000)) - 8000000;
      else if (mode == 1) v = (k % 2 != 0) ? -8388608 : 8388607;
      else v = int'(a * 2097152.0 * $sin(2.0 * PI * 41.0 * k / N));
      x = DW'(v); acc = 1;
      sum += longint'(v) * longint'(v);
      @(negedge clk) acc = 0;
      lat = 1;
      while (busy) begin @(negedge clk); lat++; end
      if (lat > worst) worst = lat;
      repeat (128 - lat) @(negedge clk);
    end
    latch = 1;
    @(negedge clk) latch = 0;
    checks += 2;
    if (worst > DW + 3) begin failures++; $display("multiply took %0d clocks", worst); end
    if (mode < 2) begin
      if (longint'(p_thdn) != (sum >> 11)) begin
        failures++; $display("P %0d expected %0d", p_thdn, sum >> 11);
      end
    end else begin
      got = real'(p_thdn) / (2.0 ** 42);
      if (got < a * a / 2 * 0.999 || got > a * a / 2 * 1.001) begin
        failures++; $display("sine power %e expected %e", got, a * a / 2);
      end
    end
  endtask

  initial begin
    @(negedge clk) rst_n = 1;
    run(0, 0.0);
    run(1, 0.0);
    run(2, 0.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
