// Testbench for offset_estimator: two runs of 2048 random samples with
// different means; the latched Y_OS must equal floor(sum / 2048) and must
// hold while a later accumulation runs.
module tb_offset_estimator;
  localparam int N = 2048;
  logic clk = 0, rst_n = 0, clear = 0, acc = 0, latch = 0;
  logic signed [23:0] x = '0, y_os;
  int checks = 0, failures = 0;

  offset_estimator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int bias, int spread);
    longint sum;
    int v;
    logic signed [23:0] held;
    sum = 0;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    held = y_os;
    for (int k = 0; k < N; k++) begin
      v = bias + int'($urandom_range(2 * spread)) - spread;
      x = 24'(v); acc = 1; sum += longint'(v);
      @(negedge clk);
      if (k == N / 2) begin checks++; if (y_os != held) failures++; end
    end
    acc = 0; latch = 1;
    @(negedge clk) latch = 0;
    checks++;
    if (longint'(y_os) != (sum >>> 11)) begin
      failures++; $display("Y_OS %0d expected %0d", y_os, sum >>> 11);
    end
  endtask

  initial begin
    @(negedge clk) rst_n = 1;
    run(1400, 3000000);
    run(-77777, 2000000);
    run(0, 8000000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
