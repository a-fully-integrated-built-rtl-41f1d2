// Testbench for bist_controller (N_SAMPLES = 16, SETTLE = 2): decimated
// strobes every 8 clocks and an ORA busy signal that follows each strobe
// for a few clocks. Checks the step order 1-2-3-4, one restart per step,
// exactly N accumulate strobes per step, latch only after busy has dropped,
// the test-mode pin, done, and the cycle count of a whole run.
module tb_bist_controller;
  import bist_pkg::*;
  localparam int N = 16, S = 2, P = 8;
  logic clk = 0, rst_n = 0, start = 0, dec_valid = 0, ora_busy;
  step_e step;
  logic bsg_init, est_clear, est_acc, est_latch, t_mode, done;
  int checks = 0, failures = 0;

  bist_controller #(.N_SAMPLES(N), .SETTLE(S)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0, busy_left = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    dec_valid <= ((cyc % P) == P - 1);
  end
  always @(posedge clk) begin
    if (est_acc) busy_left <= 5;
    else if (busy_left > 0) busy_left <= busy_left - 1;
  end
  assign ora_busy = est_acc || busy_left > 0;

  int inits[5], accs[5], latches[5], order[$];
  int t_start, t_done;
  always @(posedge clk) if (rst_n) begin
    if (bsg_init) begin inits[step]++; order.push_back(int'(step)); end
    if (est_acc) accs[step]++;
    if (est_latch) begin
      latches[step]++;
      checks++;
      if (ora_busy) begin failures++; $display("latch while busy"); end
    end
    if (step != STEP_IDLE && !t_mode) begin failures++; $display("t_mode low in step"); end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    checks++;
    if (step != STEP_IDLE || t_mode || done) failures++;
    start = 1; t_start = cyc;
    @(negedge clk);
    while (!done) @(negedge clk);
    t_done = cyc;
    start = 0;
    checks++;
    if (order.size() != 4 || order[0] != 1 || order[1] != 2 || order[2] != 3 || order[3] != 4) begin
      failures++; $display("step order wrong, %0d restarts", order.size());
    end
    for (int s = 1; s <= 4; s++) begin
      checks += 3;
      if (inits[s] != 1) failures++;
      if (accs[s] != N) begin failures++; $display("step %0d: %0d samples", s, accs[s]); end
      if (latches[s] != 1) failures++;
    end
    // each step lasts at least (S + N) strobe periods and less than one more
    checks++;
    if (t_done - t_start < 4 * (S + N) * P || t_done - t_start > 4 * (S + N + 1) * P + 40) begin
      failures++; $display("run took %0d cycles", t_done - t_start);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (!done || step != STEP_IDLE || t_mode) failures++;
    // a second run starts only on a new rising edge of start
    start = 1;
    @(negedge clk); @(negedge clk);
    checks++;
    if (done || step != STEP_OFFSET) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
