// Testbench for phase_compensator: a random bitstream must reappear at the
// output exactly two clocks later.
module tb_phase_compensator;
  logic clk = 0, rst_n = 0, d = 0, q;
  int checks = 0, failures = 0;
  bit hist[$];

  phase_compensator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      d = 1'($urandom);
      hist.push_back(d);
      @(posedge clk);
      #1;
      if (hist.size() >= 2) begin
        checks++;
        if (q != hist[hist.size() - 2]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
