// Testbench for the behavioural DfDT modulator model. Normal mode: the mean
// of the output bitstream must equal a DC analog input. Test mode: the
// modulator must follow the density of the digital stimulus bitstream
// (made here by a first-order digital modulator) and ignore the analog
// input. A second instance with an input offset must show that offset.
// The latency from a stimulus step to the first output change is checked
// against the two-clock signal delay.
module tb_dfdt_sdm_model;
  logic clk = 0, rst_n = 0, t_mode = 0, d_bsg = 0;
  logic signed [23:0] v_asig = '0;
  logic d_mut, d_mut_os;
  int checks = 0, failures = 0;

  logic d_bsg_b = 0, d_mut_b, force_sync = 0;
  logic rst_pair;
  assign rst_pair = rst_n & ~force_sync;
  dfdt_sdm_model dut (.clk, .rst_n(rst_pair), .t_mode, .d_bsg, .v_asig, .d_mut);
  dfdt_sdm_model dut_b (.clk, .rst_n(rst_pair), .t_mode, .d_bsg(d_bsg_b), .v_asig, .d_mut(d_mut_b));
  dfdt_sdm_model #(.OFFSET(0.01)) dut_os (.clk, .rst_n, .t_mode, .d_bsg, .v_asig, .d_mut(d_mut_os));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real acc1;  // first-order digital modulator for the test-mode stimulus

  task automatic measure(input real target, input bit use_dig, input int n);
    int ones, ones_os;
    real m, m_os;
    ones = 0; ones_os = 0; acc1 = 0;
    repeat (64) @(posedge clk);
    for (int k = 0; k < n; k++) begin
      if (use_dig) begin
        d_bsg = (acc1 >= 0);
        acc1 += target - (d_bsg ? 1.0 : -1.0);
      end
      @(posedge clk);
      #1;
      ones += d_mut; ones_os += d_mut_os;
    end
    m = 2.0 * ones / n - 1.0;
    m_os = 2.0 * ones_os / n - 1.0;
    checks += 2;
    if (m - target > 2e-3 || target - m > 2e-3) begin
      failures++; $display("mean %f expected %f", m, target);
    end
    if (m_os - m - 0.01 > 2e-3 || m_os - m - 0.01 < -2e-3) begin
      failures++; $display("offset %f expected 0.01", m_os - m);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // normal mode, analog DC input
    t_mode = 0;
    v_asig = 24'(int'(0.3 * 8388608.0));
    measure(0.3, 0, 20000);
    v_asig = 24'(int'(-0.45 * 8388608.0));
    measure(-0.45, 0, 20000);
    // test mode: analog input ignored, digital stimulus followed
    t_mode = 1;
    v_asig = 24'(int'(0.7 * 8388608.0));
    measure(0.2, 1, 20000);
    measure(-0.6, 1, 20000);
    // latency: a twin modulator gets the same stimulus except one bit
    // flipped at clock t0; its output must not differ before t0 + 2, and over
    // many trials the earliest difference must be exactly t0 + 2.
    begin
      int first, best;
      best = 1000;
      force_sync = 1; @(negedge clk); force_sync = 0;
      for (int trial = 0; trial < 200; trial++) begin
        // identical random warm-up of random length
        repeat (20 + $urandom_range(40)) begin
          d_bsg = 1'($urandom); d_bsg_b = d_bsg;
          @(negedge clk);
        end
        first = -1;
        for (int k = 0; k < 12; k++) begin
          d_bsg = 1'($urandom);
          d_bsg_b = (k == 0) ? ~d_bsg : d_bsg;
          @(negedge clk);
          if (first < 0 && d_mut != d_mut_b) first = k + 1;
        end
        // resynchronise the twin
        force_sync = 1; @(negedge clk); force_sync = 0;
        if (first >= 0 && first < best) best = first;
      end
      checks++;
      if (best != 2) begin failures++; $display("earliest response after %0d clocks", best); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
