// Testbench for serial_io: random setup words are scanned in MSB first and
// must appear on a21 / at_pi4; random results are captured and must come
// out of sout MSB first, one bit per shift.
module tb_serial_io;
  localparam int PW = 32, RW = 120;
  logic clk = 0, rst_n = 0, shift = 0, sin = 0, capture = 0, sout;
  logic [RW-1:0] results = '0;
  logic [PW-1:0] a21, at_pi4;
  int checks = 0, failures = 0;

  serial_io dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*PW-1:0] word;
    logic [RW-1:0] got;
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      word = {$urandom, $urandom};
      for (int i = 2*PW - 1; i >= 0; i--) begin
        sin = word[i]; shift = 1;
        @(negedge clk);
      end
      shift = 0;
      @(negedge clk);
      checks += 2;
      if (a21 != word[2*PW-1:PW]) failures++;
      if (at_pi4 != word[PW-1:0]) failures++;
      results = RW'({$urandom, $urandom, $urandom, $urandom});
      capture = 1;
      @(negedge clk) capture = 0;
      for (int i = RW - 1; i >= 0; i--) begin
        got[i] = sout; shift = 1;
        @(negedge clk);
      end
      shift = 0;
      checks++;
      if (got != results) begin failures++; $display("scan out %h expected %h", got, results); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
