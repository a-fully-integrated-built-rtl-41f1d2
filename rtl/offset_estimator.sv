// Offset estimator: Y_OS = (1/N) * sum of N decimated samples.
//
// A plain accumulator. clear zeroes it, acc adds the input sample, latch
// stores the sum divided by N (an arithmetic shift, N a power of two) in the
// Y_OS register, which then holds its value for the later BIST steps. The
// function and N = 2048 are those of the published ORA; the widths are this
// design's (the accumulator is DW + log2(N) bits, so it cannot overflow).
module offset_estimator #(
  parameter int N_SAMPLES = 2048,
  parameter int DW        = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 acc,
  input  logic                 latch,
  input  logic signed [DW-1:0] x,
  output logic signed [DW-1:0] y_os
);

  localparam int LOG2N = $clog2(N_SAMPLES);
  localparam int AW    = DW + LOG2N;

  logic signed [AW-1:0] sum;
  logic signed [DW-1:0] mean;

  // The mean of N DW-bit samples always fits in DW bits.
  always_comb mean = DW'(sum >>> LOG2N);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum  <= '0;
      y_os <= '0;
    end else begin
      if (clear)    sum <= '0;
      else if (acc) sum <= sum + AW'(x);
      if (latch)    y_os <= mean;
    end
  end

endmodule
