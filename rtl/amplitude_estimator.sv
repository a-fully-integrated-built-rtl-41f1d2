// Stimulus amplitude estimator: Y_OA = (2/N) * sum of |y_A| over N samples.
//
// For a coherent sine of amplitude A the mean of |A sin| is 2A/pi, so the
// result is (4/pi) A; driving the stimulus generator with A_T*pi/4 then
// makes Y_OA equal to the amplitude the response would have for A_T, without
// any multiplier. clear zeroes the accumulator, acc adds |x|, latch stores
// sum / (N/2) in y_oa. Function and N follow the published ORA; widths are
// this design's. The magnitude of the most negative input saturates to the
// largest positive value.
module amplitude_estimator #(
  parameter int N_SAMPLES = 2048,
  parameter int DW        = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 acc,
  input  logic                 latch,
  input  logic signed [DW-1:0] x,
  output logic        [DW-1:0] y_oa
);

  localparam int LOG2N = $clog2(N_SAMPLES);
  localparam int AW    = DW + LOG2N;

  logic [AW-1:0]   sum;
  logic [DW-1:0]   mag;
  logic [AW-1:0]   scaled;

  always_comb begin
    if (x[DW-1]) mag = (x == {1'b1, {(DW-1){1'b0}}}) ? {1'b0, {(DW-1){1'b1}}} : DW'(-x);
    else         mag = DW'(x);
    scaled = sum >> (LOG2N - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum  <= '0;
      y_oa <= '0;
    end else begin
      if (clear)    sum <= '0;
      else if (acc) sum <= sum + AW'(mag);
      if (latch)    y_oa <= (|scaled[AW-1:DW]) ? '1 : scaled[DW-1:0];
    end
  end

endmodule
