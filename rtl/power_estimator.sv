// THD+N power estimator: P_THDN = (1/N) * sum of y_RES^2 over N samples.
//
// Each sample presented with acc is turned into its magnitude and squared
// by a serial shift-and-add multiplier (DW clocks); when the product is
// ready it is added to the accumulator. busy stays high from acc until the
// product has been added, so the sequencer waits on it before latch. latch
// stores sum / N in p_thdn (2*DW bits, 2*DEC_FRAC fraction bits). A new
// sample must not arrive while busy; in the BIST they come OSR = 128 clocks
// apart; an assertion checks that rule. Its "disable iff (!rst_n)" is why
// lint reports rst_n as used both asynchronously and synchronously: the
// registers all use it as an asynchronous reset only. Function, N and the
// use of a serial multiplier follow the published ORA; widths and the
// handshake are this design's.
module power_estimator #(
  parameter int N_SAMPLES = 2048,
  parameter int DW        = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 acc,
  input  logic                 latch,
  input  logic signed [DW-1:0] x,
  output logic                 busy,
  output logic [2*DW-1:0]      p_thdn
);

  localparam int LOG2N = $clog2(N_SAMPLES);
  localparam int AW    = 2 * DW + LOG2N;

  logic [AW-1:0]   sum;
  logic [AW-1:0]   mean;
  logic [DW-1:0]   mag;
  logic            m_busy, m_done;
  logic [2*DW-1:0] prod;

  always_comb begin
    mag  = x[DW-1] ? DW'(-x) : DW'(x);   // |-2^(DW-1)| = 2^(DW-1) fits unsigned
    mean = sum >> LOG2N;
  end

  serial_multiplier #(.W(DW)) u_mul (
    .clk  (clk),
    .rst_n(rst_n),
    .start(acc),
    .a    (mag),
    .b    (mag),
    .busy (m_busy),
    .done (m_done),
    .p    (prod)
  );

  assign busy = acc | m_busy | m_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum    <= '0;
      p_thdn <= '0;
    end else begin
      if (clear)       sum <= '0;
      else if (m_done) sum <= sum + AW'(prod);
      if (latch)       p_thdn <= (|mean[AW-1:2*DW]) ? '1 : mean[2*DW-1:0];
    end
  end

  // A sample must not arrive while the previous one is being squared.
  assert property (@(posedge clk) disable iff (!rst_n) acc |-> !(m_busy || m_done))
    else $error("power_estimator: sample arrived while busy");

endmodule
