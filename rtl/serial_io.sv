// Serial I/O interface of the BIST.
//
// Two shift chains clocked by the system clock and advanced together while
// shift is high: the setup chain (2*PARAM_W bits) takes sin in at its LSB
// end and holds the test parameters {a21, A_T*pi/4} (a21 in the upper
// word, so both are scanned in MSB first); the result chain (RES_W bits)
// drives sout from its MSB. capture loads the BIST results into the result
// chain in parallel (capture wins over shift). The chip's serial interface
// carries exactly these values; the protocol itself (synchronous shift
// enable, MSB first, capture pulse) is this design's choice.
module serial_io #(
  parameter int PARAM_W = 32,
  parameter int RES_W   = 120
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               shift,
  input  logic               sin,
  output logic               sout,
  input  logic               capture,
  input  logic [RES_W-1:0]   results,
  output logic [PARAM_W-1:0] a21,
  output logic [PARAM_W-1:0] at_pi4
);

  logic [2*PARAM_W-1:0] setup_sr;
  logic [RES_W-1:0]     result_sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      setup_sr  <= '0;
      result_sr <= '0;
    end else begin
      if (shift) setup_sr <= {setup_sr[2*PARAM_W-2:0], sin};
      if (capture)    result_sr <= results;
      else if (shift) result_sr <= {result_sr[RES_W-2:0], 1'b0};
    end
  end

  assign {a21, at_pi4} = setup_sr;
  assign sout          = result_sr[RES_W-1];

endmodule
