// Phase compensator: delays the reference bitstream by DELAY oversampling
// clocks (two cascaded flip-flops at the default), so that it lines up with
// the response of the modulator under test, whose signal path has a group
// delay of about two clocks in the passband. H(z) = z^-DELAY.
module phase_compensator #(
  parameter int DELAY = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic [DELAY-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= DELAY'({sr, d});
  end

  assign q = sr[DELAY-1];

endmodule
