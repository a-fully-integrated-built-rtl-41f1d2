// Decimation filter: ORDER-stage CIC (sinc^ORDER) decimator by OSR.
//
// ORDER integrators run at the oversampling rate on the 2-bit signed input
// (-1, 0 or +1); every OSR-th clock the last integrator is sampled into
// ORDER comb (first-difference) stages, producing one decimated sample with
// a one-cycle valid strobe. The CIC gain is OSR^ORDER (2^28 at the
// defaults); the comb output is shifted right (floor) to OUT_FRAC = 21
// fraction bits, so an input of +1 held long enough gives 2^21: the
// design-wide decimated format with full scale 2^21. double_out
// multiplies the output by two; it is used while the filter processes the
// difference bitstream of the THD+N step, whose +-1 input stands for +-2 in
// units of the modulator output.
//
// The published chip only states that its filter is a 128:1 decimator with
// an approximately flat passband; this CIC is the simplest filter with that
// function. Fourth order, one more than the third-order shaped noise of the
// bitstream generators that reaches it in test mode, so that noise aliases
// little into the band. Its passband droop (about -2.5 dB at 10 kHz,
// -10.6 dB at 20 kHz) cancels in the BIST because the reference path passes
// the same filter.
// Wrap-around arithmetic in the integrators is intended (CIC modulo rule).
module decimation_filter #(
  parameter int OSR   = 128,
  parameter int ORDER    = 4,
  parameter int OUT_W    = 24,
  parameter int OUT_FRAC = 21
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [1:0]       x,
  input  logic                    double_out,
  output logic signed [OUT_W-1:0] y,
  output logic                    valid
);

  localparam int ACC_W = 2 + ORDER * $clog2(OSR);
  // the CIC gain is OSR^ORDER; drop the bits beyond OUT_FRAC fraction bits
  localparam int SHIFT = ORDER * $clog2(OSR) - OUT_FRAC;

  logic signed [ACC_W-1:0] integ [ORDER];
  logic signed [ACC_W-1:0] comb_d [ORDER];
  logic signed [ACC_W-1:0] comb_v [ORDER+1];
  logic [$clog2(OSR)-1:0]  phase;
  logic signed [OUT_W-1:0]  scaled;

  // Comb chain on the sampled integrator output.
  always_comb begin
    comb_v[0] = integ[ORDER-1];
    for (int k = 0; k < ORDER; k++) comb_v[k+1] = comb_v[k] - comb_d[k];
    scaled = OUT_W'(comb_v[ORDER] >>> SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ORDER; k++) begin
        integ[k]  <= '0;
        comb_d[k] <= '0;
      end
      phase <= '0;
      y     <= '0;
      valid <= 1'b0;
    end else begin
      integ[0] <= integ[0] + ACC_W'(x);
      for (int k = 1; k < ORDER; k++) integ[k] <= integ[k] + integ[k-1];
      phase <= phase + 1'b1;
      valid <= 1'b0;
      if (phase == $clog2(OSR)'(OSR - 1)) begin
        for (int k = 0; k < ORDER; k++) comb_d[k] <= comb_v[k];
        y     <= double_out ? (scaled <<< 1) : scaled;
        valid <= 1'b1;
      end
    end
  end

endmodule
