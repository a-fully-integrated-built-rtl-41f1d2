// Third-order single-bit digital sigma-delta modulator, CRFB structure
// (cascade of resonators with distributed feedback).
//
// Three delaying integrators. The input u is fed forward into every
// integrator (a1 = 1/16, a2 = 1/2, a3 = 1) and directly into the quantiser,
// and the output bit is fed back with the opposite coefficients
// (b1 = -1/16, b2 = -1/2, b3 = -1), which makes the signal transfer function
// exactly 1. The resonator feedback g0 = -2^-12 from the third integrator
// into the second places a pair of NTF zeros at about 2^-6 rad/sample
// (about 15 kHz at 6.144 MHz). All coefficients are powers of two and are
// arithmetic shifts. Structure and coefficients follow the published BSG;
// the word width, fraction bits and the choice of a non-negative quantiser
// input as +1 are this design's.
//
// Per enabled clock:
//   y      = sign(I3 + u)                     (y_bit = 1 means +1)
//   e      = u - y
//   I1    <= I1 + e/16
//   I2    <= I2 + I1 + e/2 - I3/4096
//   I3    <= I3 + I2 + e
// Each integrator saturates at +-SAT_LIM (default 8.0). Without it the loop
// loses stability for tones above about 0.69 of full scale; with it a
// -3 dBFS tone is still modulated cleanly. The output bit is combinational
// from the registered state and the input. clr zeroes the integrators
// (start of a test step).
module crfb_sdm3 #(
  parameter int W    = 46,  // integrator word width
  parameter int FRAC = 40,  // fraction bits; +1.0 = 2^FRAC
  parameter int SAT_LOG2 = 3 // integrators saturate at +-2^SAT_LOG2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                en,
  input  logic signed [W-1:0] u,
  output logic                y_bit
);

  localparam logic signed [W-1:0] ONE = W'(64'sd1 <<< FRAC);
  localparam logic signed [W-1:0] LIM = W'(64'sd1 <<< (FRAC + SAT_LOG2));

  function automatic logic signed [W-1:0] sat(input logic signed [W-1:0] v);
    if (v > LIM)       return LIM;
    else if (v < -LIM) return -LIM;
    else               return v;
  endfunction

  logic signed [W-1:0] i1, i2, i3;
  logic signed [W-1:0] v, y_val, e;

  always_comb begin
    v     = i3 + u;
    y_bit = ~v[W-1];
    y_val = y_bit ? ONE : -ONE;
    e     = u - y_val;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i1 <= '0;
      i2 <= '0;
      i3 <= '0;
    end else if (clr) begin
      i1 <= '0;
      i2 <= '0;
      i3 <= '0;
    end else if (en) begin
      i1 <= sat(i1 + (e >>> 4));
      i2 <= sat(i2 + i1 + (e >>> 1) - (i3 >>> 12));
      i3 <= sat(i3 + i2 + e);
    end
  end

endmodule
