// Bitstream generator (BSG): a digital resonator with the third-order
// CRFB sigma-delta modulator inside its loop.
//
// Register 1 accumulates +a21 or -a21, chosen by the modulator output bit
// (negative feedback: -a21 when the bit is +1). Register 2 accumulates
// a12 times the new Register 1 value, with a12 = 2^-L_A12 (a shift). The
// Register 2 value is the tone x(n) fed to the modulator, whose single-bit
// output both leaves the block and closes the loop. With STF = 1 the loop
// obeys x(n+2) - (2 - a12*a21) x(n+1) + x(n) = 0: a sine of frequency
// f = f_clk * acos(1 - a12*a21/2) / (2*pi). On init Register 1 is set to 0
// and Register 2 to the amplitude, which sets the tone amplitude. The
// structure, a12 = 2^-6 and the initial values follow the published BSG; the
// fixed-point formats are this design's.
//
// Interface: a21 and amp are unsigned fractions (word / 2^PARAM_W), sampled
// when init is high. y_bit is 1 for +1 and 0 for -1 and is valid in the
// cycle after init; a new bit follows every enabled clock.
module bsg #(
  parameter int L_A12   = 6,
  parameter int PARAM_W = 32,
  parameter int W       = 46,
  parameter int FRAC    = 40
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init,
  input  logic               en,
  input  logic [PARAM_W-1:0] a21,
  input  logic [PARAM_W-1:0] amp,
  output logic               y_bit
);

  logic signed [W-1:0] reg1, reg2, a21_q, reg1_next;

  // Both parameters are aligned to FRAC fraction bits.
  function automatic logic signed [W-1:0] align(input logic [PARAM_W-1:0] p);
    logic signed [W-1:0] r;
    r = W'($signed({1'b0, p}));
    return r <<< (FRAC - PARAM_W);
  endfunction

  always_comb reg1_next = y_bit ? (reg1 - a21_q) : (reg1 + a21_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg1  <= '0;
      reg2  <= '0;
      a21_q <= '0;
    end else if (init) begin
      reg1  <= '0;
      reg2  <= align(amp);
      a21_q <= align(a21);
    end else if (en) begin
      reg1  <= reg1_next;
      reg2  <= reg2 + (reg1_next >>> L_A12);
    end
  end

  crfb_sdm3 #(.W(W), .FRAC(FRAC)) u_sdm (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (init),
    .en   (en),
    .u    (reg2),
    .y_bit(y_bit)
  );

endmodule
