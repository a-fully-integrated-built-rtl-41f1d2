// Behavioural model (not synthesizable logic): the second-order
// switched-capacitor DfDT sigma-delta modulator under test.
//
// The real block is analog: two summing SC integrators and a comparator,
// whose first-integrator input branch can be reconfigured (test pin T = 1)
// into a 1-bit digital-to-charge converter driven by the digital stimulus
// D_BSG. This model reproduces its sampled-data behaviour with real
// arithmetic, one update per clock (phases phi1/phi2 are folded into it):
//
//   x      = T ? (D_BSG ? +1 : -1) : v_asig / 2^(IN_W-1)
//   Y      = D_MUT ? +1 : -1       (comparator decision on v2)
//   v1    <= (1-LEAK1) v1 + ALPHA1 (x + OFFSET - Y)
//   v2    <= (1-LEAK2) v2 + ALPHA2 (v1 + K3 v1^3 - Y)
//   D_MUT <= (v2 >= 0)             after the update
//
// With ALPHA1 = ALPHA2 = 1/2 and no leakage the signal transfer function is
// z^-2 with unit DC gain, matching the two-cycle group delay the BIST relies
// on. LEAK models finite op-amp gain (the beta terms), OFFSET an input
// referred offset and K3 a cubic nonlinearity of the first integrator, so
// tests can give the model an offset and a distortion to measure. All these
// values are this model's assumptions; the published capacitor values are
// not reproduced. Interface: D_MUT changes one clock after the input sample.
module dfdt_sdm_model #(
  parameter int  IN_W   = 24,
  parameter real ALPHA1 = 0.5,
  parameter real ALPHA2 = 0.5,
  parameter real LEAK1  = 0.0,
  parameter real LEAK2  = 0.0,
  parameter real OFFSET = 6.6e-4,  // about -63.6 dBFS
  parameter real K3     = 0.0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   t_mode,
  input  logic                   d_bsg,
  input  logic signed [IN_W-1:0] v_asig,
  output logic                   d_mut
);

  real v1, v2, x, y, v1n, v2n;

  always_comb begin
    x   = t_mode ? (d_bsg ? 1.0 : -1.0) : ($itor(v_asig) / $itor(64'sd1 <<< (IN_W - 1)));
    y   = d_mut ? 1.0 : -1.0;
    v1n = (1.0 - LEAK1) * v1 + ALPHA1 * (x + OFFSET - y);
    v2n = (1.0 - LEAK2) * v2 + ALPHA2 * (v1 + K3 * v1 * v1 * v1 - y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1    <= 0.0;
      v2    <= 0.0;
      d_mut <= 1'b0;
    end else begin
      v1    <= v1n;
      v2    <= v2n;
      d_mut <= (v2n >= 0.0);
    end
  end

endmodule
