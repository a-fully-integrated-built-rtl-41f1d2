// Sigma-delta ADC with a fully digital built-in self-test based on a
// modified controlled sine-wave fitting procedure.
//
// Datapath (one clock = one oversampling period):
//   SBSG  -> y_SBSG -> DfDT modulator (test mode) -> y_MUT
//   RBSG  -> y_RBSG -> phase compensator (z^-2)    -> y_REF
//   MUXA  selects the decimation filter input by step:
//           idle, 1, 2: y_MUT     3: y_REF     4: D_MUT - D_REF (in -1..+1,
//           i.e. half the normalised difference; the filter doubles it back)
//   decimation filter (128:1) -> y_DEC -> offset subtractor y_RES = y_DEC - Y_OS
//   MUXB  feeds the amplitude estimator: step 2 y_RES, step 3 y_DEC
//   ORA   offset estimator (step 1, Y_OS), amplitude estimator (step 2,
//         Y_OA2; step 3, Y_OA3), power estimator (step 4, P_THDN)
//   MUXC  sets the BSG amplitudes: A_S = A_T*pi/4 in steps 1-3 and Y_OA3
//         in step 4; A_R = A_T*pi/4 in step 3 and Y_OA2 in step 4.
// The serial interface scans in a21 and A_T*pi/4 and scans out
// {Y_OS, Y_OA2, Y_OA3, P_THDN}; they are captured into its output chain
// when the test finishes. The controller runs the four steps after a rising
// edge of bist_start and raises bist_done at the end.
//
// With bist_start never given the chip is a plain ADC: the modulator is in
// normal mode (test pin low, digital stimulus input held at 1, generators
// stopped) and dec_out/dec_valid carry its decimated conversion of
// v_asig (signed, 2^23 = full scale of the modulator input).
//
// From the results, SNDR = 10 log10((Y_OA2^2 / 2) / P_THDN), offset = Y_OS
// and gain error = Y_OA2 / (A_T |H_DEC|), computed off-chip.
//
// The block diagram, the step sequence, the MUX settings and the
// arithmetic of the estimators follow the published design. Two amplitude
// registers feeding separate A_S and A_R selections (the published block
// diagram draws one MUXC output), the doubled filter output in step 4, the
// number formats and the settle interval are this design's. The modulator
// under test is a behavioural model of an analog circuit; MUT_ALPHA1 gives
// its first integrator a gain error (capacitor ratio, finite op-amp gain),
// which moves its group delay away from the two clocks the phase
// compensator assumes and leaves a residue tone in step 4.
module bist_sd_adc
  import bist_pkg::DEC_W, bist_pkg::step_e;
#(
  parameter int N_SAMPLES = 2048,
  parameter int SETTLE    = 4,
  parameter int L_A12     = 6,
  // First-integrator gain of the modulator model. The nominal 1/2 gives the
  // in-band group delay of two clocks; the delay is about 1/MUT_ALPHA1.
  parameter real MUT_ALPHA1 = 0.5
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    bist_start,
  output logic                    bist_done,
  input  logic signed [23:0]      v_asig,
  input  logic                    sio_shift,
  input  logic                    sio_in,
  output logic                    sio_out,
  output logic signed [DEC_W-1:0] dec_out,
  output logic                    dec_valid,
  output step_e                   step
);

  import bist_pkg::*;

  // Controller
  logic bsg_init, est_clear, est_acc, est_latch, t_mode, ora_busy, done;

  // Setup parameters and amplitude selections
  logic [PARAM_W-1:0] a21, at_pi4, amp_s, amp_r, oa2_q32, oa3_q32;

  // Bitstreams
  logic y_sbsg, y_rbsg, y_ref, d_mut;
  logic signed [1:0] muxa;

  // Decimated domain
  logic signed [DEC_W-1:0] y_dec, y_res, y_a, y_os;
  logic        [DEC_W-1:0] y_oa, y_oa2, y_oa3;
  logic        [PWR_W-1:0] p_thdn;
  bist_results_t           results;

  bist_controller #(.N_SAMPLES(N_SAMPLES), .SETTLE(SETTLE)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (bist_start),
    .dec_valid(dec_valid),
    .ora_busy (ora_busy),
    .step     (step),
    .bsg_init (bsg_init),
    .est_clear(est_clear),
    .est_acc  (est_acc),
    .est_latch(est_latch),
    .t_mode   (t_mode),
    .done     (done)
  );

  // Amplitude estimates in the decimated format (DEC_FRAC fraction bits)
  // are realigned to the PARAM_W-bit setup format, saturating at 1.
  function automatic logic [PARAM_W-1:0] to_param(input logic [DEC_W-1:0] a);
    logic [DEC_W+PARAM_W-DEC_FRAC-1:0] s;
    s = {a, {(PARAM_W-DEC_FRAC){1'b0}}};
    return (|s[DEC_W+PARAM_W-DEC_FRAC-1:PARAM_W]) ? '1 : s[PARAM_W-1:0];
  endfunction

  always_comb begin
    oa2_q32 = to_param(y_oa2);
    oa3_q32 = to_param(y_oa3);
    // MUXC
    amp_s   = (step == STEP_THDN) ? oa3_q32 : at_pi4;
    amp_r   = (step == STEP_THDN) ? oa2_q32 : at_pi4;
  end

  // Digital stimulus generator
  // The generators only run during the test; in normal mode the digital
  // stimulus input of the modulator is held at 1.
  logic d_bsg;
  assign d_bsg = t_mode ? y_sbsg : 1'b1;

  bsg #(.L_A12(L_A12), .PARAM_W(PARAM_W)) u_sbsg (
    .clk  (clk),
    .rst_n(rst_n),
    .init (bsg_init),
    .en   (t_mode),
    .a21  (a21),
    .amp  (amp_s),
    .y_bit(y_sbsg)
  );

  bsg #(.L_A12(L_A12), .PARAM_W(PARAM_W)) u_rbsg (
    .clk  (clk),
    .rst_n(rst_n),
    .init (bsg_init),
    .en   (t_mode),
    .a21  (a21),
    .amp  (amp_r),
    .y_bit(y_rbsg)
  );

  phase_compensator #(.DELAY(2)) u_pc (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (y_rbsg),
    .q    (y_ref)
  );

  // ADC under test: modulator (behavioural model) and decimation filter
  dfdt_sdm_model #(.ALPHA1(MUT_ALPHA1)) u_mut (
    .clk   (clk),
    .rst_n (rst_n),
    .t_mode(t_mode),
    .d_bsg (d_bsg),
    .v_asig(v_asig),
    .d_mut (d_mut)
  );

  // MUXA
  always_comb begin
    unique case (step)
      STEP_REF:  muxa = y_ref ? 2'sd1 : -2'sd1;
      STEP_THDN: muxa = $signed({1'b0, d_mut}) - $signed({1'b0, y_ref});
      default:   muxa = d_mut ? 2'sd1 : -2'sd1;
    endcase
  end

  decimation_filter #(.OSR(OSR), .OUT_W(DEC_W), .OUT_FRAC(DEC_FRAC)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .x         (muxa),
    .double_out(step == STEP_THDN),
    .y         (y_dec),
    .valid     (dec_valid)
  );

  assign dec_out = y_dec;

  // Output response analyser
  offset_estimator #(.N_SAMPLES(N_SAMPLES), .DW(DEC_W)) u_os (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(est_clear && step == STEP_OFFSET),
    .acc  (est_acc && step == STEP_OFFSET),
    .latch(est_latch && step == STEP_OFFSET),
    .x    (y_dec),
    .y_os (y_os)
  );

  always_comb begin
    y_res = y_dec - y_os;
    y_a   = (step == STEP_REF) ? y_dec : y_res;   // MUXB
  end

  amplitude_estimator #(.N_SAMPLES(N_SAMPLES), .DW(DEC_W)) u_amp (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(est_clear),
    .acc  (est_acc && (step == STEP_AMP || step == STEP_REF)),
    .latch(est_latch && (step == STEP_AMP || step == STEP_REF)),
    .x    (y_a),
    .y_oa (y_oa)
  );

  // The estimator's own output register holds Y_OA2 after step 2 and Y_OA3
  // after step 3; Y_OA2 is copied aside when step 3 starts.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         y_oa2 <= '0;
    else if (bsg_init && step == STEP_REF) y_oa2 <= y_oa;
  end

  assign y_oa3 = y_oa;

  power_estimator #(.N_SAMPLES(N_SAMPLES), .DW(DEC_W)) u_pwr (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (est_clear),
    .acc   (est_acc && step == STEP_THDN),
    .latch (est_latch && step == STEP_THDN),
    .x     (y_res),
    .busy  (ora_busy),
    .p_thdn(p_thdn)
  );

  // Serial I/O; results are captured one cycle after the final latch.
  logic done_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done_q <= 1'b0;
    else        done_q <= done;
  end

  assign results   = '{y_os: y_os, y_oa2: y_oa2, y_oa3: y_oa3, p_thdn: p_thdn};
  assign bist_done = done;

  serial_io #(.PARAM_W(PARAM_W), .RES_W(RES_W)) u_sio (
    .clk    (clk),
    .rst_n  (rst_n),
    .shift  (sio_shift),
    .sin    (sio_in),
    .sout   (sio_out),
    .capture(done && !done_q),
    .results(results),
    .a21    (a21),
    .at_pi4 (at_pi4)
  );

endmodule
