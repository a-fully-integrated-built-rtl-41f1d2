// Shared constants and types of the BIST sigma-delta ADC.
//
// Number formats used across the design:
//   * setup parameters (a21 and the amplitude A) are PARAM_W-bit unsigned
//     fractions, value = word / 2^PARAM_W;
//   * decimated samples are DEC_W-bit signed words with DEC_FRAC fraction
//     bits, so 2^DEC_FRAC is the digital full scale (+1);
//   * the power result is 2*DEC_W bits with 2*DEC_FRAC fraction bits.
// The oversampling ratio (128) and the 2048-sample analysis length are the
// values of the published chip; the word widths are this design's choice
// (two 32-bit parameters fill the 64 setup bits per test of the chip).
package bist_pkg;

  localparam int OSR       = 128;   // oversampling ratio
  localparam int N_SAMPLES = 2048;  // decimated samples analysed per step
  localparam int PARAM_W   = 32;    // width of a21 and of the amplitudes
  localparam int DEC_W     = 24;    // decimated sample width
  localparam int DEC_FRAC  = 21;    // fraction bits of a decimated sample
  localparam int PWR_W     = 2 * DEC_W;
  localparam int RES_W     = 3 * DEC_W + PWR_W; // results scanned out

  // BIST step index (the "Step" signal). Step 0 means idle / normal mode.
  typedef enum logic [2:0] {
    STEP_IDLE   = 3'd0,
    STEP_OFFSET = 3'd1,  // offset estimation, Y_OS
    STEP_AMP    = 3'd2,  // stimulus amplitude of the response, Y_OA2
    STEP_REF    = 3'd3,  // amplitude of the reference path, Y_OA3
    STEP_THDN   = 3'd4   // THD+N power, P_THDN
  } step_e;

  // BIST results as brought out through the serial interface.
  typedef struct packed {
    logic signed [DEC_W-1:0] y_os;
    logic        [DEC_W-1:0] y_oa2;
    logic        [DEC_W-1:0] y_oa3;
    logic        [PWR_W-1:0] p_thdn;
  } bist_results_t;

endpackage
