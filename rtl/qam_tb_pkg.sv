// Shared types and constants of the QPSK / 256-QAM test-signal generator.
//
// The generator produces baseband I/Q amplitude levels for an external direct
// (I/Q) modulator. All internal samples are 14-bit two's complement; the D/A
// converter takes 14-bit offset binary (0..16383). The modulator constants are
// derived from the statement that the largest 256-QAM level uses a multiplier
// of 15 on a 10-bit sine/cosine scale, giving 15 * 512 = 7680 full-scale
// counts (0.9375 of 8192). The same peak is used for QPSK, as every modulator
// was built to the same range. The eight power stages reduce the peak output
// in equal 15 mV steps from 468.75 mV; the factor table below is computed
// from that rule. Widths, levels and the 15 mV rule follow the original
// system; the exact factor values and the enum encoding are derived here.
package qam_tb_pkg;

  localparam int unsigned SAMPLE_W = 14;   // D/A word width
  localparam int unsigned FACTOR_W = 14;   // attenuation factor width
  localparam int unsigned STAGE_W  = 3;

  typedef logic signed [SAMPLE_W-1:0] sample_t;   // signed baseband sample
  typedef logic        [SAMPLE_W-1:0] dac_word_t; // offset-binary D/A word
  typedef logic        [FACTOR_W-1:0] factor_t;   // unsigned, value/2^14
  typedef logic        [STAGE_W-1:0]  stage_t;    // 0 = no attenuation

  // Modulation chosen by the board switches.
  typedef enum logic [0:0] {
    MOD_QPSK   = 1'b0,
    MOD_QAM256 = 1'b1
  } mod_t;

  // Bits carried by one symbol of each modulation.
  function automatic int unsigned bits_per_symbol(mod_t m);
    return (m == MOD_QPSK) ? 2 : 8;
  endfunction

  // 256-QAM: 16 levels per axis, odd multipliers -15..15 of this step.
  localparam int QAM_STEP = 512;
  // QPSK: one level per axis at the same full-scale peak, 15 * 512.
  localparam int QPSK_AMP = 15 * QAM_STEP;

  // Attenuation factor of stage k (k = 0..7), as a fraction of 2^14.
  // The peak output is 468.75 mV at stage 0 and falls 15 mV per stage, so
  // the factor is 1 - k * 15 / 468.75 = 1 - 0.032 k. Times 2^14 that is
  // 16384 - 524.288 k, rounded; stage 0 saturates to 16383, the largest
  // 14-bit value.
  function automatic factor_t stage_factor(stage_t k);
    int unsigned f;
    f = 16384 - (524288 * int'(k) + 500) / 1000;
    if (f > 16383) f = 16383;
    return factor_t'(f);
  endfunction

endpackage
