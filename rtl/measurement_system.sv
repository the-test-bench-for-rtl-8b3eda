// Measurement system: a stand-alone generator of QPSK and 256-QAM baseband
// test signals for an external direct I/Q modulator, with a PRBS detector.
//
// Data path: prbs_gen (PRBS-7, one bit per clock) -> symbol_framer (2 or 8
// bits per symbol) -> qpsk_mod and qam256_mod -> modulation select ->
// power_control for I and for Q -> two 14-bit offset-binary D/A words.
// control_unit reads the modulation switch and the four power buttons and
// drives the LEDs and the HEX digit. The modulation and both power stages
// can be changed while the generator runs. prbs_detector is a separate
// receiver-side unit: it takes a bit stream (for example the PRBS looped
// back through a unit under test) and reports where the sequence sits and
// how many bits of a 127-bit window agree with it.
//
// The single clock is supplied from outside (on the board it comes from
// one global PLL shared by all units and by the D/A converter); the D/A
// converter board itself is outside this design.
// Latency from a symbol's last PRBS bit to the D/A words: 1 clock framer,
// 1 clock mapper, 2 clocks power control; the select mux is combinational.
// The partition into PRBS source, modulators, power control per channel and
// board control, the single global clock and the two selectable modulations
// follow the original system; the serial framing of the test data, the
// placement of the detector beside the generator and the port names are
// this design's own.
module measurement_system
  import qam_tb_pkg::*;
#(
  parameter int unsigned DEBOUNCE  = 500_000, // button debounce, clocks
  parameter int          THRESHOLD = 63       // detector "found" level
) (
  input  logic              clk,
  input  logic              rst_n,
  // board controls
  input  logic              sw_mod,        // 0 = QPSK, 1 = 256-QAM
  input  logic [3:0]        btn,           // {Q down, Q up, I down, I up}
  output logic [7:0]        led_i,
  output logic [7:0]        led_q,
  output logic [6:0]        hex_mod,       // active-low segments {g..a}
  // to the D/A converter board
  output dac_word_t         dac_i,
  output dac_word_t         dac_q,
  // transmitted test bit stream, for monitoring or loop-back
  output logic              tx_bit,
  // PRBS detector
  input  logic              rx_bit,
  input  logic              rx_valid,
  output logic              det_ready,
  output logic              det_valid,
  output logic signed [8:0] det_peak,
  output logic        [6:0] det_lag,
  output logic              det_found
);

  mod_t       mod;
  stage_t     stage_i, stage_q;
  logic       prbs_bit;
  logic [7:0] sym;
  logic       sym_valid;
  sample_t    qpsk_i, qpsk_q, qam_i, qam_q;
  sample_t    sel_i, sel_q;

  control_unit #(.DEBOUNCE(DEBOUNCE)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .sw_mod   (sw_mod),
    .btn      (btn),
    .mod_o    (mod),
    .stage_i_o(stage_i),
    .stage_q_o(stage_q),
    .led_i    (led_i),
    .led_q    (led_q),
    .hex_o    (hex_mod)
  );

  prbs_gen u_prbs (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (1'b1),
    .bit_o  (prbs_bit),
    .state_o()
  );

  symbol_framer u_framer (
    .clk      (clk),
    .rst_n    (rst_n),
    .mod_i    (mod),
    .bit_i    (prbs_bit),
    .bit_valid(1'b1),
    .sym      (sym),
    .sym_valid(sym_valid)
  );

  qpsk_mod u_qpsk (
    .clk      (clk),
    .rst_n    (rst_n),
    .sym      (sym[1:0]),
    .sym_valid(sym_valid && mod == MOD_QPSK),
    .i_o      (qpsk_i),
    .q_o      (qpsk_q)
  );

  qam256_mod u_qam (
    .clk      (clk),
    .rst_n    (rst_n),
    .sym      (sym),
    .sym_valid(sym_valid && mod == MOD_QAM256),
    .i_o      (qam_i),
    .q_o      (qam_q)
  );

  always_comb begin
    sel_i = (mod == MOD_QPSK) ? qpsk_i : qam_i;
    sel_q = (mod == MOD_QPSK) ? qpsk_q : qam_q;
  end

  power_control u_pwr_i (
    .clk     (clk),
    .rst_n   (rst_n),
    .sample_i(sel_i),
    .stage_i (stage_i),
    .dac_o   (dac_i)
  );

  power_control u_pwr_q (
    .clk     (clk),
    .rst_n   (rst_n),
    .sample_i(sel_q),
    .stage_i (stage_q),
    .dac_o   (dac_q)
  );

  assign tx_bit = prbs_bit;

  prbs_detector #(.THRESHOLD(THRESHOLD)) u_det (
    .clk         (clk),
    .rst_n       (rst_n),
    .rx_bit      (rx_bit),
    .rx_valid    (rx_valid),
    .ready       (det_ready),
    .result_valid(det_valid),
    .corr_peak   (det_peak),
    .peak_lag    (det_lag),
    .found       (det_found)
  );

endmodule
