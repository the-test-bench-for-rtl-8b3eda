// PRBS-7 detector: locates the 127-bit PRBS in a received bit stream and
// measures how intact it is, by circular cross correlation against a
// reference sequence made by a built-in generator identical to the
// transmitting one.
//
// Operation, as a small state machine:
//   INIT      after reset the built-in prbs_gen runs for 127 clocks and its
//             output fills the reference register (one full period).
//   CAPTURE   127 received bits (qualified by rx_valid) are shifted into a
//             window register, oldest bit at index 0.
//   CORRELATE one lag per clock, 127 clocks: the reference is rotated by one
//             bit per clock and compared bit by bit with the window. The
//             correlation in +/-1 terms is agreements - disagreements
//             = 2 * agreements - 127. The largest value and its lag are kept.
//   DONE      one clock: result_valid is high, corr_peak, peak_lag and
//             found are valid and held until the next result. The machine
//             then returns to CAPTURE for a fresh window.
// An undisturbed window gives a peak of +127 at one lag and -1 at every
// other lag (the m-sequence property); each bit error lowers the peak by 2.
// peak_lag = L means window bit i equals reference bit (i + L) mod 127, i.e.
// the first captured bit was bit L of the reference period.
//
// The correlation method and the built-in generator follow the document,
// which computed the correlation with vendor FFT cores; here it is computed
// directly in the time domain, one lag per clock, which needs no FFT and
// gives the same circular correlation. Window handling, the result format,
// the threshold for `found` and the timing are this design's choices.
// Latency: result_valid rises 128 clocks after the clock that accepted the
// 127th bit of a window.
module prbs_detector #(
  parameter int THRESHOLD = 63   // corr_peak >= THRESHOLD sets found
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rx_bit,
  input  logic              rx_valid,
  output logic              ready,        // capturing a window
  output logic              result_valid, // one-clock pulse
  output logic signed [8:0] corr_peak,    // -127..127
  output logic        [6:0] peak_lag,     // 0..126
  output logic              found
);

  localparam int unsigned LEN = 127;   // PRBS-7 period, 2^7 - 1

  typedef enum logic [1:0] {S_INIT, S_CAPTURE, S_CORRELATE, S_DONE} state_t;

  state_t            state_q;
  logic [LEN-1:0]    ref_q;      // reference period, ref_q[j] = j-th bit
  logic [LEN-1:0]    rot_q;      // reference rotated by lag_q
  logic [LEN-1:0]    win_q;      // received window, win_q[0] oldest
  logic [6:0]        cnt_q;      // bit counter for INIT and CAPTURE
  logic [6:0]        lag_q;
  logic signed [8:0] best_q;
  logic [6:0]        best_lag_q;
  logic              gen_en;
  logic              gen_bit;
  logic signed [8:0] corr;

  prbs_gen u_ref_gen (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (gen_en),
    .bit_o  (gen_bit),
    .state_o()
  );

  assign gen_en = (state_q == S_INIT);

  // Correlation at the current lag: 2 * agreements - LEN.
  always_comb begin
    logic [LEN-1:0] agree;
    int unsigned    n_match;
    agree   = ~(win_q ^ rot_q);
    n_match = 0;
    for (int i = 0; i < int'(LEN); i++) n_match += int'(agree[i]);
    corr = 9'(2 * int'(n_match) - int'(LEN));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q      <= S_INIT;
      cnt_q        <= '0;
      lag_q        <= '0;
      ref_q        <= '0;
      rot_q        <= '0;
      win_q        <= '0;
      best_q       <= '0;
      best_lag_q   <= '0;
      result_valid <= 1'b0;
      corr_peak    <= '0;
      peak_lag     <= '0;
      found        <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      unique case (state_q)
        S_INIT: begin
          ref_q <= {gen_bit, ref_q[LEN-1:1]};
          if (cnt_q == 7'(LEN - 1)) begin
            cnt_q   <= '0;
            state_q <= S_CAPTURE;
          end else begin
            cnt_q <= cnt_q + 7'd1;
          end
        end
        S_CAPTURE: begin
          if (rx_valid) begin
            win_q <= {rx_bit, win_q[LEN-1:1]};
            if (cnt_q == 7'(LEN - 1)) begin
              cnt_q      <= '0;
              lag_q      <= '0;
              rot_q      <= ref_q;
              best_q     <= -9'sd128;
              best_lag_q <= '0;
              state_q    <= S_CORRELATE;
            end else begin
              cnt_q <= cnt_q + 7'd1;
            end
          end
        end
        S_CORRELATE: begin
          if (corr > best_q) begin
            best_q     <= corr;
            best_lag_q <= lag_q;
          end
          rot_q <= {rot_q[0], rot_q[LEN-1:1]};
          if (lag_q == 7'(LEN - 1)) begin
            state_q <= S_DONE;
          end else begin
            lag_q <= lag_q + 7'd1;
          end
        end
        S_DONE: begin
          result_valid <= 1'b1;
          corr_peak    <= best_q;
          peak_lag     <= best_lag_q;
          found        <= (best_q >= 9'(THRESHOLD));
          state_q      <= S_CAPTURE;
        end
        default: state_q <= S_INIT;
      endcase
    end
  end

  assign ready = (state_q == S_CAPTURE);

  // A result is a single-clock pulse, after which a new window is captured.
  always_ff @(posedge clk)
    if (rst_n && result_valid)
      assert (state_q == S_CAPTURE) else $error("prbs_detector: result pulse longer than one clock");

endmodule
