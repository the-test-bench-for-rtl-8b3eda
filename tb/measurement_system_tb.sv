// End-to-end testbench for measurement_system at its default parameters
// (button debounce of 500,000 clocks).
//
// The D/A words are decoded back into bits without using the design's
// tables: for each modulation and power stage the testbench computes, in
// its own arithmetic, the D/A word of every amplitude level, then looks the
// observed words up. The decoded bits of consecutive symbols must obey the
// PRBS-7 recurrence o[t] = ~(o[t-6] ^ o[t-7]). Symbol instants are taken
// from the framer's sym_valid, three clocks before the D/A words change.
// The modulation is read from the HEX digit and the stages from the LED
// bars, both top-level outputs. tx_bit must follow the PRBS period from
// reset. The detector receives tx_bit looped back, at times
// with injected bit errors or replaced by random data; its peak must be
// 127 - 2 * (errors in the window) and its lag the sequence index of the
// window's first bit.
// Mechanisms counted (each must happen): QPSK symbols, 256-QAM symbols,
// modulation switches both ways, power up and down presses on each channel,
// a press at a stage limit, clean, damaged and absent detections.
module measurement_system_tb;
  import qam_tb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sw_mod = 1'b0;
  logic [3:0] btn = '0;
  logic [7:0] led_i, led_q;
  logic [6:0] hex_mod;
  dac_word_t dac_i, dac_q;
  logic tx_bit;
  logic rx_bit = 1'b0, rx_valid = 1'b0;
  logic det_ready, det_valid, det_found;
  logic signed [8:0] det_peak;
  logic [6:0] det_lag;
  int checks = 0, failures = 0;

  localparam int DB = 500_000;   // the top's default debounce

  measurement_system dut (
    .clk, .rst_n, .sw_mod, .btn, .led_i, .led_q, .hex_mod, .dac_i, .dac_q,
    .tx_bit, .rx_bit, .rx_valid, .det_ready, .det_valid, .det_peak,
    .det_lag, .det_found);

  always #5 clk = ~clk;

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 200) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // ---------------- reference sequence and level tables ----------------
  logic seq [127];
  int   dac_of [2][8][16];   // [mode][stage][code] -> D/A word

  function automatic int factor(int k);
    real f;
    int  x;
    f = 16384.0 * (468.75 - 15.0 * k) / 468.75;
    x = int'(f);
    return (x > 16383) ? 16383 : x;
  endfunction

  function automatic int level(int mode, int code);
    if (mode == 0) return code ? 7680 : -7680;
    return (2 * code - 15) * 512;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_qpsk_sym, n_qam_sym, n_to_qam, n_to_qpsk;
  int n_i_up, n_i_down, n_q_up, n_q_down, n_limit;
  int n_det_clean, n_det_damaged, n_det_none;

  // ---------------- observed mode and stages (from outputs) ----------------
  int cyc;                 // posedges with reset released
  int mode_hist [8];
  int st_i_hist [4], st_q_hist [4];
  int sv_hist [4];         // framer sym_valid, delayed

  function automatic int stage_of(logic [7:0] led);
    int n;
    n = 0;
    for (int b = 0; b < 8; b++) n += int'(led[b]);
    return 8 - n;
  endfunction

  // ---------------- symbol decoding ----------------
  logic bits_q [$];
  int   err_mode;

  function automatic int decode(int mode, int stage, int word);
    for (int c = 0; c < ((mode == 0) ? 2 : 16); c++)
      if (dac_of[mode][stage][c] == word) return c;
    return -1;
  endfunction

  task automatic take_symbol();
    int  m, si, sq, ci, cq, nb;
    logic stable;
    m  = mode_hist[0];
    si = st_i_hist[2];
    sq = st_q_hist[2];
    stable = 1'b1;
    for (int h = 0; h < 8; h++) if (mode_hist[h] != m) stable = 1'b0;
    for (int h = 2; h < 4; h++) if (st_i_hist[h] != si || st_q_hist[h] != sq) stable = 1'b0;
    if (!stable) begin
      bits_q.delete();
      return;
    end
    ci = decode(m, si, int'(dac_i));
    cq = decode(m, sq, int'(dac_q));
    check(ci >= 0 && cq >= 0,
          $sformatf("mode %0d stages %0d/%0d: D/A words %0d/%0d are no level", m, si, sq, dac_i, dac_q));
    if (ci < 0 || cq < 0) begin
      bits_q.delete();
      return;
    end
    nb = (m == 0) ? 1 : 4;
    for (int b = nb - 1; b >= 0; b--) bits_q.push_back(1'(ci >> b));
    for (int b = nb - 1; b >= 0; b--) bits_q.push_back(1'(cq >> b));
    if (m == 0) n_qpsk_sym++; else n_qam_sym++;
    // Check the newest bits against the recurrence.
    for (int t = bits_q.size() - 2 * nb; t < bits_q.size(); t++)
      if (t >= 7)
        check(bits_q[t] == ~(bits_q[t-6] ^ bits_q[t-7]), "decoded bits break the PRBS recurrence");
    while (bits_q.size() > 16) void'(bits_q.pop_front());
  endtask

  // ---------------- detector loop-back ----------------
  int  inject;             // 0 clean, 1 bit errors, 2 random data
  int  win_err, win_first, win_len;
  logic win_random;

  always @(negedge clk) begin
    if (rst_n) begin
      // tx_bit must be the (cyc mod 127)-th bit of the period.
      check(tx_bit == seq[cyc % 127], $sformatf("tx_bit off sequence at %0d", cyc));
      for (int h = 7; h > 0; h--) mode_hist[h] = mode_hist[h-1];
      mode_hist[0] = (hex_mod == 7'b010_0100) ? 0 : (hex_mod == 7'b000_0000) ? 1 : -1;
      check(mode_hist[0] >= 0, "HEX digit shows neither 2 nor 8");
      for (int h = 3; h > 0; h--) begin
        st_i_hist[h] = st_i_hist[h-1];
        st_q_hist[h] = st_q_hist[h-1];
        sv_hist[h]   = sv_hist[h-1];
      end
      st_i_hist[0] = stage_of(led_i);
      st_q_hist[0] = stage_of(led_q);
      sv_hist[0]   = int'(dut.u_framer.sym_valid);
      if (sv_hist[3] != 0) take_symbol();

      // Detector results.
      if (det_valid) begin
        if (win_random) begin
          check(!det_found && det_peak < 63, $sformatf("random window detected, peak %0d", det_peak));
          n_det_none++;
        end else begin
          check(det_found && int'(det_peak) == 127 - 2 * win_err,
                $sformatf("peak %0d with %0d errors", det_peak, win_err));
          check(int'(det_lag) == win_first,
                $sformatf("lag %0d, expected %0d", det_lag, win_first));
          if (win_err == 0) n_det_clean++; else n_det_damaged++;
        end
      end
      // Next bit offered to the detector.
      // tx_bit flows one bit per clock, so the loop-back is always valid.
      rx_valid = 1'b1;
      case (inject)
        1:       rx_bit = tx_bit ^ ($urandom_range(0, 99) < 4);
        2:       rx_bit = 1'($urandom);
        default: rx_bit = tx_bit;
      endcase
      if (rx_valid && det_ready) begin
        if (win_len == 0) begin
          win_first  = cyc % 127;
          win_err    = 0;
          win_random = (inject == 2);
        end
        if (inject == 2) win_random = 1'b1;
        if (inject != 2 && rx_bit != tx_bit) win_err++;
        win_len = (win_len == 126) ? 0 : win_len + 1;
      end
    end
  end

  always @(posedge clk) if (rst_n) cyc++;

  // ---------------- stimulus ----------------
  task automatic press(int b);
    int before_i, before_q;
    before_i = stage_of(led_i);
    before_q = stage_of(led_q);
    @(negedge clk);
    btn[b] = 1'b1;
    repeat (DB + 10) @(negedge clk);
    btn[b] = 1'b0;
    repeat (DB + 10) @(negedge clk);
    case (b)
      0: begin
        check(stage_of(led_i) == ((before_i > 0) ? before_i - 1 : 0), "I up");
        if (before_i == 0) n_limit++; else n_i_up++;
      end
      1: begin
        check(stage_of(led_i) == ((before_i < 7) ? before_i + 1 : 7), "I down");
        if (before_i == 7) n_limit++; else n_i_down++;
      end
      2: begin
        check(stage_of(led_q) == ((before_q > 0) ? before_q - 1 : 0), "Q up");
        if (before_q == 0) n_limit++; else n_q_up++;
      end
      default: begin
        check(stage_of(led_q) == ((before_q < 7) ? before_q + 1 : 7), "Q down");
        if (before_q == 7) n_limit++; else n_q_down++;
      end
    endcase
  endtask

  task automatic set_mode(logic m);
    sw_mod = m;
    if (m) n_to_qam++; else n_to_qpsk++;
    repeat (3000) @(negedge clk);
    check(mode_hist[0] == int'(m), "modulation switch");
  endtask

  initial begin
    for (int t = 0; t < 127; t++) seq[t] = (t < 7) ? 1'b0 : ~(seq[t-6] ^ seq[t-7]);
    for (int m = 0; m < 2; m++)
      for (int k = 0; k < 8; k++)
        for (int c = 0; c < 16; c++)
          dac_of[m][k][c] = int'((longint'(level(m, c)) * factor(k)) >>> 14) + 8192;
    mode_hist = '{default: -2};
    st_i_hist = '{default: -2};
    st_q_hist = '{default: -2};
    sv_hist   = '{default: 0};
    cyc = 0;
    inject = 0;
    win_len = 0;
    win_err = 0;
    win_first = 0;
    win_random = 1'b0;

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(dac_i == 14'd8192 && dac_q == 14'd8192, "D/A at mid-scale after reset");
    repeat (3000) @(negedge clk);

    press(1);                     // I down: stage 1
    inject = 1;
    press(1);                     // I down: stage 2
    press(3);                     // Q down: stage 1
    inject = 2;
    set_mode(1'b1);               // 256-QAM
    repeat (2000) @(negedge clk);
    inject = 0;
    press(0);                     // I up: stage 1
    press(0);                     // I up: stage 0
    press(0);                     // I up at the limit
    press(2);                     // Q up: stage 0
    inject = 1;
    set_mode(1'b0);               // back to QPSK
    press(3);                     // Q down while in QPSK
    inject = 0;
    repeat (3000) @(negedge clk);

    check(n_qpsk_sym > 0, "QPSK symbols seen");
    check(n_qam_sym > 0, "256-QAM symbols seen");
    check(n_to_qam > 0 && n_to_qpsk > 0, "modulation switched both ways");
    check(n_i_up > 0 && n_i_down > 0 && n_q_up > 0 && n_q_down > 0, "power stepped both ways on both channels");
    check(n_limit > 0, "press at a stage limit");
    check(n_det_clean > 0, "clean detection");
    check(n_det_damaged > 0, "damaged detection");
    check(n_det_none > 0, "random data not detected");
    $display("QPSK symbols %0d, 256-QAM symbols %0d, switches %0d/%0d", n_qpsk_sym, n_qam_sym, n_to_qam, n_to_qpsk);
    $display("presses: I up %0d down %0d, Q up %0d down %0d, at limit %0d", n_i_up, n_i_down, n_q_up, n_q_down, n_limit);
    $display("detections: clean %0d damaged %0d none %0d", n_det_clean, n_det_damaged, n_det_none);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
