// Self-checking testbench for prbs_detector.
// The reference PRBS-7 period is computed here from the recurrence
// o[t] = ~(o[t-6] ^ o[t-7]) with seven zero seed bits. Windows of 127 bits
// are sent with gaps in rx_valid: a clean window at phase 0, clean and
// damaged windows at random phases (expected peak 127 - 2 * errors at lag
// = phase) and random data (no detection). The result latency of 128
// clocks after the last accepted bit is checked as well.
module prbs_detector_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic rx_bit = 1'b0, rx_valid = 1'b0;
  logic ready, result_valid, found;
  logic signed [8:0] corr_peak;
  logic [6:0] peak_lag;
  int checks = 0, failures = 0;
  int cycle = 0;

  prbs_detector dut (.clk, .rst_n, .rx_bit, .rx_valid, .ready, .result_valid,
                     .corr_peak, .peak_lag, .found);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic seq [127];
  int   last_accept;

  // Send one window: bit i is seq[(phase + i) % 127], flipped where err[i].
  task automatic send_window(int phase, logic err [127], logic random_data);
    int i;
    i = 0;
    while (i < 127) begin
      @(negedge clk);
      rx_valid = ($urandom_range(0, 9) < 7);
      rx_bit   = random_data ? 1'($urandom) : seq[(phase + i) % 127] ^ err[i];
      // Accepted at the coming edge, the (cycle + 1)-th.
      if (rx_valid && ready) begin
        last_accept = cycle + 1;
        i++;
      end
      @(posedge clk);
    end
    @(negedge clk);
    rx_valid = 1'b0;
  endtask

  task automatic expect_result(int peak, int lag, logic fnd, string name);
    do @(negedge clk); while (!result_valid);
    check(cycle - last_accept == 128,
          $sformatf("%s: latency %0d, expected 128", name, cycle - last_accept));
    check(corr_peak == 9'(peak), $sformatf("%s: peak %0d, expected %0d", name, corr_peak, peak));
    if (lag >= 0)
      check(peak_lag == 7'(lag), $sformatf("%s: lag %0d, expected %0d", name, peak_lag, lag));
    check(found == fnd, $sformatf("%s: found %0d", name, found));
  endtask

  logic err [127];
  int   phase, n_err, pos;

  initial begin
    for (int t = 0; t < 127; t++) seq[t] = (t < 7) ? 1'b0 : ~(seq[t-6] ^ seq[t-7]);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // ready rises once the reference is loaded (127 clocks of INIT).
    while (!ready) @(posedge clk);

    for (int w = 0; w < 12; w++) begin
      foreach (err[i]) err[i] = 1'b0;
      phase = (w == 0) ? 0 : int'($urandom_range(0, 126));
      n_err = (w < 2) ? 0 : (w % 4) * 4 + 1;     // 0, 0, 9, 13, 1, 5, ...
      for (int e = 0; e < n_err; ) begin
        pos = int'($urandom_range(0, 126));
        if (!err[pos]) begin
          err[pos] = 1'b1;
          e++;
        end
      end
      send_window(phase, err, 1'b0);
      expect_result(127 - 2 * n_err, phase, 1'b1, $sformatf("window %0d phase %0d errors %0d", w, phase, n_err));
    end

    // Random data: no lag correlates strongly.
    for (int w = 0; w < 3; w++) begin
      send_window(0, err, 1'b1);
      do @(negedge clk); while (!result_valid);
      check(corr_peak < 63 && !found, $sformatf("random window: peak %0d found %0d", corr_peak, found));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
