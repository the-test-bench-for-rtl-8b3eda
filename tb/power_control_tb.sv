// Self-checking testbench for power_control.
// The expected D/A word is floor(sample * x / 2^14) + 8192, where the factor
// x of stage k is worked out here in floating point as
// min(16383, round(2^14 * (468.75 - 15 k) / 468.75)). Every stage is run
// with the extreme samples and with random ones; the output must follow the
// input two clocks later. The peak output of each stage, in millivolts of a
// 500 mV full scale, must fall in 15 mV steps from 468.75 mV.
module power_control_tb;
  import qam_tb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  sample_t   sample_i = '0;
  stage_t    stage_i = '0;
  dac_word_t dac_o;
  int checks = 0, failures = 0;

  power_control dut (.clk, .rst_n, .sample_i, .stage_i, .dac_o);

  always #5 clk = ~clk;

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

  function automatic longint factor(int k);
    real    f;
    longint x;
    f = 16384.0 * (468.75 - 15.0 * k) / 468.75;
    x = longint'(f);          // rounds to nearest
    return (x > 16383) ? 16383 : x;
  endfunction

  function automatic int expected(int s, int k);
    longint p;
    p = longint'(s) * factor(k);
    return int'(p >>> 14) + 8192;   // floor division by 2^14
  endfunction

  int   exp_pipe [3];
  int   s;
  real  mv;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(dac_o == 14'd8192, "reset output is mid-scale");
    exp_pipe = '{default: 8192};
    for (int k = 0; k < 8; k++) begin
      for (int n = 0; n < 300; n++) begin
        case (n)
          0: s = 7680;
          1: s = -7680;
          2: s = 8191;
          3: s = -8192;
          4: s = 0;
          default: s = int'($urandom_range(0, 16383)) - 8192;
        endcase
        sample_i = sample_t'(s);
        stage_i  = stage_t'(k);
        @(negedge clk);
        exp_pipe[2] = exp_pipe[1];
        exp_pipe[1] = expected(s, k);
        if (n >= 2 || k > 0)
          check(int'(dac_o) == exp_pipe[2],
                $sformatf("stage %0d: got %0d, expected %0d", k, dac_o, exp_pipe[2]));
        if (n == 1) begin
          // dac_o now holds the result for s = 7680, the largest level.
          mv = real'(int'(dac_o) - 8192) * 500.0 / 8192.0;
          check(mv > 468.75 - 15.0 * k - 0.1 && mv < 468.75 - 15.0 * k + 0.1,
                $sformatf("stage %0d: peak %f mV", k, mv));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
