// Self-checking testbench for control_unit, with DEBOUNCE shortened to 4.
// Checks: reset state (QPSK, both stages 0, all LEDs lit, HEX "2"); the
// switch selects 256-QAM and back, with the HEX digit following; presses
// step each channel separately and saturate at 0 and 7; the LED bar shows
// 8 - stage LEDs; a glitch shorter than DEBOUNCE is ignored; a held button
// acts only once; and a press takes DEBOUNCE + 3 clocks to act.
module control_unit_tb;
  import qam_tb_pkg::*;
  localparam int unsigned DB = 4;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sw_mod = 1'b0;
  logic [3:0] btn = '0;
  mod_t mod_o;
  stage_t stage_i_o, stage_q_o;
  logic [7:0] led_i, led_q;
  logic [6:0] hex_o;
  int checks = 0, failures = 0;

  control_unit #(.DEBOUNCE(DB)) dut (.clk, .rst_n, .sw_mod, .btn, .mod_o,
    .stage_i_o, .stage_q_o, .led_i, .led_q, .hex_o);

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

  function automatic logic [7:0] bar(int s);
    logic [7:0] b;
    b = '0;
    for (int n = 0; n < 8 - s; n++) b[n] = 1'b1;
    return b;
  endfunction

  // Press button b for `hold` clocks, then release and let it settle.
  task automatic press(int b, int hold);
    @(negedge clk);
    btn[b] = 1'b1;
    repeat (hold) @(negedge clk);
    btn[b] = 1'b0;
    repeat (DB + 4) @(negedge clk);
  endtask

  int exp_i, exp_q, t0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(negedge clk);
    check(mod_o == MOD_QPSK && stage_i_o == 0 && stage_q_o == 0, "reset state");
    check(led_i == 8'hff && led_q == 8'hff, "all LEDs lit at full output");
    check(hex_o == 7'b010_0100, "HEX shows 2 for QPSK");

    sw_mod = 1'b1;
    repeat (3) @(negedge clk);
    check(mod_o == MOD_QAM256, "switch selects 256-QAM after 3 clocks");
    check(hex_o == 7'b000_0000, "HEX shows 8 for 256-QAM");
    sw_mod = 1'b0;
    repeat (3) @(negedge clk);
    check(mod_o == MOD_QPSK, "switch back to QPSK");

    // Timing of one press: I down.
    @(negedge clk);
    btn[1] = 1'b1;
    t0 = 0;
    while (stage_i_o == 0 && t0 < 50) begin
      @(negedge clk);
      t0++;
    end
    check(t0 == int'(DB) + 3, $sformatf("press acted after %0d clocks", t0));
    repeat (20) @(negedge clk);          // held: must act only once
    check(stage_i_o == 1, "held button acts once");
    btn[1] = 1'b0;
    repeat (DB + 4) @(negedge clk);
    exp_i = 1;
    exp_q = 0;

    // Glitch shorter than DEBOUNCE.
    press(1, DB - 2);
    check(stage_i_o == 1, "short glitch ignored");

    // Random presses against a model with saturation.
    for (int n = 0; n < 200; n++) begin
      int b;
      b = int'($urandom_range(0, 3));
      press(b, DB + 1 + int'($urandom_range(0, 3)));
      case (b)
        0: if (exp_i > 0) exp_i--;
        1: if (exp_i < 7) exp_i++;
        2: if (exp_q > 0) exp_q--;
        default: if (exp_q < 7) exp_q++;
      endcase
      check(int'(stage_i_o) == exp_i && int'(stage_q_o) == exp_q,
            $sformatf("after button %0d: stages %0d/%0d, expected %0d/%0d",
                      b, stage_i_o, stage_q_o, exp_i, exp_q));
      check(led_i == bar(exp_i) && led_q == bar(exp_q), "LED bars");
    end

    // Saturation at both ends.
    repeat (9) press(3, DB + 2);
    check(stage_q_o == 7 && led_q == 8'h01, "Q saturates at stage 7");
    repeat (9) press(2, DB + 2);
    check(stage_q_o == 0 && led_q == 8'hff, "Q saturates at stage 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
