// Self-checking testbench for prbs_gen.
// The output is compared with the recurrence of x^7 + x^6 + 1 under XNOR
// feedback, o[t] = ~(o[t-6] ^ o[t-7]), worked out here from the bit history
// rather than from the register. Also checked: the first seven bits equal
// the reset state, the period is exactly 127 (state returns to the seed and
// not earlier), one period holds 63 ones, and `en` low freezes the register.
// A second instance starts from a non-zero seed.
module prbs_gen_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic bit_a, bit_b;
  logic [6:0] st_a, st_b;
  int checks = 0, failures = 0;

  localparam logic [6:0] SEED_B = 7'h2b;

  prbs_gen dut_a (.clk, .rst_n, .en, .bit_o(bit_a), .state_o(st_a));
  prbs_gen #(.SEED(SEED_B)) dut_b (.clk, .rst_n, .en, .bit_o(bit_b), .state_o(st_b));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  logic hist_a [300];
  logic hist_b [300];
  int   ones;
  int   first_return;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // en low: nothing moves
    repeat (3) @(posedge clk);
    check(st_a == 7'h00 && st_b == SEED_B, "register held while en is low");
    en <= 1'b1;
    first_return = -1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      hist_a[t] = bit_a;
      hist_b[t] = bit_b;
      if (t > 0 && first_return < 0 && st_a == 7'h00) first_return = t;
      @(posedge clk);
    end
    // First seven outputs are stages 7, 6, ..., 1 of the reset state.
    for (int t = 0; t < 7; t++) begin
      check(hist_a[t] == 1'b0, $sformatf("seed bit %0d of instance a", t));
      check(hist_b[t] == SEED_B[6-t], $sformatf("seed bit %0d of instance b", t));
    end
    for (int t = 7; t < 300; t++) begin
      check(hist_a[t] == ~(hist_a[t-6] ^ hist_a[t-7]), $sformatf("recurrence a at %0d", t));
      check(hist_b[t] == ~(hist_b[t-6] ^ hist_b[t-7]), $sformatf("recurrence b at %0d", t));
    end
    check(first_return == 127, $sformatf("period is %0d, expected 127", first_return));
    ones = 0;
    for (int t = 0; t < 127; t++) ones += int'(hist_a[t]);
    check(ones == 63, $sformatf("%0d ones in one period, expected 63", ones));
    for (int t = 0; t < 127; t++)
      check(hist_a[t] == hist_a[t+127], $sformatf("periodic at %0d", t));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
