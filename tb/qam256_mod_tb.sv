// Self-checking testbench for qam256_mod.
// All 256 symbols are applied, then random ones with random sym_valid. Each
// axis must show (2k - 15) * 512 one clock after the symbol is accepted,
// with k = sym[7:4] for I and sym[3:0] for Q, and hold otherwise. The corner
// level 15 * 512 = 7680 is the 468.75 mV peak of a 500 mV, 8192-count range.
module qam256_mod_tb;
  import qam_tb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] sym = '0;
  logic sym_valid = 1'b0;
  sample_t i_o, q_o;
  int checks = 0, failures = 0;

  qam256_mod dut (.clk, .rst_n, .sym, .sym_valid, .i_o, .q_o);

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

  int exp_i, exp_q, max_i;
  logic [7:0] s;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(i_o == 0 && q_o == 0, "outputs cleared by reset");
    exp_i = 0;
    exp_q = 0;
    max_i = 0;
    for (int n = 0; n < 1000; n++) begin
      s         = (n < 256) ? 8'(n) : 8'($urandom);
      sym       = s;
      sym_valid = (n < 256) ? 1'b1 : 1'($urandom);
      @(negedge clk);
      if (sym_valid) begin
        exp_i = (2 * int'(s[7:4]) - 15) * 512;
        exp_q = (2 * int'(s[3:0]) - 15) * 512;
      end
      if (int'(i_o) > max_i) max_i = int'(i_o);
      check(int'(i_o) == exp_i && int'(q_o) == exp_q,
            $sformatf("sym %h valid %b: got I %0d Q %0d, expected %0d %0d",
                      s, sym_valid, i_o, q_o, exp_i, exp_q));
    end
    check(max_i * 50000 / 8192 == 46875, $sformatf("peak %0d counts is not 468.75 mV", max_i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
