// Self-checking testbench for qpsk_mod.
// Random symbols are offered with random sym_valid; each accepted symbol
// must appear one clock later as I = +/-7680 (sym[1]) and Q = +/-7680
// (sym[0]), and the outputs must hold while sym_valid is low.
module qpsk_mod_tb;
  import qam_tb_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] sym = '0;
  logic sym_valid = 1'b0;
  sample_t i_o, q_o;
  int checks = 0, failures = 0;

  qpsk_mod dut (.clk, .rst_n, .sym, .sym_valid, .i_o, .q_o);

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

  int exp_i, exp_q;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(i_o == 0 && q_o == 0, "outputs cleared by reset");
    exp_i = 0;
    exp_q = 0;
    for (int n = 0; n < 400; n++) begin
      sym       = 2'($urandom);
      sym_valid = 1'($urandom);
      @(negedge clk);
      if (sym_valid) begin
        exp_i = sym[1] ? 7680 : -7680;
        exp_q = sym[0] ? 7680 : -7680;
      end
      check(int'(i_o) == exp_i && int'(q_o) == exp_q,
            $sformatf("sym %b valid %b: got I %0d Q %0d, expected %0d %0d",
                      sym, sym_valid, i_o, q_o, exp_i, exp_q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
