// Serial-to-symbol framer between the PRBS source and the symbol mappers.
//
// Bits arrive one per clock while bit_valid is high and are collected,
// first bit most significant, until a symbol is complete: 2 bits for QPSK,
// 8 bits for 256-QAM. The symbol is then presented on sym with a one-clock
// sym_valid pulse; for QPSK only sym[1:0] is meaningful. The bit rate is
// therefore constant and the symbol rate is the bit rate divided by the
// bits per symbol. A change of modulation discards the partial symbol and
// starts framing afresh. The document does not describe how the test data
// reaches the modulators; this framing is this design's choice.
// Timing: sym_valid rises one clock after the clock that took the last bit.
module symbol_framer
  import qam_tb_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  mod_t       mod_i,
  input  logic       bit_i,
  input  logic       bit_valid,
  output logic [7:0] sym,
  output logic       sym_valid
);

  logic [6:0] shift_q;
  logic [2:0] cnt_q;
  mod_t       mod_q;
  logic [2:0] last;

  assign last = 3'(bits_per_symbol(mod_i) - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shift_q   <= '0;
      cnt_q     <= '0;
      mod_q     <= MOD_QPSK;
      sym       <= '0;
      sym_valid <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      mod_q     <= mod_i;
      if (mod_i != mod_q) begin
        cnt_q <= '0;
      end else if (bit_valid) begin
        shift_q <= {shift_q[5:0], bit_i};
        if (cnt_q == last) begin
          cnt_q     <= '0;
          sym       <= {shift_q, bit_i};
          sym_valid <= 1'b1;
        end else begin
          cnt_q <= cnt_q + 3'd1;
        end
      end
    end
  end

endmodule
