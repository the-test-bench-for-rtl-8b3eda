// QPSK symbol mapper for a direct I/Q modulator.
//
// The generator drives an external direct modulator, which makes its own
// carrier, so no IF carrier is generated here: each axis is the symbol's
// sign (+1 or -1) multiplied by a constant, AMP. AMP defaults to 7680, the
// same full-scale peak that the 256-QAM mapper reaches (15 * 512), so both
// modulations use the D/A range equally. The output is 14-bit signed; the
// conversion to offset binary happens later, in power_control.
//
// Mapping (this design's choice, the bit-to-point assignment is not given):
// sym[1] selects I, sym[0] selects Q; a 1 maps to +AMP, a 0 to -AMP.
// Timing: sym is sampled when sym_valid is high; i_o/q_o change one clock
// later and hold until the next symbol. Reset clears both to 0.
module qpsk_mod
  import qam_tb_pkg::*;
#(
  parameter int AMP = QPSK_AMP
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] sym,
  input  logic       sym_valid,
  output sample_t    i_o,
  output sample_t    q_o
);

  localparam sample_t POS = sample_t'(AMP);
  localparam sample_t NEG = sample_t'(-AMP);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_o <= '0;
      q_o <= '0;
    end else if (sym_valid) begin
      i_o <= sym[1] ? POS : NEG;
      q_o <= sym[0] ? POS : NEG;
    end
  end

  initial assert (AMP > 0 && AMP < 8192) else $error("qpsk_mod: AMP out of range");

endmodule
