// 256-QAM symbol mapper for a direct I/Q modulator (rectangular grid).
//
// Each axis carries 4 bits and takes one of 16 amplitude levels, the odd
// multipliers -15, -13, ..., 13, 15 of a constant step. With STEP = 512 (a
// 10-bit sine/cosine scale) the largest level is 15 * 512 = 7680 counts,
// 0.9375 of the signed 14-bit range. As in the QPSK mapper there is no IF
// carrier: the multiplier scales a constant instead of a sine or cosine.
// The product is formed with one multiplication per axis, 4-bit level code
// in, 14-bit signed sample out.
//
// Mapping (this design's choice): sym[7:4] is the I code k, sym[3:0] the Q
// code; code k maps to multiplier 2k - 15 (natural binary, not Gray).
// Every level is a multiple of STEP, so with STEP = 512 the nine low bits of
// i_o and q_o are always zero; they are kept so that both mappers present
// the same 14-bit sample format to the power control.
// Timing: sym is sampled when sym_valid is high; i_o/q_o change one clock
// later and hold until the next symbol. Reset clears both to 0.
module qam256_mod
  import qam_tb_pkg::*;
#(
  parameter int STEP = QAM_STEP
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] sym,
  input  logic       sym_valid,
  output sample_t    i_o,
  output sample_t    q_o
);

  // Odd multiplier -15..15 of a 4-bit code.
  function automatic logic signed [4:0] level(logic [3:0] code);
    logic signed [5:0] twice;
    twice = $signed({1'b0, code, 1'b0}) - 6'sd15;
    return twice[4:0];
  endfunction

  localparam logic signed [SAMPLE_W-1:0] STEP_S = SAMPLE_W'(STEP);

  sample_t i_d, q_d;

  always_comb begin
    i_d = sample_t'(level(sym[7:4]) * STEP_S);
    q_d = sample_t'(level(sym[3:0]) * STEP_S);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i_o <= '0;
      q_o <= '0;
    end else if (sym_valid) begin
      i_o <= i_d;
      q_o <= q_d;
    end
  end

  initial assert (STEP > 0 && 15 * STEP < 8192) else $error("qam256_mod: STEP out of range");

endmodule
