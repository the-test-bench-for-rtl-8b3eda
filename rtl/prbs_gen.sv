// PRBS-7 generator: a 7-stage linear feedback shift register.
//
// Stages 1..7 shift towards stage 7, whose content is the output bit. The
// feedback into stage 1 is the XNOR of stages 6 and 7, which implements the
// generator polynomial x^7 + x^6 + 1 and gives the maximum length of
// 2^7 - 1 = 127 bits. With XNOR feedback the all-zeros state is part of the
// sequence and the all-ones state is the lock-up state, so the register may
// be reset to zero. The stage numbering and taps follow the published
// circuit; the reset value (SEED) and the enable input are this design's own.
//
// Interface: `en` advances the register by one bit per clock; `bit_o` is the
// current output (stage 7), valid the whole cycle; `state_o` exposes the
// stages, bit i-1 = stage i. Reset is synchronous, active low.
module prbs_gen #(
  parameter logic [6:0] SEED = 7'h00   // reset state, bit i-1 = stage i
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  output logic       bit_o,
  output logic [6:0] state_o
);

  logic [6:0] stage_q;   // stage_q[i-1] holds stage i

  always_ff @(posedge clk) begin
    if (!rst_n)
      stage_q <= SEED;
    else if (en)
      stage_q <= {stage_q[5:0], ~(stage_q[5] ^ stage_q[6])};
  end

  assign bit_o   = stage_q[6];
  assign state_o = stage_q;

  // The all-ones state never leaves itself under XNOR feedback.
  initial assert (SEED != 7'h7f) else $error("prbs_gen: SEED is the lock-up state");
  always_ff @(posedge clk)
    if (rst_n) assert (stage_q != 7'h7f) else $error("prbs_gen: LFSR locked up");

endmodule
