// Power control for one channel (I or Q): attenuation and D/A format.
//
// The generated levels already span the D/A range, so the output can only be
// reduced. Scaling every level by the same fraction d (0.5 <= d <= 1) is done
// without a divider: the signed 14-bit sample is multiplied by the unsigned
// 14-bit factor x = d * 2^14 and the high 14 bits of the 28-bit product are
// kept (an arithmetic shift right by 14). The factor comes from an eight-entry
// table indexed by the power stage; stage 0 is no attenuation (x = 16383) and
// each further stage lowers the peak output by about 15 mV of the 468.75 mV
// maximum (see qam_tb_pkg::stage_factor). Last, 2^13 is added, which turns
// the signed range -8192..8191 into the offset-binary range 0..16383 that
// the D/A converter takes.
//
// The multiply-and-keep-high-bits scheme, the eight stages and the offset are
// the document's; the exact factor values are computed here from its 15 mV
// step. Timing: two register stages, dac_o follows sample_i with a latency
// of 2 clocks; the stage input is registered together with the sample.
module power_control
  import qam_tb_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  sample_t   sample_i,
  input  stage_t    stage_i,
  output dac_word_t dac_o
);

  sample_t                            sample_q;
  factor_t                            factor_q;
  logic signed [SAMPLE_W+FACTOR_W-1:0] product;
  sample_t                            scaled;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sample_q <= '0;
      factor_q <= stage_factor('0);
    end else begin
      sample_q <= sample_i;
      factor_q <= stage_factor(stage_i);
    end
  end

  // Signed sample times unsigned factor; the factor gets a zero sign bit.
  always_comb begin
    product = sample_q * $signed({1'b0, factor_q});
    scaled  = product[SAMPLE_W+FACTOR_W-1:FACTOR_W];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) dac_o <= dac_word_t'(1 << (SAMPLE_W - 1));
    else        dac_o <= dac_word_t'(scaled) + dac_word_t'(1 << (SAMPLE_W - 1));
  end

endmodule
