// Board control: modulation switch, power pushbuttons, LEDs and HEX display.
//
// The generator runs stand-alone, so all settings come from the board:
//  * a switch selects the modulation (0 = QPSK, 1 = 256-QAM); the choice is
//    shown on a seven-segment digit as the number of bits per symbol,
//    "2" for QPSK and "8" for 256-QAM;
//  * four pushbuttons step the power of the I and Q channels separately
//    through eight stages: "up" lowers the stage number (less attenuation),
//    "down" raises it; both saturate at 0 and 7. Reset gives stage 0, full
//    output;
//  * each channel shows its setting on eight LEDs of its own colour, as a bar
//    of 8 - stage lit LEDs (all eight at full output).
// Switch and buttons are synchronised with two flip-flops. Each button is
// debounced: its accepted level changes only after the synchronised input
// has differed from it for DEBOUNCE consecutive clocks, and a press acts
// once, on the accepted rising edge.
//
// The controls, the eight stages, the LEDs and the HEX display are as the
// document describes; the button assignment, active-high inputs, debouncing,
// the LED bar and the HEX symbols are this design's choices.
// Timing: a switch change shows on mod_o 3 clocks later; a button press
// changes the stage DEBOUNCE + 3 clocks after it reaches the input.
module control_unit
  import qam_tb_pkg::*;
#(
  parameter int unsigned DEBOUNCE = 500_000   // clocks a button must be stable
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sw_mod,    // modulation switch
  input  logic [3:0] btn,       // {Q down, Q up, I down, I up}, 1 = pressed
  output mod_t       mod_o,
  output stage_t     stage_i_o,
  output stage_t     stage_q_o,
  output logic [7:0] led_i,     // I channel LEDs
  output logic [7:0] led_q,     // Q channel LEDs
  output logic [6:0] hex_o      // segments {g,f,e,d,c,b,a}, active low
);

  localparam int unsigned CNT_W = (DEBOUNCE > 1) ? $clog2(DEBOUNCE + 1) : 1;

  logic [1:0]       sw_sync;
  logic [3:0]       btn_s1, btn_s2;
  logic [3:0]       btn_level;              // debounced level
  logic [CNT_W-1:0] btn_cnt [4];
  logic [3:0]       press;                  // one-clock press pulses
  stage_t           stage_i_q, stage_q_q;
  mod_t             mod_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sw_sync <= '0;
      btn_s1  <= '0;
      btn_s2  <= '0;
      mod_q   <= MOD_QPSK;
    end else begin
      sw_sync <= {sw_sync[0], sw_mod};
      btn_s1  <= btn;
      btn_s2  <= btn_s1;
      mod_q   <= mod_t'(sw_sync[1]);
    end
  end

  for (genvar b = 0; b < 4; b++) begin : g_debounce
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        btn_level[b] <= 1'b0;
        btn_cnt[b]   <= '0;
        press[b]     <= 1'b0;
      end else begin
        press[b] <= 1'b0;
        if (btn_s2[b] == btn_level[b]) begin
          btn_cnt[b] <= '0;
        end else if (btn_cnt[b] == CNT_W'(DEBOUNCE - 1)) begin
          btn_cnt[b]   <= '0;
          btn_level[b] <= btn_s2[b];
          press[b]     <= btn_s2[b];
        end else begin
          btn_cnt[b] <= btn_cnt[b] + 1'b1;
        end
      end
    end
  end

  function automatic stage_t step(stage_t s, logic up, logic down);
    if (up && !down && s != '0)          return s - 1'b1;
    if (down && !up && s != stage_t'('1)) return s + 1'b1;
    return s;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stage_i_q <= '0;
      stage_q_q <= '0;
    end else begin
      stage_i_q <= step(stage_i_q, press[0], press[1]);
      stage_q_q <= step(stage_q_q, press[2], press[3]);
    end
  end

  // Bar of 8 - stage LEDs, lit from bit 0 upwards.
  function automatic logic [7:0] bar(stage_t s);
    return 8'hff >> s;
  endfunction

  assign mod_o     = mod_q;
  assign stage_i_o = stage_i_q;
  assign stage_q_o = stage_q_q;
  assign led_i     = bar(stage_i_q);
  assign led_q     = bar(stage_q_q);
  // "2" lights a,b,d,e,g; "8" lights all segments. Active low.
  assign hex_o     = (mod_q == MOD_QPSK) ? 7'b010_0100 : 7'b000_0000;

  initial assert (DEBOUNCE >= 1) else $error("control_unit: DEBOUNCE must be at least 1");

endmodule
