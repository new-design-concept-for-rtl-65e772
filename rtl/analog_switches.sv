// analog_switches: behavioural model of the analog clock switches.
//
// This is a behavioural model of an analog part: inputs and outputs are
// real-valued voltages. Each of the seven CCD clock lines (H1, H2, H3, reset,
// V1, V2, V3, in bitmap bit order) is switched between a high and a low level
// by its bit of the digital waveform. The levels come from the waveform DAC:
// the three horizontal phases share one high/low pair, the three vertical
// phases another, and the reset clock has its own pair (channel assignment in
// ccd_pkg: LV_H_HI ... LV_R_LO).
//
// Switching DAC levels by the digital waveform follows the design's board
// diagram. Sharing one level pair per clock group is this model's own choice.
module analog_switches
  import ccd_pkg::*;
(
  input  logic [6:0] wave,
  input  real        level [DAC_CH],
  output real        clk_v [7]
);

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      clk_v[BIT_PH1 + i] = wave[BIT_PH1 + i] ? level[LV_H_HI] : level[LV_H_LO];
      clk_v[BIT_PV1 + i] = wave[BIT_PV1 + i] ? level[LV_V_HI] : level[LV_V_LO];
    end
    clk_v[BIT_PR] = wave[BIT_PR] ? level[LV_R_HI] : level[LV_R_LO];
  end

endmodule
