// clocking_logic: sets the timing resolution of the waveform sequencer.
//
// One bitmap word is the smallest time unit of a waveform. This block divides
// the master clock by a programmable count TRES and gives the sequencer one
// single-cycle step enable (tick) every TRES master clocks while run is high.
// TRES = 0 is treated as 1, so the fastest rate is one word per master clock.
// When run is low the divider is held at zero, so the first tick comes exactly
// TRES cycles after run rises and every word lasts exactly TRES cycles.
//
// The design asks for a timing resolution that the software can change; doing
// it with a clock enable on one master clock, rather than a divided clock, is
// this design's own choice.
module clocking_logic #(
  parameter int unsigned TRES_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic [TRES_W-1:0] tres,
  output logic              tick
);

  logic [TRES_W-1:0] cnt;
  logic [TRES_W-1:0] last;

  always_comb begin
    last = (tres == '0) ? '0 : tres - 1'b1;
    tick = run && (cnt == last);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      cnt <= '0;
    else if (!run || tick)
      cnt <= '0;
    else
      cnt <= cnt + 1'b1;
  end

endmodule
