// octal_dac: behavioural model of an eight-channel, 8-bit latched DAC.
//
// This is a behavioural model of an analog part, not synthesizable logic: the
// outputs are real-valued voltages. Each channel has an 8-bit input latch.
// A write cycle presents the channel number and data while wr is high; the
// data are latched into the addressed channel when wr falls, and held until
// that channel is written again. Each output is code/255 * VREF volts (a
// unipolar, full-scale-at-255 transfer; the op-amp stage after it sets the
// real CCD levels). rst_n clears every latch to 0 (power-on state).
//
// Eight channels in one package, 8-bit resolution and levels held in the
// DAC's latch until the same address is updated follow the design. The
// reference voltage, the falling-edge latching and the reset are this model's
// own choice.
module octal_dac
  import ccd_pkg::*;
#(
  parameter real VREF = 10.0
) (
  input  logic                rst_n,
  input  logic                wr,
  input  logic [2:0]          ch,
  input  logic [DAC_BITS-1:0] data,
  output logic [DAC_BITS-1:0] code [DAC_CH],
  output real                 vout [DAC_CH]
);

  always_ff @(negedge wr or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DAC_CH; i++) code[i] <= '0;
    end else begin
      code[ch] <= data;
    end
  end

  always_comb begin
    for (int i = 0; i < DAC_CH; i++)
      vout[i] = VREF * real'(code[i]) / 255.0;
  end

endmodule
