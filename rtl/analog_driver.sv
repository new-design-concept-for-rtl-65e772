// analog_driver: behavioural model of the analog driver board.
//
// The board sits on the host bus beside the controller. Its address decoder
// selects one of two octal DACs: DAC 0 gives eight bias levels, DAC 1 gives
// the high and low levels of the clock waveforms. Analog switches, driven by
// the digital waveform from the controller board, connect each CCD clock line
// to its high or low level. The op-amp output stage is not modelled, so the
// outputs are the DAC-level voltages (0 to VREF).
//
// Interface: host_addr, host_data (low 8 bits used) and host_strobe from the
// computer; wave, the bitmap word from the controller board; bias_v and
// clock_v, the modelled analog outputs; bias_code and level_code, the DAC
// latch contents.
//
// The DACs take 8-bit data, so the upper data byte is unused; the board uses
// only the seven clock bits (0-6) of the waveform word, the rest go to the
// video chain and ADC. Both give unused-bit lint warnings, which stand.
//
// This module is a behavioural model (it holds the real-valued DAC and switch
// models); only the address decoder in it is synthesizable. Two octal DACs,
// one for bias and one for waveform levels, a decoder, and analog switches
// controlled by the digital waveform follow the design's board diagram.
module analog_driver
  import ccd_pkg::*;
#(
  parameter real VREF = 10.0
) (
  input  logic                rst_n,
  input  logic [HOST_AW-1:0]  host_addr,
  input  logic [HOST_DW-1:0]  host_data,
  input  logic                host_strobe,
  input  logic [WORD_W-1:0]   wave,
  output real                 bias_v     [DAC_CH],
  output real                 clock_v    [7],
  output logic [DAC_BITS-1:0] bias_code  [DAC_CH],
  output logic [DAC_BITS-1:0] level_code [DAC_CH]
);

  logic [N_DAC-1:0] dac_wr;
  logic [2:0]       ch;
  real              level [DAC_CH];

  dac_decoder u_decoder (
    .addr(host_addr), .strobe(host_strobe), .dac_wr, .ch
  );

  octal_dac #(.VREF(VREF)) u_bias_dac (
    .rst_n, .wr(dac_wr[0]), .ch, .data(host_data[DAC_BITS-1:0]),
    .code(bias_code), .vout(bias_v)
  );

  octal_dac #(.VREF(VREF)) u_level_dac (
    .rst_n, .wr(dac_wr[1]), .ch, .data(host_data[DAC_BITS-1:0]),
    .code(level_code), .vout(level)
  );

  analog_switches u_switches (
    .wave(wave[6:0]), .level, .clk_v(clock_v)
  );

endmodule
