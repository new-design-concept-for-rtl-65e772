// ccd_controller_system: a universal CCD controller without a microprocessor.
//
// The drive waveforms of any CCD are stored as a bitmap: a table of 16-bit
// words, one per time step, each bit the level of one clock phase or of a
// video-processing or ADC trigger. A single programmable-logic controller
// writes the bitmap from the host into a RAM and, for readout, cycles through
// it: the vertical pattern once per line, then the horizontal pattern once
// per pixel. The RAM's data output is the digital waveform. An analog driver
// board on the same host bus turns the waveform into CCD clock voltages with
// two octal DACs and analog switches, and gives the bias levels.
//
// Interface: clk is the master clock, rst_n an asynchronous active-low reset.
// The host drives host_addr, host_data and host_strobe (one write per strobe;
// address map in ccd_pkg). Outputs: the digital waveform (bitmap word), the
// control signals, the readout position, and the modelled analog outputs.
//
// The controller board (PLD controller and memory) is synthesizable; the
// analog driver is a behavioural model. The partition into controller board,
// memory and analog driver on a shared control bus follows the design.
module ccd_controller_system
  import ccd_pkg::*;
#(
  parameter int unsigned MEM_AW       = 13,
  parameter int unsigned CNT_W        = 16,
  parameter int unsigned TRES_W       = 16,
  parameter int unsigned EXP_W        = 16,
  parameter int unsigned EXP_PRESCALE = 10000,
  parameter real         VREF         = 10.0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [HOST_AW-1:0]  host_addr,
  input  logic [HOST_DW-1:0]  host_data,
  input  logic                host_strobe,
  output bitmap_word_t        waveform,
  output ctrl_out_t           ctrl,
  output seq_phase_e          phase,
  output logic [CNT_W-1:0]    pixel,
  output logic [CNT_W-1:0]    line,
  output real                 bias_v     [DAC_CH],
  output real                 clock_v    [7],
  output logic [DAC_BITS-1:0] bias_code  [DAC_CH],
  output logic [DAC_BITS-1:0] level_code [DAC_CH]
);

  logic [MEM_AW-1:0] mem_addr;
  logic              mem_we;
  logic [WORD_W-1:0] mem_wdata, mem_rdata;

  pld_controller #(
    .MEM_AW(MEM_AW), .CNT_W(CNT_W), .TRES_W(TRES_W),
    .EXP_W(EXP_W), .EXP_PRESCALE(EXP_PRESCALE)
  ) u_pld (
    .clk, .rst_n, .host_addr, .host_data, .host_strobe,
    .mem_addr, .mem_we, .mem_wdata,
    .ctrl, .phase, .pixel, .line
  );

  bitmap_memory #(.AW(MEM_AW), .DW(WORD_W)) u_memory (
    .clk, .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  assign waveform = bitmap_word_t'(mem_rdata);

  analog_driver #(.VREF(VREF)) u_analog (
    .rst_n, .host_addr, .host_data, .host_strobe,
    .wave(mem_rdata),
    .bias_v, .clock_v, .bias_code, .level_code
  );

endmodule
