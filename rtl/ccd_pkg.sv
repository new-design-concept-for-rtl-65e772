// ccd_pkg: types and constants shared by the CCD controller.
//
// The bitmap word layout follows the example bitmap for a three-phase CCD:
// sixteen bits in two bytes, the first bit being bit 0. Bits 0-2 are the
// horizontal clock phases, bit 3 the reset clock, bits 4-6 the vertical clock
// phases, bit 8 sample reset, bit 9 dark sample, bit 10 signal sample, bit 11
// the ADC trigger; bits 7 and 12-15 are spare.
//
// The host bus (8-bit address, 16-bit data, one strobe) and its address map
// are this design's own choice: the controller is driven by writes to decoded
// addresses, each command or parameter having its own address.
package ccd_pkg;

  localparam int unsigned HOST_AW = 8;   // host address bus width
  localparam int unsigned HOST_DW = 16;  // host data bus width (one bitmap word)
  localparam int unsigned WORD_W  = 16;  // bitmap word width: two bytes
  localparam int unsigned DAC_BITS = 8;  // DAC resolution
  localparam int unsigned DAC_CH   = 8;  // channels per octal DAC
  localparam int unsigned N_DAC    = 2;  // bias DAC and waveform-level DAC

  // Bit positions in a bitmap word (1st bit of the bitmap = bit 0).
  localparam int unsigned BIT_PH1 = 0;   // horizontal clock phase 1
  localparam int unsigned BIT_PH2 = 1;   // horizontal clock phase 2
  localparam int unsigned BIT_PH3 = 2;   // horizontal clock phase 3
  localparam int unsigned BIT_PR  = 3;   // reset clock
  localparam int unsigned BIT_PV1 = 4;   // vertical clock phase 1
  localparam int unsigned BIT_PV2 = 5;   // vertical clock phase 2
  localparam int unsigned BIT_PV3 = 6;   // vertical clock phase 3
  localparam int unsigned BIT_SR  = 8;   // sample reset
  localparam int unsigned BIT_DS  = 9;   // dark sample
  localparam int unsigned BIT_SS  = 10;  // signal sample
  localparam int unsigned BIT_AD  = 11;  // ADC trigger

  // The same layout as a packed struct (most significant field first).
  typedef struct packed {
    logic [3:0] spare_hi;  // bits 15..12
    logic       ad;        // bit 11
    logic       ss;        // bit 10
    logic       ds;        // bit 9
    logic       sr;        // bit 8
    logic       spare7;    // bit 7
    logic [2:0] phi_v;     // bits 6..4: phi_v[0] = V1
    logic       phi_r;     // bit 3
    logic [2:0] phi_h;     // bits 2..0: phi_h[0] = H1
  } bitmap_word_t;

  // Host address map.
  typedef enum logic [HOST_AW-1:0] {
    A_START_READOUT  = 8'h00,  // command: start reading out one frame
    A_RAM_WRITE      = 8'h01,  // command: select RAM writing mode, rewind to word 0
    A_BITMAP_DATA    = 8'h02,  // next bitmap word (RAM writing mode only)
    A_STOP           = 8'h03,  // command: abort readout, leave RAM writing mode
    A_SHUTTER_OPEN   = 8'h04,  // command: open shutter
    A_SHUTTER_CLOSE  = 8'h05,  // command: close shutter
    A_FILTER_STEP    = 8'h06,  // command: rotate filter wheel one position
    A_START_EXPOSURE = 8'h07,  // command: timed exposure (shutter open for EXPTIME)
    A_H_TIME         = 8'h10,  // parameter: words in one horizontal (pixel) pattern
    A_V_TIME         = 8'h11,  // parameter: words in one vertical (line) pattern
    A_NPIX           = 8'h12,  // parameter: pixels per line
    A_NLINE          = 8'h13,  // parameter: lines per frame
    A_TRES           = 8'h14,  // parameter: master clocks per bitmap word
    A_EXPTIME        = 8'h15   // parameter: exposure time in exposure units
  } host_addr_e;

  // DAC window: 0x20-0x2F. addr[3] selects the DAC, addr[2:0] the channel.
  localparam logic [3:0] DAC_PAGE = 4'h2;

  // Channels of the waveform-level DAC (DAC 1).
  localparam int unsigned LV_H_HI = 0;
  localparam int unsigned LV_H_LO = 1;
  localparam int unsigned LV_V_HI = 2;
  localparam int unsigned LV_V_LO = 3;
  localparam int unsigned LV_R_HI = 4;
  localparam int unsigned LV_R_LO = 5;

  // One host write, after synchronisation.
  typedef struct packed {
    logic [HOST_AW-1:0] addr;
    logic [HOST_DW-1:0] data;
  } host_wr_t;

  // Control from the control logic to the sequencer.
  typedef struct packed {
    logic wr_rewind;  // RAM writing mode selected: write address back to 0
    logic wr_word;    // write the current data word, then advance
    logic start;      // start latch: begin a frame when idle
    logic stop;       // stop latch: abort to idle
    logic ld_h_time;
    logic ld_v_time;
    logic ld_npix;
    logic ld_nline;
  } seq_ctrl_t;

  // Readout phase reported by the sequencer.
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,
    PH_VERT = 2'd1,
    PH_HORZ = 2'd2
  } seq_phase_e;

  // Control signals brought out of the controller.
  typedef struct packed {
    logic shutter_open;    // shutter drive, high = open
    logic filter_step;     // one-cycle trigger to the filter wheel
    logic exposing;        // timed exposure running
    logic exposure_done;   // one-cycle pulse at the end of a timed exposure
    logic ram_write_mode;  // bitmap RAM is accepting words from the host
    logic readout_busy;    // a frame is being read out (or its start is pending)
    logic frame_done;      // one-cycle pulse at the end of a frame
    logic data_buf_en;     // enable of the host-data buffer into the bitmap memory
    logic wave_buf_en;     // enable of the waveform buffer out of the memory
  } ctrl_out_t;

endpackage
