// control_logic: command decoder and control-signal generator of the PLD
// controller.
//
// Every host write arrives as one cycle of wr_valid with its address and data.
// The address is decoded (see host_addr_e in ccd_pkg):
//   - command addresses set a latch that holds the command until the circuit
//     it triggers has executed it, then the latch clears itself. The start
//     latch stays set until the sequencer reports that it is active; the stop
//     latch until the sequencer reports that it is idle. Single-cycle commands
//     (RAM writing mode, shutter, filter wheel, exposure) execute on the next
//     clock.
//   - parameter addresses load the timing resolution and exposure time here,
//     and give the sequencer a load strobe for the pixel time, line time,
//     pixel count and line count, which it latches from the data bus.
//     Parameter writes are ignored while a readout is busy.
//   - bitmap words are passed on to the sequencer only in RAM writing mode.
// Two buffer controls are also generated: the host-data buffer into the
// bitmap memory is enabled in RAM writing mode, the waveform buffer while the
// sequencer is reading out, delayed one clock to line up with the memory's
// registered read.
// A timed exposure opens the shutter, counts EXPTIME units of EXP_PRESCALE
// master clocks and closes it again. The clocking logic runs while the
// sequencer is active.
//
// Timing: outputs are registered; a command takes effect on the clock after
// wr_valid. The exposure lasts EXPTIME*EXP_PRESCALE+1 cycles.
//
// Address decoding of commands, latches that clear after execution, and the
// command set (start readout, RAM writing mode, shutter, filter wheel,
// exposure time) follow the design. The address map, the exposure-time unit,
// the stop command and the one-cycle filter trigger are this design's own
// choice.
module control_logic
  import ccd_pkg::*;
#(
  parameter int unsigned TRES_W       = 16,
  parameter int unsigned EXP_W        = 16,
  parameter int unsigned EXP_PRESCALE = 10000
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_valid,
  input  host_wr_t          wr,
  input  logic              seq_active,
  input  logic              seq_carry,
  output seq_ctrl_t         seq_ctrl,
  output logic              clk_run,
  output logic [TRES_W-1:0] tres,
  output ctrl_out_t         ctrl_out
);

  localparam int unsigned PRE_W = (EXP_PRESCALE > 1) ? $clog2(EXP_PRESCALE) : 1;

  logic              start_latch, stop_latch, wr_mode;
  seq_ctrl_t         seq_pulse;
  logic              shutter, exposing, exp_done, filter_step;
  logic [EXP_W-1:0]  exptime, exp_left;
  logic [PRE_W-1:0]  pre;
  logic              busy;
  logic              wave_en;
  logic              hit;
  host_addr_e        a;

  always_comb begin
    a    = host_addr_e'(wr.addr);
    busy = start_latch | seq_active;
    hit  = wr_valid;
  end

  // Command and parameter decoding.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_latch <= 1'b0;
      stop_latch  <= 1'b0;
      wr_mode     <= 1'b0;
      seq_pulse   <= '0;
      tres        <= TRES_W'(1);
      exptime     <= '0;
      filter_step <= 1'b0;
    end else begin
      seq_pulse   <= '0;
      filter_step <= 1'b0;
      // clear latches once their command has been executed
      if (start_latch && seq_active) start_latch <= 1'b0;
      if (stop_latch && !seq_active) stop_latch  <= 1'b0;
      if (hit) begin
        unique case (a)
          A_START_READOUT: if (!busy) begin
            start_latch <= 1'b1;
            wr_mode     <= 1'b0;
          end
          A_STOP: begin
            stop_latch  <= 1'b1;
            start_latch <= 1'b0;
            wr_mode     <= 1'b0;
          end
          A_RAM_WRITE: if (!busy) begin
            wr_mode            <= 1'b1;
            seq_pulse.wr_rewind <= 1'b1;
          end
          A_BITMAP_DATA: if (wr_mode && !busy) seq_pulse.wr_word <= 1'b1;
          A_FILTER_STEP:   filter_step <= 1'b1;
          A_H_TIME: if (!busy) seq_pulse.ld_h_time <= 1'b1;
          A_V_TIME: if (!busy) seq_pulse.ld_v_time <= 1'b1;
          A_NPIX:   if (!busy) seq_pulse.ld_npix   <= 1'b1;
          A_NLINE:  if (!busy) seq_pulse.ld_nline  <= 1'b1;
          A_TRES:    if (!busy) tres    <= TRES_W'(wr.data);
          A_EXPTIME: if (!busy) exptime <= EXP_W'(wr.data);
          default: ;
        endcase
      end
    end
  end

  // The waveform buffer enable follows the sequencer one clock late, matching
  // the registered read of the bitmap memory.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wave_en <= 1'b0;
    else        wave_en <= seq_active;
  end

  // Shutter and timed exposure.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shutter  <= 1'b0;
      exposing <= 1'b0;
      exp_done <= 1'b0;
      exp_left <= '0;
      pre      <= '0;
    end else begin
      exp_done <= 1'b0;
      if (hit && a == A_START_EXPOSURE && !exposing) begin
        exposing <= 1'b1;
        shutter  <= 1'b1;
        exp_left <= exptime;
        pre      <= '0;
      end else if (hit && a == A_SHUTTER_OPEN) begin
        shutter <= 1'b1;
      end else if (hit && a == A_SHUTTER_CLOSE) begin
        shutter  <= 1'b0;
        exposing <= 1'b0;
      end else if (exposing) begin
        if (exp_left == '0) begin
          exposing <= 1'b0;
          shutter  <= 1'b0;
          exp_done <= 1'b1;
        end else if (pre == PRE_W'(EXP_PRESCALE - 1)) begin
          pre      <= '0;
          exp_left <= exp_left - 1'b1;
        end else begin
          pre <= pre + 1'b1;
        end
      end
    end
  end

  always_comb begin
    seq_ctrl                = seq_pulse;
    seq_ctrl.start          = start_latch;
    seq_ctrl.stop           = stop_latch;
    clk_run                 = seq_active;
    ctrl_out.shutter_open   = shutter;
    ctrl_out.filter_step    = filter_step;
    ctrl_out.exposing       = exposing;
    ctrl_out.exposure_done  = exp_done;
    ctrl_out.ram_write_mode = wr_mode;
    ctrl_out.readout_busy   = busy;
    ctrl_out.frame_done     = seq_carry;
    ctrl_out.data_buf_en    = wr_mode;
    ctrl_out.wave_buf_en    = wave_en;
  end

  // No bitmap word or rewind reaches the sequencer during a readout, and a
  // timed exposure always has the shutter open.
  a_no_write_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                    (seq_pulse.wr_word || seq_pulse.wr_rewind) |-> !seq_active);
  a_exposure_open: assert property (@(posedge clk) disable iff (!rst_n) exposing |-> shutter);

endmodule
