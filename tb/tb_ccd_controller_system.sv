// tb_ccd_controller_system: end-to-end test of the whole controller at its
// default parameters.
//
// The testbench plays the control computer. It
//   1. sets eight bias levels and the six clock high/low levels in the DACs,
//   2. selects RAM writing mode and writes a bitmap for a three-phase CCD:
//      a 6-word vertical transfer followed by an 8-word pixel pattern with
//      reset clock, sample reset, dark sample, signal sample and ADC trigger,
//   3. loads pixel time, line time, pixel count, line count, timing
//      resolution and exposure time,
//   4. steps the filter wheel, opens and closes the shutter, runs a timed
//      exposure and checks its length,
//   5. reads out a 16-pixel by 4-line frame at 3 clocks per word and checks
//      the digital waveform clock by clock against the bitmap, the analog
//      clock levels against the waveform, the number of ADC triggers and the
//      frame length,
//   6. changes the timing resolution and frame size and reads out again,
//   7. aborts a frame with the stop command, and checks that a bitmap word
//      sent outside RAM writing mode is ignored.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_ccd_controller_system;
  import ccd_pkg::*;

  localparam int unsigned CNT_W = 16;
  localparam real VREF = 10.0;   // default of the top
  localparam int EXP_PRESCALE = 10000;  // default of the top

  logic clk = 1'b0, rst_n = 1'b1;
  logic [HOST_AW-1:0] host_addr = '0;
  logic [HOST_DW-1:0] host_data = '0;
  logic host_strobe = 1'b0;
  bitmap_word_t waveform;
  ctrl_out_t ctrl;
  seq_phase_e phase;
  logic [CNT_W-1:0] pixel, line;
  real bias_v [DAC_CH];
  real clock_v [7];
  logic [7:0] bias_code [DAC_CH];
  logic [7:0] level_code [DAC_CH];
  int checks = 0, failures = 0;

  ccd_controller_system dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // ---- mechanism counters ----
  int n_bias_dac = 0, n_level_dac = 0, n_ram_mode = 0, n_words = 0, n_params = 0;
  int n_filter = 0, n_shutter_open = 0, n_shutter_close = 0, n_exposure = 0;
  int n_start = 0, n_vert = 0, n_horz = 0, n_frame_done = 0, n_stop = 0;
  int n_tres_change = 0, n_adc = 0, n_clk_hi = 0, n_clk_lo = 0, n_rejected = 0;

  always @(posedge clk) begin
    if (ctrl.filter_step) n_filter++;
    if (ctrl.exposure_done) n_exposure++;
    if (ctrl.frame_done) n_frame_done++;
    if (phase == PH_VERT) n_vert++;
    if (phase == PH_HORZ) n_horz++;
  end

  task automatic host_write(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk);
    host_addr = a;
    host_data = d;
    repeat (2) @(negedge clk);
    host_strobe = 1'b1;
    repeat (6) @(negedge clk);
    host_strobe = 1'b0;
    repeat (5) @(negedge clk);
  endtask

  function automatic bitmap_word_t bw(input logic [2:0] h, input logic r, input logic [2:0] v,
                                      input logic sr, input logic ds, input logic ss, input logic ad);
    bitmap_word_t w;
    w = '0;
    w.phi_h = h; w.phi_r = r; w.phi_v = v;
    w.sr = sr; w.ds = ds; w.ss = ss; w.ad = ad;
    return w;
  endfunction

  function automatic real volts(input logic [7:0] c);
    return VREF * c / 255.0;
  endfunction

  function automatic bit near(input real a, input real b);
    return (a > b - 1e-6) && (a < b + 1e-6);
  endfunction

  bitmap_word_t bitmap [$];
  int v_time, h_time;
  logic [7:0] lv [6];

  // Read out one frame and check it clock by clock.
  task automatic readout(input int np, input int nl, input int tres);
    bitmap_word_t exp_w [$];
    int cyc, total, adc_edges;
    logic last_ad;
    for (int l = 0; l < nl; l++) begin
      for (int w = 0; w < v_time; w++) exp_w.push_back(bitmap[w]);
      for (int p = 0; p < np; p++)
        for (int w = 0; w < h_time; w++) exp_w.push_back(bitmap[v_time + w]);
    end
    total = exp_w.size() * tres;
    @(negedge clk);
    host_addr = A_START_READOUT;
    repeat (2) @(negedge clk);
    host_strobe = 1'b1;
    cyc = 0;
    while (phase == PH_IDLE && cyc < 50) begin
      @(negedge clk);
      cyc++;
    end
    host_strobe = 1'b0;
    n_start++;
    check(phase == PH_VERT && ctrl.readout_busy, "readout did not start with a vertical transfer");
    @(negedge clk);  // the memory returns the first word one clock later
    cyc = 0;
    adc_edges = 0;
    last_ad = 1'b0;
    while (cyc < total) begin
      bitmap_word_t e;
      e = exp_w[cyc / tres];
      check(ctrl.wave_buf_en, "waveform buffer disabled during readout");
      check(waveform == e, $sformatf("cycle %0d: waveform %h expected %h", cyc, waveform, e));
      for (int b = 0; b < 3; b++) begin
        check(near(clock_v[BIT_PH1 + b], volts(e.phi_h[b] ? lv[LV_H_HI] : lv[LV_H_LO])), "H clock level");
        check(near(clock_v[BIT_PV1 + b], volts(e.phi_v[b] ? lv[LV_V_HI] : lv[LV_V_LO])), "V clock level");
      end
      check(near(clock_v[BIT_PR], volts(e.phi_r ? lv[LV_R_HI] : lv[LV_R_LO])), "R clock level");
      if (e.phi_h[0]) n_clk_hi++; else n_clk_lo++;
      if (waveform.ad && !last_ad) adc_edges++;
      last_ad = waveform.ad;
      @(negedge clk);
      cyc++;
    end
    check(phase == PH_IDLE && !ctrl.readout_busy,
          $sformatf("frame of %0d words at %0d clocks per word not finished after %0d clocks", exp_w.size(), tres, total));
    check(adc_edges == np * nl, $sformatf("%0d ADC triggers, expected %0d", adc_edges, np * nl));
    n_adc += adc_edges;
  endtask

  initial begin
    int cyc, frames_before;
    #1 rst_n = 1'b0;  // power-on reset edge
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // 1. DAC levels
    for (int i = 0; i < 8; i++) begin
      logic [7:0] c;
      c = 8'(20 * i + 7);
      host_write(8'h20 + 8'(i), {8'h00, c});
      n_bias_dac++;
      check(bias_code[i] == c && near(bias_v[i], volts(c)), $sformatf("bias level %0d", i));
    end
    lv[LV_H_HI] = 8'd200; lv[LV_H_LO] = 8'd20;
    lv[LV_V_HI] = 8'd180; lv[LV_V_LO] = 8'd10;
    lv[LV_R_HI] = 8'd230; lv[LV_R_LO] = 8'd40;
    for (int i = 0; i < 6; i++) begin
      host_write(8'h28 + 8'(i), {8'h00, lv[i]});
      n_level_dac++;
      check(level_code[i] == lv[i], $sformatf("clock level %0d", i));
    end

    // 2. bitmap: vertical transfer then one pixel
    v_time = 6;
    h_time = 8;
    bitmap = {};
    bitmap.push_back(bw(3'b000, 1'b0, 3'b001, 0, 0, 0, 0));
    bitmap.push_back(bw(3'b000, 1'b0, 3'b011, 0, 0, 0, 0));
    bitmap.push_back(bw(3'b000, 1'b0, 3'b010, 0, 0, 0, 0));
    bitmap.push_back(bw(3'b000, 1'b0, 3'b110, 0, 0, 0, 0));
    bitmap.push_back(bw(3'b000, 1'b0, 3'b100, 0, 0, 0, 0));
    bitmap.push_back(bw(3'b000, 1'b0, 3'b101, 0, 0, 0, 0));
    bitmap.push_back(bw(3'b001, 1'b1, 3'b001, 0, 0, 0, 0));
    bitmap.push_back(bw(3'b001, 1'b0, 3'b001, 1, 0, 0, 0));
    bitmap.push_back(bw(3'b001, 1'b0, 3'b001, 0, 1, 0, 0));
    bitmap.push_back(bw(3'b011, 1'b0, 3'b001, 0, 0, 0, 0));
    bitmap.push_back(bw(3'b010, 1'b0, 3'b001, 0, 0, 0, 0));
    bitmap.push_back(bw(3'b110, 1'b0, 3'b001, 0, 0, 0, 0));
    bitmap.push_back(bw(3'b100, 1'b0, 3'b001, 0, 0, 1, 0));
    bitmap.push_back(bw(3'b101, 1'b0, 3'b001, 0, 0, 0, 1));
    host_write(A_RAM_WRITE, 0);
    n_ram_mode++;
    check(ctrl.ram_write_mode, "RAM writing mode");
    foreach (bitmap[k]) begin
      host_write(A_BITMAP_DATA, bitmap[k]);
      n_words++;
    end

    // 3. initial conditions
    host_write(A_V_TIME, 16'(v_time));
    host_write(A_H_TIME, 16'(h_time));
    host_write(A_NPIX, 16'd16);
    host_write(A_NLINE, 16'd4);
    host_write(A_TRES, 16'd3);
    host_write(A_EXPTIME, 16'd2);
    n_params += 6;

    // 4. accessories and exposure
    host_write(A_FILTER_STEP, 0);
    host_write(A_SHUTTER_OPEN, 0);
    check(ctrl.shutter_open, "shutter open");
    n_shutter_open++;
    host_write(A_SHUTTER_CLOSE, 0);
    check(!ctrl.shutter_open, "shutter closed");
    n_shutter_close++;
    @(negedge clk);
    host_addr = A_START_EXPOSURE;
    repeat (2) @(negedge clk);
    host_strobe = 1'b1;
    while (!ctrl.exposing) @(negedge clk);
    host_strobe = 1'b0;
    cyc = 0;
    while (ctrl.exposing && cyc < 3 * EXP_PRESCALE) begin
      check(ctrl.shutter_open, "shutter closed during exposure");
      @(negedge clk);
      cyc++;
    end
    check(cyc == 2 * EXP_PRESCALE + 1, $sformatf("exposure took %0d clocks, expected %0d", cyc, 2 * EXP_PRESCALE + 1));
    check(!ctrl.shutter_open, "shutter not closed after exposure");
    repeat (2) @(negedge clk);

    // 5. first frame
    frames_before = n_frame_done;
    readout(16, 4, 3);
    check(n_frame_done == frames_before + 1, "frame_done after first frame");

    // 6. new timing resolution and frame size
    host_write(A_TRES, 16'd1);
    host_write(A_NPIX, 16'd5);
    host_write(A_NLINE, 16'd2);
    n_params += 3;
    n_tres_change++;
    readout(5, 2, 1);
    check(n_frame_done == frames_before + 2, "frame_done after second frame");

    // 7. abort, and a bitmap word outside RAM writing mode
    host_write(A_NPIX, 16'd1000);
    host_write(A_START_READOUT, 0);
    check(ctrl.readout_busy && phase != PH_IDLE, "long frame did not start");
    host_write(A_STOP, 0);
    check(!ctrl.readout_busy && phase == PH_IDLE, "stop did not abort the frame");
    n_stop++;
    host_write(A_BITMAP_DATA, 16'hFFFF);
    n_rejected++;
    host_write(A_NPIX, 16'd1);
    host_write(A_NLINE, 16'd1);
    readout(1, 1, 1);  // bitmap unchanged by the rejected word

    // mechanism coverage
    check(n_bias_dac > 0, "no bias DAC write");
    check(n_level_dac > 0, "no clock level DAC write");
    check(n_ram_mode > 0 && n_words > 0, "no bitmap written");
    check(n_params > 0, "no parameter load");
    check(n_filter > 0, "no filter wheel step");
    check(n_shutter_open > 0 && n_shutter_close > 0, "no shutter command");
    check(n_exposure == 1, $sformatf("%0d timed exposures, expected 1", n_exposure));
    check(n_start > 0, "no readout");
    check(n_vert > 0 && n_horz > 0, "no vertical or horizontal transfer");
    check(n_frame_done == 3, $sformatf("%0d completed frames, expected 3", n_frame_done));
    check(n_stop > 0, "no abort");
    check(n_tres_change > 0, "no timing resolution change");
    check(n_adc > 0, "no ADC trigger");
    check(n_clk_hi > 0 && n_clk_lo > 0, "clock never switched between levels");
    check(n_rejected > 0, "no rejected bitmap word");
    $display("mechanisms: bias_dac=%0d level_dac=%0d ram_mode=%0d words=%0d params=%0d filter=%0d shutter=%0d/%0d",
             n_bias_dac, n_level_dac, n_ram_mode, n_words, n_params, n_filter, n_shutter_open, n_shutter_close);
    $display("mechanisms: exposure=%0d readouts=%0d vert_clocks=%0d horz_clocks=%0d frames=%0d stop=%0d tres_change=%0d adc=%0d rejected=%0d",
             n_exposure, n_start, n_vert, n_horz, n_frame_done, n_stop, n_tres_change, n_adc, n_rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
