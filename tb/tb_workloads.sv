// tb_workloads: the controller at its limits, at default parameters.
//
//   1. Full bitmap RAM: writes all 2**13 = 8192 words over the host bus
//      (word k = (k * 40503 + 12345) mod 2**16), plays them back as one
//      4096-word vertical and one 4096-word horizontal pattern, and checks
//      every waveform word in order.
//   2. A 4096-pixel by 3-line frame (the line length of a large-format CCD)
//      with a 2-word vertical and 2-word pixel pattern.
//   3. The longest line the 16-bit pixel counter allows: 65535 pixels.
// For 2 and 3 it counts ADC triggers (one per pixel) and checks the frame
// length NLINE*(V_TIME+NPIX*H_TIME)*TRES.
module tb_workloads;
  import ccd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [HOST_AW-1:0] host_addr = '0;
  logic [HOST_DW-1:0] host_data = '0;
  logic host_strobe = 1'b0;
  bitmap_word_t waveform;
  ctrl_out_t ctrl;
  seq_phase_e phase;
  logic [15:0] pixel, line;
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

  task automatic host_write(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk);
    host_addr = a;
    host_data = d;
    repeat (1) @(negedge clk);
    host_strobe = 1'b1;
    repeat (4) @(negedge clk);
    host_strobe = 1'b0;
    repeat (4) @(negedge clk);
  endtask

  function automatic logic [15:0] pattern(input int k);
    return 16'((k * 40503 + 12345) % 65536);
  endfunction

  // Start a frame; return when the first address is on the bus.
  task automatic start();
    @(negedge clk);
    host_addr = A_START_READOUT;
    @(negedge clk);
    host_strobe = 1'b1;
    while (phase == PH_IDLE) @(negedge clk);
    host_strobe = 1'b0;
  endtask

  task automatic frame(input int v, input int h, input int np, input int nl);
    int cyc, total, adc;
    logic last_ad;
    host_write(A_V_TIME, 16'(v));
    host_write(A_H_TIME, 16'(h));
    host_write(A_NPIX, 16'(np));
    host_write(A_NLINE, 16'(nl));
    total = nl * (v + np * h);
    start();
    cyc = 0; adc = 0; last_ad = 1'b0;
    while (phase != PH_IDLE && cyc <= total) begin
      @(negedge clk);
      cyc++;
      if (waveform.ad && !last_ad) adc++;
      last_ad = waveform.ad;
    end
    check(cyc == total, $sformatf("%0d x %0d frame took %0d clocks, expected %0d", np, nl, cyc, total));
    check(adc == np * nl, $sformatf("%0d ADC triggers, expected %0d", adc, np * nl));
  endtask

  initial begin
    int k, errs;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    host_write(A_TRES, 16'd1);

    // 1. full RAM
    host_write(A_RAM_WRITE, 0);
    for (int i = 0; i < 8192; i++) host_write(A_BITMAP_DATA, pattern(i));
    host_write(A_V_TIME, 16'd4096);
    host_write(A_H_TIME, 16'd4096);
    host_write(A_NPIX, 16'd1);
    host_write(A_NLINE, 16'd1);
    start();
    @(negedge clk);
    errs = 0;
    for (k = 0; k < 8192; k++) begin
      if (waveform != pattern(k)) errs++;
      @(negedge clk);
    end
    check(errs == 0, $sformatf("full-RAM playback: %0d of 8192 words wrong", errs));
    check(phase == PH_IDLE && ctrl.frame_done == 1'b0, "full-RAM frame did not end after 8192 words");

    // 2 and 3: small bitmap, large frames
    host_write(A_RAM_WRITE, 0);
    host_write(A_BITMAP_DATA, 16'h0010);  // V1
    host_write(A_BITMAP_DATA, 16'h0020);  // V2
    host_write(A_BITMAP_DATA, 16'h0801);  // H1 + ADC trigger
    host_write(A_BITMAP_DATA, 16'h0002);  // H2
    frame(2, 2, 4096, 3);
    frame(2, 2, 65535, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
