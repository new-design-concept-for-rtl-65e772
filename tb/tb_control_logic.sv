// tb_control_logic: self-checking test of the command decoder.
//
// The sequencer is replaced by a few testbench signals (seq_active,
// seq_carry). Each host write is one wr_valid cycle. Checks: RAM writing mode
// and the rewind pulse; bitmap words passed on only in RAM writing mode; one
// load strobe per parameter write; timing resolution and exposure time
// registers; parameters ignored while busy; the start latch held until the
// sequencer becomes active and cleared right after; the stop latch held until
// it is idle; shutter open/close; the one-cycle filter trigger; a timed
// exposure lasting EXPTIME*EXP_PRESCALE+1 cycles with one done pulse.
module tb_control_logic;
  import ccd_pkg::*;
  localparam int unsigned PRE = 5;

  logic clk = 1'b0, rst_n = 1'b1;
  logic wr_valid = 1'b0;
  host_wr_t wr = '0;
  logic seq_active = 1'b0, seq_carry = 1'b0;
  seq_ctrl_t seq_ctrl;
  logic clk_run;
  logic [15:0] tres;
  ctrl_out_t ctrl_out;
  int checks = 0, failures = 0;

  control_logic #(.TRES_W(16), .EXP_W(16), .EXP_PRESCALE(PRE)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Count strobes on the control bundle.
  int n_rewind = 0, n_word = 0, n_ldh = 0, n_ldv = 0, n_ldp = 0, n_ldl = 0, n_filter = 0, n_done = 0;
  always @(posedge clk) begin
    if (seq_ctrl.wr_rewind) n_rewind++;
    if (seq_ctrl.wr_word)   n_word++;
    if (seq_ctrl.ld_h_time) n_ldh++;
    if (seq_ctrl.ld_v_time) n_ldv++;
    if (seq_ctrl.ld_npix)   n_ldp++;
    if (seq_ctrl.ld_nline)  n_ldl++;
    if (ctrl_out.filter_step)   n_filter++;
    if (ctrl_out.exposure_done) n_done++;
  end

  task automatic hw(input host_addr_e a, input logic [15:0] d);
    @(negedge clk);
    wr_valid = 1'b1;
    wr.addr = a;
    wr.data = d;
    @(negedge clk);
    wr_valid = 1'b0;
  endtask

  initial begin
    int cyc;
    #1 rst_n = 1'b0;  // power-on reset edge
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!ctrl_out.shutter_open && !ctrl_out.ram_write_mode && !ctrl_out.readout_busy, "reset state");
    // bitmap words outside RAM writing mode are dropped
    hw(A_BITMAP_DATA, 16'h1234);
    @(negedge clk);
    check(n_word == 0, "bitmap word accepted outside RAM writing mode");
    hw(A_RAM_WRITE, 0);
    @(negedge clk);
    check(ctrl_out.ram_write_mode && n_rewind == 1, "RAM writing mode");
    check(ctrl_out.data_buf_en && !ctrl_out.wave_buf_en, "buffer enables in RAM writing mode");
    for (int k = 0; k < 5; k++) hw(A_BITMAP_DATA, 16'(k));
    @(negedge clk);
    check(n_word == 5, $sformatf("%0d bitmap words passed, expected 5", n_word));
    // parameters
    hw(A_H_TIME, 10); hw(A_V_TIME, 20); hw(A_NPIX, 30); hw(A_NLINE, 40);
    hw(A_TRES, 16'd7); hw(A_EXPTIME, 16'd7);
    @(negedge clk);
    check(n_ldh == 1 && n_ldv == 1 && n_ldp == 1 && n_ldl == 1, "one load strobe per parameter");
    check(tres == 16'd7, "timing resolution register");
    // start: latch held until the sequencer is active
    hw(A_START_READOUT, 0);
    check(seq_ctrl.start && ctrl_out.readout_busy && !ctrl_out.ram_write_mode, "start latch set");
    repeat (5) begin
      @(negedge clk);
      check(seq_ctrl.start, "start latch must hold until executed");
    end
    seq_active = 1'b1;
    @(negedge clk);
    check(!seq_ctrl.start, "start latch not cleared after execution");
    check(clk_run, "clocking not running during readout");
    check(ctrl_out.wave_buf_en && !ctrl_out.data_buf_en, "buffer enables during readout");
    // parameters ignored while busy
    hw(A_H_TIME, 11); hw(A_TRES, 16'd3);
    @(negedge clk);
    check(n_ldh == 1 && tres == 16'd7, "parameter accepted while busy");
    hw(A_RAM_WRITE, 0);
    check(!ctrl_out.ram_write_mode, "RAM writing mode entered while busy");
    // end of frame
    seq_carry = 1'b1;
    #1 check(ctrl_out.frame_done, "frame_done");
    @(negedge clk);
    seq_carry = 1'b0; seq_active = 1'b0;
    @(negedge clk);
    check(!ctrl_out.readout_busy && !clk_run && !ctrl_out.wave_buf_en, "still busy after frame");
    // stop latch held until the sequencer is idle
    hw(A_START_READOUT, 0);
    @(negedge clk); seq_active = 1'b1;
    repeat (2) @(negedge clk);
    hw(A_STOP, 0);
    repeat (3) begin
      check(seq_ctrl.stop, "stop latch must hold until executed");
      @(negedge clk);
    end
    seq_active = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(!seq_ctrl.stop && !ctrl_out.readout_busy, "stop latch not cleared");
    // shutter and filter wheel
    hw(A_SHUTTER_OPEN, 0);
    check(ctrl_out.shutter_open, "shutter open");
    hw(A_SHUTTER_CLOSE, 0);
    check(!ctrl_out.shutter_open, "shutter close");
    hw(A_FILTER_STEP, 0);
    hw(A_FILTER_STEP, 0);
    @(negedge clk);
    check(n_filter == 2, $sformatf("filter pulses %0d, expected 2", n_filter));
    // timed exposure: 7 units of PRE cycles
    @(negedge clk);
    wr_valid = 1'b1; wr.addr = A_START_EXPOSURE;
    @(negedge clk);
    wr_valid = 1'b0;
    cyc = 0;
    while (ctrl_out.exposing && cyc < 1000) begin
      check(ctrl_out.shutter_open, "shutter closed during exposure");
      cyc++;
      @(negedge clk);
    end
    check(cyc == 7 * PRE + 1, $sformatf("exposure lasted %0d cycles, expected %0d", cyc, 7 * PRE + 1));
    check(!ctrl_out.shutter_open && ctrl_out.exposure_done, "shutter after exposure");
    @(negedge clk);
    check(n_done == 1 && !ctrl_out.exposure_done, "one exposure_done pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
