// tb_sequencer_logic: self-checking test of the memory address sequencer.
//
// 1. RAM writing mode: rewind, then 20 word writes; each must give mem_we with
//    the host data at addresses 0, 1, 2, ...
// 2. Readout of several frames with random line time, pixel time, pixel count
//    and line count, and ticks at random cycles. A reference list of
//    addresses (per line: 0..V-1, then NPIX times V..V+H-1) is built in the
//    testbench; the address on the bus must follow it, advancing exactly on
//    ticks, and carry_out must pulse once at the end, with the sequencer idle
//    at address 0.
// 3. Zero parameters behave as 1; stop aborts a frame.
module tb_sequencer_logic;
  import ccd_pkg::*;
  localparam int unsigned MEM_AW = 10;
  localparam int unsigned CNT_W  = 8;

  logic clk = 1'b0, rst_n = 1'b1, tick = 1'b0;
  seq_ctrl_t ctrl = '0;
  logic [HOST_DW-1:0] data = '0;
  logic [MEM_AW-1:0] mem_addr;
  logic mem_we, active, carry_out;
  logic [WORD_W-1:0] mem_wdata;
  seq_phase_e phase;
  logic [CNT_W-1:0] pixel, line;
  int checks = 0, failures = 0;

  sequencer_logic #(.MEM_AW(MEM_AW), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic pulse(input seq_ctrl_t c, input logic [HOST_DW-1:0] d);
    @(negedge clk);
    ctrl = c;
    data = d;
    @(negedge clk);
    ctrl = '0;
  endtask

  task automatic load(input int v, input int h, input int np, input int nl);
    seq_ctrl_t c;
    c = '0; c.ld_v_time = 1'b1; pulse(c, HOST_DW'(v));
    c = '0; c.ld_h_time = 1'b1; pulse(c, HOST_DW'(h));
    c = '0; c.ld_npix   = 1'b1; pulse(c, HOST_DW'(np));
    c = '0; c.ld_nline  = 1'b1; pulse(c, HOST_DW'(nl));
  endtask

  // Run one frame; tick_pct is the chance (in %) of a tick in each cycle.
  task automatic frame(input int v, input int h, input int np, input int nl, input int tick_pct);
    int exp_addr[$];
    int idx, carries, cyc;
    seq_ctrl_t c;
    int ve, he, npe, nle;
    ve = (v == 0) ? 1 : v; he = (h == 0) ? 1 : h;
    npe = (np == 0) ? 1 : np; nle = (nl == 0) ? 1 : nl;
    for (int l = 0; l < nle; l++) begin
      for (int w = 0; w < ve; w++) exp_addr.push_back(w);
      for (int p = 0; p < npe; p++)
        for (int w = 0; w < he; w++) exp_addr.push_back(ve + w);
    end
    load(v, h, np, nl);
    c = '0; c.start = 1'b1;
    @(negedge clk);
    ctrl = c;
    @(negedge clk);
    ctrl = '0;
    check(active && phase == PH_VERT, "frame did not start");
    idx = 0; carries = 0; cyc = 0;
    while (active && cyc < 100000) begin
      if (idx < exp_addr.size())
        check(int'(mem_addr) == exp_addr[idx],
              $sformatf("word %0d: addr %0d expected %0d", idx, mem_addr, exp_addr[idx]));
      tick = ($urandom_range(0, 99) < tick_pct);
      if (tick) idx++;
      @(negedge clk);
      tick = 1'b0;
      if (carry_out) carries++;
      cyc++;
    end
    check(idx == exp_addr.size(), $sformatf("frame ended after %0d words, expected %0d", idx, exp_addr.size()));
    check(carries == 1, $sformatf("carry_out pulsed %0d times", carries));
    check(mem_addr == '0 && phase == PH_IDLE, "not idle at address 0 after frame");
    @(negedge clk);
    check(!carry_out, "carry_out longer than one cycle");
  endtask

  initial begin
    seq_ctrl_t c;
    #1 rst_n = 1'b0;  // power-on reset edge
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // RAM writing mode
    c = '0; c.wr_rewind = 1'b1; pulse(c, '0);
    for (int k = 0; k < 20; k++) begin
      logic [15:0] d;
      d = 16'($urandom);
      @(negedge clk);
      ctrl = '0; ctrl.wr_word = 1'b1; data = d;
      #1;
      check(mem_we && int'(mem_addr) == k && mem_wdata == d, $sformatf("write %0d", k));
      @(negedge clk);
      ctrl = '0;
      #1;
      check(!mem_we, "mem_we stuck");
    end
    c = '0; c.wr_rewind = 1'b1; pulse(c, '0);
    check(mem_addr == '0, "rewind");
    // frames
    frame(3, 4, 5, 2, 100);
    frame(1, 1, 1, 1, 100);
    frame(0, 0, 0, 0, 100);
    frame(6, 9, 3, 3, 30);
    for (int r = 0; r < 6; r++)
      frame($urandom_range(1, 8), $urandom_range(1, 12), $urandom_range(1, 6), $urandom_range(1, 4), $urandom_range(20, 100));
    // stop aborts a frame
    load(4, 4, 10, 10);
    c = '0; c.start = 1'b1; pulse(c, '0);
    repeat (30) begin
      @(negedge clk); tick = 1'b1;
    end
    @(negedge clk); tick = 1'b0;
    check(active, "frame should still run");
    c = '0; c.stop = 1'b1; pulse(c, '0);
    check(!active && mem_addr == '0, "stop did not abort");
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
