// tb_pld_controller: self-checking test of the PLD controller, host to
// memory address bus.
//
// A testbench RAM captures every mem_we write. The host (strobed writes)
// selects RAM writing mode and writes a bitmap of V+H random words, loads the
// four initial conditions and the timing resolution, and starts a readout.
// Checks: the RAM holds the bitmap at 0..V+H-1; during readout the address
// bus follows the reference stream (per line 0..V-1 then NPIX times
// V..V+H-1), every word lasting exactly TRES clocks; the frame takes
// words*TRES clocks and ends with frame_done; stop aborts a second frame.
module tb_pld_controller;
  import ccd_pkg::*;
  localparam int unsigned MEM_AW = 10;
  localparam int unsigned CNT_W  = 12;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [HOST_AW-1:0] host_addr = '0;
  logic [HOST_DW-1:0] host_data = '0;
  logic host_strobe = 1'b0;
  logic [MEM_AW-1:0] mem_addr;
  logic mem_we;
  logic [WORD_W-1:0] mem_wdata;
  ctrl_out_t ctrl;
  seq_phase_e phase;
  logic [CNT_W-1:0] pixel, line;
  logic [WORD_W-1:0] ram [int];
  int checks = 0, failures = 0;

  pld_controller #(.MEM_AW(MEM_AW), .CNT_W(CNT_W), .EXP_PRESCALE(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (mem_we) ram[int'(mem_addr)] = mem_wdata;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic host_write(input host_addr_e a, input logic [15:0] d);
    @(negedge clk);
    host_addr = a;
    host_data = d;
    repeat (2) @(negedge clk);
    host_strobe = 1'b1;
    repeat (6) @(negedge clk);
    host_strobe = 1'b0;
    repeat (5) @(negedge clk);
  endtask

  task automatic run_frame(input int v, input int h, input int np, input int nl, input int tres);
    logic [15:0] bm [$];
    int exp_addr[$];
    int cyc, total;
    bm = {};
    for (int k = 0; k < v + h; k++) bm.push_back(16'($urandom));
    host_write(A_RAM_WRITE, 0);
    check(ctrl.ram_write_mode, "RAM writing mode");
    foreach (bm[k]) host_write(A_BITMAP_DATA, bm[k]);
    foreach (bm[k]) check(ram.exists(k) && ram[k] == bm[k], $sformatf("bitmap word %0d", k));
    host_write(A_V_TIME, 16'(v));
    host_write(A_H_TIME, 16'(h));
    host_write(A_NPIX, 16'(np));
    host_write(A_NLINE, 16'(nl));
    host_write(A_TRES, 16'(tres));
    for (int l = 0; l < nl; l++) begin
      for (int w = 0; w < v; w++) exp_addr.push_back(w);
      for (int p = 0; p < np; p++)
        for (int w = 0; w < h; w++) exp_addr.push_back(v + w);
    end
    total = exp_addr.size() * tres;
    // start, then watch the address bus from the first active cycle
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
    check(ctrl.readout_busy && !ctrl.ram_write_mode, "readout started");
    cyc = 0;
    while (phase != PH_IDLE && cyc < total + 10) begin
      if (cyc < total)
        check(int'(mem_addr) == exp_addr[cyc / tres],
              $sformatf("cycle %0d: addr %0d expected %0d", cyc, mem_addr, exp_addr[cyc / tres]));
      @(negedge clk);
      cyc++;
      if (phase == PH_IDLE) check(ctrl.frame_done, "frame_done at the end of the frame");
    end
    check(cyc == total, $sformatf("frame took %0d cycles, expected %0d", cyc, total));
    @(negedge clk);
    check(!ctrl.readout_busy && !ctrl.frame_done, "idle after frame");
  endtask

  initial begin
    #1 rst_n = 1'b0;  // power-on reset edge
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_frame(3, 5, 4, 3, 2);
    run_frame(2, 3, 2, 2, 1);
    run_frame(4, 4, 3, 2, 5);
    // stop aborts a frame
    host_write(A_NPIX, 16'd200);
    host_write(A_START_READOUT, 0);
    check(ctrl.readout_busy && phase != PH_IDLE, "long frame running");
    host_write(A_STOP, 0);
    check(!ctrl.readout_busy && phase == PH_IDLE && mem_addr == '0, "stop aborted the frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
