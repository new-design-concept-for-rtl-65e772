// tb_clocking_logic: self-checking test of the timing-resolution divider.
//
// For several TRES values (0, 1, 2, 3, 7, 100 and random ones) it raises run
// and measures the cycle of the first tick and the spacing of the next ticks:
// each must be max(TRES,1) cycles. It also checks that no tick appears while
// run is low.
module tb_clocking_logic;
  localparam int unsigned TRES_W = 16;
  logic clk = 1'b0, rst_n = 1'b1, run = 1'b0;
  logic [TRES_W-1:0] tres = '0;
  logic tick;
  int checks = 0, failures = 0;

  clocking_logic #(.TRES_W(TRES_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic measure(input int t);
    int period, cyc, last_tick;
    period = (t == 0) ? 1 : t;
    @(negedge clk);
    tres = TRES_W'(t);
    run = 1'b0;
    repeat (3) begin
      @(negedge clk);
      check(!tick, "tick while run low");
    end
    run = 1'b1;
    #1;
    cyc = 0;
    last_tick = 0;
    for (int k = 0; k < 5; k++) begin
      int n = 0;
      while (1) begin
        cyc++;
        n++;
        if (tick) break;
        @(negedge clk);
        if (n > period + 5) break;
      end
      check(n == period, $sformatf("tres=%0d tick %0d after %0d cycles, expected %0d", t, k, n, period));
      @(negedge clk);
    end
    run = 1'b0;
  endtask

  initial begin
    #1 rst_n = 1'b0;  // power-on reset edge
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    measure(0); measure(1); measure(2); measure(3); measure(7); measure(100);
    repeat (10) measure($urandom_range(1, 40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
