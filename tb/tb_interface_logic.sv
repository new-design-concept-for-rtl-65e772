// tb_interface_logic: self-checking test of the host bus interface.
//
// Sends 200 host writes with random address, data and strobe timing (strobe
// high 3-8 cycles, low 3-8 cycles, address and data changed off-edge to mimic
// an asynchronous host). Checks that each strobe gives exactly one wr_valid
// cycle, 3 or 4 clock edges after the strobe rises, carrying the address and
// data that were on the bus.
module tb_interface_logic;
  import ccd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  logic [HOST_AW-1:0] host_addr = '0;
  logic [HOST_DW-1:0] host_data = '0;
  logic host_strobe = 1'b0;
  logic wr_valid;
  host_wr_t wr;
  int checks = 0, failures = 0;

  interface_logic dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Count every wr_valid cycle.
  int pulses = 0;
  always @(posedge clk) if (wr_valid) pulses++;

  initial begin
    #1 rst_n = 1'b0;  // power-on reset edge
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      logic [HOST_AW-1:0] a;
      logic [HOST_DW-1:0] d;
      int n_before, lat;
      a = HOST_AW'($urandom);
      d = HOST_DW'($urandom);
      #2;  // off the clock edge
      host_addr = a;
      host_data = d;
      #1;
      host_strobe = 1'b1;
      n_before = pulses;
      lat = 0;
      while (!wr_valid && lat < 10) begin
        @(posedge clk);
        lat++;
        #1;
      end
      check(wr_valid, $sformatf("write %0d: no wr_valid", n));
      check(lat == 3 || lat == 4, $sformatf("write %0d: latency %0d edges", n, lat));
      check(wr.addr == a && wr.data == d,
            $sformatf("write %0d: got %h/%h expected %h/%h", n, wr.addr, wr.data, a, d));
      repeat ($urandom_range(0, 4)) @(posedge clk);
      #3 host_strobe = 1'b0;
      host_addr = HOST_AW'($urandom);
      repeat ($urandom_range(3, 8)) @(posedge clk);
      check(pulses == n_before + 1, $sformatf("write %0d: %0d pulses", n, pulses - n_before));
    end
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
