// tb_bitmap_memory: self-checking test of the bitmap RAM.
//
// Writes random words to random addresses (keeping a reference copy in an
// associative array), then reads every written address and checks the data
// appear exactly one clock after the address, and that a read during a write
// returns the old word.
module tb_bitmap_memory;
  localparam int unsigned AW = 8, DW = 16;
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [DW-1:0] ref_mem [int];

  bitmap_memory #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      we = 1'b1;
      addr = AW'($urandom);
      wdata = DW'($urandom);
      ref_mem[int'(addr)] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    // read everything twice: reads must not disturb the contents
    repeat (2) begin
      wdata = DW'($urandom);
      foreach (ref_mem[a]) begin
        addr = AW'(a);
        @(negedge clk);
        check(rdata == ref_mem[a], $sformatf("addr %0d: %h expected %h", a, rdata, ref_mem[a]));
      end
    end
    // read-during-write returns the old word
    begin
      int a;
      a = 5;
      ref_mem[a] = 16'hBEEF;
      addr = AW'(a); we = 1'b1; wdata = 16'hBEEF;
      @(negedge clk);
      we = 1'b1; wdata = 16'hCAFE;
      @(negedge clk);
      check(rdata == 16'hBEEF, "read during write");
      we = 1'b0;
      @(negedge clk);
      check(rdata == 16'hCAFE, "write after read");
    end
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
