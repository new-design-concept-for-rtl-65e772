// tb_octal_dac: self-checking test of the octal DAC model.
//
// Writes random codes to random channels with write pulses, keeping a
// reference copy; after each write checks every channel's latch and its
// output voltage (code/255*VREF). Checks that data changing while wr is low,
// or during the pulse before it falls, is not latched, and that reset clears
// all channels.
module tb_octal_dac;
  import ccd_pkg::*;
  localparam real VREF = 5.0;
  logic rst_n = 1'b1, wr = 1'b0;
  logic [2:0] ch = '0;
  logic [7:0] data = '0;
  logic [7:0] code [DAC_CH];
  real vout [DAC_CH];
  logic [7:0] ref_code [DAC_CH];
  int checks = 0, failures = 0;

  octal_dac #(.VREF(VREF)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic check_all();
    for (int i = 0; i < DAC_CH; i++) begin
      real e;
      e = VREF * ref_code[i] / 255.0;
      check(code[i] == ref_code[i], $sformatf("ch %0d code %0d expected %0d", i, code[i], ref_code[i]));
      check(vout[i] > e - 1e-6 && vout[i] < e + 1e-6, $sformatf("ch %0d vout %f expected %f", i, vout[i], e));
    end
  endtask

  initial begin
    for (int i = 0; i < DAC_CH; i++) ref_code[i] = 8'h00;
    #1 rst_n = 1'b0;  // power-on reset: pulse twice so a falling edge is seen
    #1 rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    #10 check_all();
    for (int k = 0; k < 100; k++) begin
      ch = 3'($urandom);
      data = 8'($urandom);
      #5 wr = 1'b1;
      #5 data = 8'($urandom);   // final data before the falling edge is latched
      #5 wr = 1'b0;
      ref_code[ch] = data;
      #5 data = 8'($urandom);   // changes after the edge are ignored
      #5 check_all();
    end
    rst_n = 1'b0;
    for (int i = 0; i < DAC_CH; i++) ref_code[i] = 8'h00;
    #5 check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
