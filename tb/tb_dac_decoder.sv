// tb_dac_decoder: exhaustive test of the analog-board address decoder.
//
// For every address and both strobe levels it checks that only an address in
// 0x20-0x2F with the strobe high drives a DAC write line, that bit 3 picks
// the DAC and bits 2-0 the channel.
module tb_dac_decoder;
  import ccd_pkg::*;
  logic [HOST_AW-1:0] addr;
  logic strobe;
  logic [N_DAC-1:0] dac_wr;
  logic [2:0] ch;
  int checks = 0, failures = 0;

  dac_decoder dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int s = 0; s < 2; s++) begin
        logic [1:0] exp_wr;
        addr = 8'(a);
        strobe = s[0];
        #1;
        exp_wr = 2'b00;
        if (s == 1 && a >= 'h20 && a <= 'h27) exp_wr = 2'b01;
        if (s == 1 && a >= 'h28 && a <= 'h2F) exp_wr = 2'b10;
        check(dac_wr == exp_wr, $sformatf("addr %h strobe %0d: wr %b expected %b", a, s, dac_wr, exp_wr));
        if (exp_wr != 0) check(int'(ch) == a % 8, $sformatf("addr %h: channel %0d", a, ch));
      end
    end
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
