// tb_analog_switches: self-checking test of the analog clock switch model.
//
// Random level sets and random waveforms: each clock line must carry the high
// level of its group when its waveform bit is 1 and the low level otherwise
// (H1-H3 share channels 0/1, V1-V3 channels 2/3, reset channels 4/5).
module tb_analog_switches;
  import ccd_pkg::*;
  logic [6:0] wave;
  real level [DAC_CH];
  real clk_v [7];
  int checks = 0, failures = 0;

  analog_switches dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    for (int k = 0; k < 200; k++) begin
      for (int i = 0; i < DAC_CH; i++) level[i] = real'($urandom_range(0, 1000)) / 100.0;
      wave = 7'($urandom);
      #1;
      for (int b = 0; b < 7; b++) begin
        int hi, lo;
        if (b <= 2) begin hi = 0; lo = 1; end
        else if (b == 3) begin hi = 4; lo = 5; end
        else begin hi = 2; lo = 3; end
        check(clk_v[b] == (wave[b] ? level[hi] : level[lo]),
              $sformatf("line %0d wave %b: %f", b, wave, clk_v[b]));
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
