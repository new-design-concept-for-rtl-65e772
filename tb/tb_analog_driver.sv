// tb_analog_driver: self-checking test of the analog driver board model.
//
// Writes random 8-bit levels over the host bus to all sixteen DAC channels
// (0x20-0x2F) and to some addresses outside the DAC window, which must change
// nothing. Checks the bias voltages (code/255*VREF), the latched codes, and
// that each clock line follows its waveform bit between the high and low
// level of its group for random waveform words.
module tb_analog_driver;
  import ccd_pkg::*;
  localparam real VREF = 10.0;
  logic rst_n = 1'b1;
  logic [HOST_AW-1:0] host_addr = '0;
  logic [HOST_DW-1:0] host_data = '0;
  logic host_strobe = 1'b0;
  logic [WORD_W-1:0] wave = '0;
  real bias_v [DAC_CH];
  real clock_v [7];
  logic [7:0] bias_code [DAC_CH];
  logic [7:0] level_code [DAC_CH];
  logic [7:0] ref_code [16];
  int checks = 0, failures = 0;

  analog_driver #(.VREF(VREF)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic host_write(input logic [7:0] a, input logic [15:0] d);
    host_addr = a;
    host_data = d;
    #10 host_strobe = 1'b1;
    #40 host_strobe = 1'b0;
    #10;
  endtask

  function automatic real volts(input logic [7:0] c);
    return VREF * c / 255.0;
  endfunction

  function automatic bit near(input real a, input real b);
    return (a > b - 1e-6) && (a < b + 1e-6);
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) ref_code[i] = '0;
    #1 rst_n = 1'b0;  // power-on reset: pulse twice so a falling edge is seen
    #1 rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    for (int r = 0; r < 4; r++) begin
      for (int i = 0; i < 16; i++) begin
        logic [7:0] c;
        c = 8'($urandom);
        host_write(8'h20 + 8'(i), {8'($urandom), c});
        ref_code[i] = c;
        host_write(8'($urandom_range(0, 31)), 16'($urandom));  // not a DAC address
        host_write(8'($urandom_range(48, 255)), 16'($urandom));
      end
      for (int i = 0; i < 8; i++) begin
        check(bias_code[i] == ref_code[i] && near(bias_v[i], volts(ref_code[i])),
              $sformatf("bias ch %0d", i));
        check(level_code[i] == ref_code[8 + i], $sformatf("level ch %0d", i));
      end
      for (int k = 0; k < 20; k++) begin
        wave = 16'($urandom);
        #1;
        for (int b = 0; b < 3; b++) begin
          check(near(clock_v[BIT_PH1 + b], volts(ref_code[8 + (wave[BIT_PH1 + b] ? LV_H_HI : LV_H_LO)])),
                $sformatf("H%0d", b + 1));
          check(near(clock_v[BIT_PV1 + b], volts(ref_code[8 + (wave[BIT_PV1 + b] ? LV_V_HI : LV_V_LO)])),
                $sformatf("V%0d", b + 1));
        end
        check(near(clock_v[BIT_PR], volts(ref_code[8 + (wave[BIT_PR] ? LV_R_HI : LV_R_LO)])), "R");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
