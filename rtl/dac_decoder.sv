// dac_decoder: address decoder of the analog driver board.
//
// The analog driver board listens to the same host bus as the controller.
// Addresses 0x20-0x27 select channels 0-7 of DAC 0 (bias levels) and
// 0x28-0x2F channels 0-7 of DAC 1 (waveform high and low levels). While the
// strobe is high, the write line of the addressed DAC follows it; all other
// write lines stay low. Purely combinational.
//
// The decoder between the address buffer and the two DACs' select inputs
// follows the design's board diagram; the address window is this design's own
// choice.
module dac_decoder
  import ccd_pkg::*;
(
  input  logic [HOST_AW-1:0] addr,
  input  logic               strobe,
  output logic [N_DAC-1:0]   dac_wr,
  output logic [2:0]         ch
);

  always_comb begin
    dac_wr = '0;
    ch     = addr[2:0];
    if (addr[7:4] == DAC_PAGE)
      dac_wr[addr[3]] = strobe;
  end

endmodule
