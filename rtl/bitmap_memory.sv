// bitmap_memory: the waveform RAM of the controller board.
//
// Each word is one time step of the bitmap: sixteen bits giving the level of
// every CCD clock phase and of the video-processing and ADC trigger signals
// (layout in ccd_pkg). The PLD controller writes it from the host and then
// cycles through it; the data output is the digital waveform itself.
//
// Interface: one port, synchronous write (we) and synchronous read: rdata
// shows the word at addr one clock after addr is presented. The contents are
// not initialised; the host writes the bitmap before a readout.
//
// A separate memory holding the bitmap, written by software and read by
// cycling through addresses, follows the design. Its depth (2**AW words) and
// the registered read are this design's own choice.
module bitmap_memory #(
  parameter int unsigned AW = 13,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
