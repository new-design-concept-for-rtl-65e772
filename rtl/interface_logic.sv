// interface_logic: host bus interface of the PLD controller.
//
// The control computer presents an address and a data word and raises a
// strobe. The strobe is asynchronous to the master clock, so it passes through
// a two-flop synchroniser; its rising edge, seen one flop later, becomes a
// single-cycle write (wr_valid) carrying the address and data captured at that
// moment. The computer must hold address and data stable for at least three
// master-clock cycles after raising the strobe, and keep the strobe low for at
// least three cycles between writes.
//
// Timing: wr_valid is asserted on the third or fourth rising clock edge after
// the strobe rises, for exactly one cycle.
//
// The block is named by the design as the entry point of address, data and
// strobe; the synchroniser and the one-write-per-strobe behaviour are this
// design's own choice.
module interface_logic
  import ccd_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [HOST_AW-1:0] host_addr,
  input  logic [HOST_DW-1:0] host_data,
  input  logic               host_strobe,
  output logic               wr_valid,
  output host_wr_t           wr
);

  logic s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1       <= 1'b0;
      s2       <= 1'b0;
      s3       <= 1'b0;
      wr_valid <= 1'b0;
      wr       <= '0;
    end else begin
      s1       <= host_strobe;
      s2       <= s1;
      s3       <= s2;
      wr_valid <= s2 & ~s3;
      if (s2 & ~s3) begin
        wr.addr <= host_addr;
        wr.data <= host_data;
      end
    end
  end

  // One strobe gives one write: a write is never two cycles long.
  a_single_write: assert property (@(posedge clk) disable iff (!rst_n) wr_valid |=> !wr_valid);

endmodule
