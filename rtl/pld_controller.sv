// pld_controller: the single-chip digital controller of the CCD system.
//
// It is four blocks. The interface logic turns each host strobe into one
// synchronous write. The control logic decodes the address: commands, the
// timing resolution and the exposure time. The clocking logic divides the
// master clock into the sequencer's step rate. The sequencer logic latches
// the pixel time, line time, pixel count and line count from the data bus and
// drives the memory address bus: word by word while the host writes the
// bitmap, and pattern by pattern while a frame is read out. Its end-of-frame
// carry returns to the control logic. No processor is involved: the waveform
// itself is whatever the bitmap memory holds at the addresses the sequencer
// produces.
//
// Interface: host_addr/host_data/host_strobe from the computer; mem_addr,
// mem_we and mem_wdata to the bitmap memory; ctrl to the shutter, filter
// wheel and status lines; phase, pixel and line report the readout position.
//
// The block partition and the connections between blocks (address to the
// control logic, data bus to the sequencer, control to the clocking logic and
// the sequencer, carry out back to the control logic, system clock to the
// sequencer) follow the design's block diagram. Sending the data bus to the
// control logic as well, for the timing resolution and exposure time, is this
// design's own choice.
module pld_controller
  import ccd_pkg::*;
#(
  parameter int unsigned MEM_AW       = 13,
  parameter int unsigned CNT_W        = 16,
  parameter int unsigned TRES_W       = 16,
  parameter int unsigned EXP_W        = 16,
  parameter int unsigned EXP_PRESCALE = 10000
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [HOST_AW-1:0] host_addr,
  input  logic [HOST_DW-1:0] host_data,
  input  logic               host_strobe,
  output logic [MEM_AW-1:0]  mem_addr,
  output logic               mem_we,
  output logic [WORD_W-1:0]  mem_wdata,
  output ctrl_out_t          ctrl,
  output seq_phase_e         phase,
  output logic [CNT_W-1:0]   pixel,
  output logic [CNT_W-1:0]   line
);

  logic              wr_valid;
  host_wr_t          wr;
  seq_ctrl_t         seq_ctrl;
  logic              clk_run, tick;
  logic [TRES_W-1:0] tres;
  logic              seq_active, seq_carry;

  interface_logic u_interface (
    .clk, .rst_n, .host_addr, .host_data, .host_strobe,
    .wr_valid, .wr
  );

  control_logic #(
    .TRES_W(TRES_W), .EXP_W(EXP_W), .EXP_PRESCALE(EXP_PRESCALE)
  ) u_control (
    .clk, .rst_n, .wr_valid, .wr,
    .seq_active, .seq_carry,
    .seq_ctrl, .clk_run, .tres,
    .ctrl_out(ctrl)
  );

  clocking_logic #(.TRES_W(TRES_W)) u_clocking (
    .clk, .rst_n, .run(clk_run), .tres, .tick
  );

  sequencer_logic #(.MEM_AW(MEM_AW), .CNT_W(CNT_W)) u_sequencer (
    .clk, .rst_n, .tick, .ctrl(seq_ctrl), .data(wr.data),
    .mem_addr, .mem_we, .mem_wdata,
    .active(seq_active), .phase, .pixel, .line,
    .carry_out(seq_carry)
  );

endmodule
