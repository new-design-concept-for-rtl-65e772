// sequencer_logic: memory address generator of the PLD controller.
//
// The sequencer holds the four initial conditions of a readout: the length in
// bitmap words of one vertical (line transfer) pattern and of one horizontal
// (pixel) pattern, the number of pixels per line and the number of lines per
// frame. The bitmap memory holds the vertical pattern at words
// 0 .. V_TIME-1 and the horizontal pattern directly after it, at words
// V_TIME .. V_TIME+H_TIME-1, so both are written in one pass.
//
// RAM writing mode: wr_rewind sets the address to 0; each wr_word writes the
// host data word at the current address (mem_we for one cycle) and advances
// the address by one.
//
// Readout: start (when idle) puts word 0 on the address bus. On every tick
// the address advances. For each line the vertical pattern is played once and
// then the horizontal pattern NPIX times; after NLINE lines the sequencer
// returns to idle (address 0) and raises carry_out for one cycle. stop aborts
// to idle at once. A length or count of 0 is treated as 1.
//
// Timing: a word is on mem_addr from one tick to the next; the bitmap memory
// returns it one clock later.
//
// That the bitmap is a vertical waveform followed by a horizontal one, and
// that pixel time, line time, pixel count and line count set the readout,
// follows the design; the memory layout, the end-of-frame carry and the
// treatment of zero values are this design's own choice.
module sequencer_logic
  import ccd_pkg::*;
#(
  parameter int unsigned MEM_AW = 13,
  parameter int unsigned CNT_W  = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  input  seq_ctrl_t          ctrl,
  input  logic [HOST_DW-1:0] data,
  output logic [MEM_AW-1:0]  mem_addr,
  output logic               mem_we,
  output logic [WORD_W-1:0]  mem_wdata,
  output logic               active,
  output seq_phase_e         phase,
  output logic [CNT_W-1:0]   pixel,
  output logic [CNT_W-1:0]   line,
  output logic               carry_out
);

  logic [MEM_AW-1:0] h_time, v_time;
  logic [CNT_W-1:0]  npix, nline;
  logic [MEM_AW-1:0] h_len, v_len;
  logic [CNT_W-1:0]  npix_e, nline_e;
  logic [MEM_AW-1:0] wcnt;

  always_comb begin
    h_len   = (h_time == '0) ? MEM_AW'(1) : h_time;
    v_len   = (v_time == '0) ? MEM_AW'(1) : v_time;
    npix_e  = (npix   == '0) ? CNT_W'(1)  : npix;
    nline_e = (nline  == '0) ? CNT_W'(1)  : nline;
    mem_we    = ctrl.wr_word && (phase == PH_IDLE);
    mem_wdata = WORD_W'(data);
    active    = (phase != PH_IDLE);
  end

  // Initial-condition latches.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_time <= MEM_AW'(1);
      v_time <= MEM_AW'(1);
      npix   <= CNT_W'(1);
      nline  <= CNT_W'(1);
    end else begin
      if (ctrl.ld_h_time) h_time <= MEM_AW'(data);
      if (ctrl.ld_v_time) v_time <= MEM_AW'(data);
      if (ctrl.ld_npix)   npix   <= CNT_W'(data);
      if (ctrl.ld_nline)  nline  <= CNT_W'(data);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_IDLE;
      mem_addr  <= '0;
      wcnt      <= '0;
      pixel     <= '0;
      line      <= '0;
      carry_out <= 1'b0;
    end else begin
      carry_out <= 1'b0;
      if (ctrl.stop) begin
        phase    <= PH_IDLE;
        mem_addr <= '0;
      end else begin
        unique case (phase)
          PH_IDLE: begin
            if (ctrl.wr_rewind)
              mem_addr <= '0;
            else if (ctrl.wr_word)
              mem_addr <= mem_addr + 1'b1;
            else if (ctrl.start) begin
              phase    <= PH_VERT;
              mem_addr <= '0;
              wcnt     <= '0;
              pixel    <= '0;
              line     <= '0;
            end
          end
          PH_VERT: if (tick) begin
            if (wcnt == v_len - 1'b1) begin
              phase    <= PH_HORZ;
              wcnt     <= '0;
              mem_addr <= v_len;
            end else begin
              wcnt     <= wcnt + 1'b1;
              mem_addr <= mem_addr + 1'b1;
            end
          end
          PH_HORZ: if (tick) begin
            if (wcnt == h_len - 1'b1) begin
              wcnt <= '0;
              if (pixel == npix_e - 1'b1) begin
                pixel <= '0;
                if (line == nline_e - 1'b1) begin
                  phase     <= PH_IDLE;
                  mem_addr  <= '0;
                  line      <= '0;
                  carry_out <= 1'b1;
                end else begin
                  line     <= line + 1'b1;
                  phase    <= PH_VERT;
                  mem_addr <= '0;
                end
              end else begin
                pixel    <= pixel + 1'b1;
                mem_addr <= v_len;
              end
            end else begin
              wcnt     <= wcnt + 1'b1;
              mem_addr <= mem_addr + 1'b1;
            end
          end
          default: phase <= PH_IDLE;
        endcase
      end
    end
  end

  // The memory is written only between frames; the frame carry ends a frame.
  a_write_idle: assert property (@(posedge clk) disable iff (!rst_n) mem_we |-> phase == PH_IDLE);
  a_carry_idle: assert property (@(posedge clk) disable iff (!rst_n) carry_out |-> phase == PH_IDLE);

endmodule
