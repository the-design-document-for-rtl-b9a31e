// note_receiver: memory-mapped agent through which the host controls the
// sampler.
//
// The host processor decodes the keyboard and writes the note number
// (0..48, C2 to C6) and note on/off here; it also loads the two samples and
// sets the effect parameters. The agent has an Avalon-MM interface with
// word addresses; address bits [17:16] select a region:
//   0  control registers (offset [3:0]):
//        0 NOTE      [5:0] note number (clamped to 48), [8] note on
//        1 LEN1      length of sample 1 in words
//        2 LEN2      length of sample 2 in words
//        3 REVERSE   [0] play samples backwards
//        4 CLIPDRV   [7:0] clipping drive, 4.4 fixed point (16 = 1.0)
//        5 DELAY     delay time in samples
//        6 FEEDBACK  [7:0] delay feedback, /256
//        7 MIX       [7:0] delay wet level, /256
//        8 RECORD    write: start recording line-in into sample memory
//                    [0] (0: sample 1, 1: sample 2) for LEN1/LEN2 words;
//                    read: [0] recording in progress
//   1  sample 1 memory, offset = word index (write only)
//   2  sample 2 memory, offset = word index (write only)
// A write to NOTE with bit 8 set gives a one-clock `trigger` pulse that
// restarts playback; a write with bit 8 clear ends the note. A write to
// RECORD gives a one-clock `rec_start` pulse with `rec_bank`. While a
// recording runs, the recorder owns the memories' write port and host
// writes to the sample regions are dropped (the top does this).
// Writes complete in one clock. A read holds waitrequest high for its first
// clock while the register value is captured, and returns it on the
// second; reads of the sample regions return 0. The note and on/off
// interface and memory-mapped sample loading follow the design; the
// register map, widths and reset values are this design's choice.
module note_receiver
  import audio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [17:0] avs_address,
  input  logic        avs_write,
  input  logic [15:0] avs_writedata,
  input  logic        avs_read,
  output logic [15:0] avs_readdata,
  output logic        avs_waitrequest,
  output logic [5:0]  note,
  output logic        note_on,
  output logic        trigger,
  output ctrl_t       ctrl,
  output logic [1:0]  ram_we,
  output logic [15:0] ram_waddr,
  output logic [15:0] ram_wdata,
  output logic        rec_start,
  output logic        rec_bank,
  input  logic        rec_busy
);

  region_e   region;
  reg_addr_e radr;
  logic      rd_done;
  logic [15:0] rd_val;

  assign region = region_e'(avs_address[17:16]);
  assign radr   = reg_addr_e'(avs_address[3:0]);

  // Sample loading goes straight through to the memories.
  assign ram_we[0] = avs_write && region == REGION_SMP1;
  assign ram_we[1] = avs_write && region == REGION_SMP2;
  assign ram_waddr = avs_address[15:0];
  assign ram_wdata = avs_writedata;

  assign avs_waitrequest = avs_read && !rd_done;

  always_comb begin
    rd_val = '0;
    if (region == REGION_CTRL) begin
      unique case (radr)
        REG_NOTE:       rd_val = {7'd0, note_on, 2'd0, note};
        REG_LEN1:       rd_val = ctrl.len1;
        REG_LEN2:       rd_val = ctrl.len2;
        REG_REVERSE:    rd_val = {15'd0, ctrl.reverse};
        REG_CLIP_DRIVE: rd_val = {8'd0, ctrl.clip_drive};
        REG_DELAY:      rd_val = ctrl.delay;
        REG_FEEDBACK:   rd_val = {8'd0, ctrl.feedback};
        REG_MIX:        rd_val = {8'd0, ctrl.mix};
        REG_RECORD:     rd_val = {15'd0, rec_busy};
        default:        rd_val = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      note            <= '0;
      note_on         <= 1'b0;
      trigger         <= 1'b0;
      rec_start       <= 1'b0;
      rec_bank        <= 1'b0;
      ctrl.len1       <= 16'd48000;
      ctrl.len2       <= 16'd48000;
      ctrl.reverse    <= 1'b0;
      ctrl.clip_drive <= 8'd16;
      ctrl.delay      <= 16'd24000;
      ctrl.feedback   <= 8'd0;
      ctrl.mix        <= 8'd0;
      rd_done         <= 1'b0;
      avs_readdata    <= '0;
    end else begin
      trigger   <= 1'b0;
      rec_start <= 1'b0;
      rd_done <= avs_read && !rd_done;
      if (avs_read && !rd_done) avs_readdata <= rd_val;
      if (avs_write && region == REGION_CTRL) begin
        unique case (radr)
          REG_NOTE: begin
            note    <= (avs_writedata[5:0] > 6'(MAX_NOTE)) ? 6'(MAX_NOTE) : avs_writedata[5:0];
            note_on <= avs_writedata[8];
            trigger <= avs_writedata[8];
          end
          REG_LEN1:       ctrl.len1       <= avs_writedata;
          REG_LEN2:       ctrl.len2       <= avs_writedata;
          REG_REVERSE:    ctrl.reverse    <= avs_writedata[0];
          REG_CLIP_DRIVE: ctrl.clip_drive <= avs_writedata[7:0];
          REG_DELAY:      ctrl.delay      <= avs_writedata;
          REG_FEEDBACK:   ctrl.feedback   <= avs_writedata[7:0];
          REG_MIX:        ctrl.mix        <= avs_writedata[7:0];
          REG_RECORD: begin
            rec_start <= 1'b1;
            rec_bank  <= avs_writedata[0];
          end
          default: ;
        endcase
      end
    end
  end

  // Avalon-MM: a host never reads and writes in the same cycle.
  a_no_rd_wr: assert property (@(posedge clk) disable iff (!rst_n) !(avs_read && avs_write));

endmodule
