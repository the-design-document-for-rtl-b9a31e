// sample_player: reads one stored sample at a pitch-shifted rate.
//
// A phase accumulator holds the read position with FRAC_BITS fraction
// bits. On every sample tick the word at the integer part of the position
// is read from the sample memory and the position moves by phase_inc, so a
// step of 2.0 plays the sample an octave up and a step of 0.5 an octave
// down. A note-on (trigger) restarts playback: from word 0 going forward,
// or, when reverse is set, from word length-1 going backward, which plays
// the stored sample from its end. Playback is one-shot: once the position
// leaves the sample, or when note_on drops, the player outputs silence.
// No interpolation is done (the word below the position is used).
// Pitch-shifted and reverse playback follow the design; one-shot playback,
// the missing interpolation and the fixed-point format are this design's
// choice.
//
// Timing: the memory has a one-cycle read. The player drives raddr from
// its position; sample and a one-cycle valid pulse appear two clocks after
// tick. A silent tick also produces a valid pulse, with sample = 0.
module sample_player #(
  parameter int unsigned DEPTH     = 48000,
  parameter int unsigned FRAC_BITS = 16,
  parameter int unsigned INC_W     = FRAC_BITS + 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                tick,
  input  logic                trigger,
  input  logic                note_on,
  input  logic                reverse,
  input  logic [15:0]         length,
  input  logic [INC_W-1:0]    phase_inc,
  output logic [15:0]         raddr,
  input  logic signed [15:0]  rdata,
  output logic signed [15:0]  sample,
  output logic                valid,
  output logic                active
);

  localparam int unsigned PW = 16 + FRAC_BITS;

  logic [PW-1:0] pos;
  logic          dir_rev;     // direction latched at trigger
  logic [15:0]   len_q;       // length latched at trigger, limited to DEPTH
  logic          rd_q;        // a read was issued last cycle
  logic          rd_active_q; // ... and the player was active then
  logic [PW:0]   pos_next_fwd;
  logic [15:0]   len_lim;

  assign raddr        = pos[PW-1:FRAC_BITS];
  assign pos_next_fwd = {1'b0, pos} + (PW+1)'(phase_inc);
  assign len_lim      = (32'(length) > DEPTH) ? 16'(DEPTH) : length;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos         <= '0;
      dir_rev     <= 1'b0;
      len_q       <= '0;
      active      <= 1'b0;
      rd_q        <= 1'b0;
      rd_active_q <= 1'b0;
      sample      <= '0;
      valid       <= 1'b0;
    end else begin
      rd_q        <= tick;
      rd_active_q <= tick && active;
      valid       <= rd_q;
      if (rd_q) sample <= rd_active_q ? rdata : '0;

      if (trigger) begin
        dir_rev <= reverse;
        len_q   <= len_lim;
        active  <= (len_lim != 16'd0);
        pos     <= reverse ? {len_lim - 16'd1, FRAC_BITS'(0)} : '0;
      end else if (!note_on) begin
        active <= 1'b0;
      end else if (tick && active) begin
        if (dir_rev) begin
          if (pos < PW'(phase_inc)) active <= 1'b0;
          else                      pos <= pos - PW'(phase_inc);
        end else begin
          if (pos_next_fwd[PW:FRAC_BITS] >= (PW+1-FRAC_BITS)'(len_q)) active <= 1'b0;
          else                                                   pos <= pos_next_fwd[PW-1:0];
        end
      end
    end
  end

endmodule
