// sample_param: pitch-shift step for a played note.
//
// The host sends note numbers 0..48, C2 to C6. The sample is played back at
// a speed that follows 12-tone equal temperament: each semitone multiplies
// the playback step by the twelfth root of two. Note ROOT_NOTE (24, C4) plays
// the sample at the rate it was recorded; note 0 plays it at a quarter and
// note 48 at four times that speed.
//
// The step is an unsigned fixed-point number with FRAC_BITS fraction bits
// (3.16 by default): the sample players add it to their read position once
// per output sample. It is computed as a table of the twelve semitone ratios
// 2^(s/12) * 2^(FRAC_BITS-2), built at elaboration, shifted left by the
// octave note/12. Equal temperament follows the design; the reference note,
// the number format and the one-cycle latency are this design's choice.
module sample_param #(
  parameter int unsigned FRAC_BITS = 16,
  parameter int unsigned ROOT_NOTE = 24,   // must be a multiple of 12, at most 24
  parameter int unsigned INC_W     = FRAC_BITS + 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [5:0]       note,
  output logic [INC_W-1:0] phase_inc
);

  localparam int unsigned BASE_SHIFT = FRAC_BITS - ROOT_NOTE / 12;

  // round(2^(s/12) * 2^BASE_SHIFT) for semitone s = 0..11
  function automatic logic [12*INC_W-1:0] ratio_table();
    logic [12*INC_W-1:0] t;
    for (int s = 0; s < 12; s++) begin
      real r;
      r = (2.0 ** (real'(s) / 12.0)) * (2.0 ** real'(BASE_SHIFT));
      t[s*INC_W +: INC_W] = INC_W'($rtoi(r + 0.5));
    end
    return t;
  endfunction

  localparam logic [12*INC_W-1:0] RATIOS = ratio_table();

  logic [5:0] n;
  logic [3:0] semitone;
  logic [2:0] octave;

  always_comb begin
    n        = (note > 6'(audio_pkg::MAX_NOTE)) ? 6'(audio_pkg::MAX_NOTE) : note;
    octave   = 3'(n / 6'd12);
    semitone = 4'(n % 6'd12);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_inc <= INC_W'(1) << FRAC_BITS;
    else        phase_inc <= RATIOS[semitone*INC_W +: INC_W] << octave;
  end

endmodule
