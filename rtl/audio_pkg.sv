// audio_pkg: types, constants and helpers shared by the sampler's blocks.
//
// All audio is 16-bit signed two's complement at 48 kHz. Gains from the
// potentiometer ADC are unsigned 8-bit values. The control settings written
// by the host are gathered in one struct, ctrl_t, so that the register block
// can hand them to the datapath as a single bundle. sat16() is the clipping
// rule used wherever a wider intermediate result returns to 16 bits: values
// beyond the range are held at +32767 / -32768 instead of wrapping.
package audio_pkg;

  localparam int unsigned SAMPLE_W = 16;
  localparam int unsigned MAX_NOTE = 48;     // C6 when 0 is C2

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Register addresses of the control region (word addresses).
  typedef enum logic [3:0] {
    REG_NOTE       = 4'd0,
    REG_LEN1       = 4'd1,
    REG_LEN2       = 4'd2,
    REG_REVERSE    = 4'd3,
    REG_CLIP_DRIVE = 4'd4,
    REG_DELAY      = 4'd5,
    REG_FEEDBACK   = 4'd6,
    REG_MIX        = 4'd7,
    REG_RECORD     = 4'd8
  } reg_addr_e;

  // Address regions of the memory-mapped agent (address bits [17:16]).
  typedef enum logic [1:0] {
    REGION_CTRL = 2'd0,
    REGION_SMP1 = 2'd1,
    REGION_SMP2 = 2'd2,
    REGION_NONE = 2'd3
  } region_e;

  typedef struct packed {
    logic [15:0] len1;        // sample 1 length in words
    logic [15:0] len2;        // sample 2 length in words
    logic        reverse;     // play both samples backwards
    logic [7:0]  clip_drive;  // 4.4 fixed point, 16 = unity
    logic [15:0] delay;       // delay time in samples
    logic [7:0]  feedback;    // delay feedback, /256
    logic [7:0]  mix;         // delay wet level, /256
  } ctrl_t;

  // Saturate a 32-bit signed value to the 16-bit sample range.
  function automatic sample_t sat16(input logic signed [31:0] v);
    if (v > 32'sd32767) return 16'sh7FFF;
    else if (v < -32'sd32768) return 16'sh8000;
    else return v[15:0];
  endfunction

endpackage
