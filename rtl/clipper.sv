// clipper: clipping distortion.
//
// Multiplies the sample by a drive gain and saturates the result to the
// 16-bit signed range: a value that would pass 32767 is held at 32767
// (and below -32768 at -32768) rather than wrapping around, which would
// flip the sign and distort grossly. With drive at unity the sample passes
// unchanged; larger drives push more of the waveform into the limits,
// flattening its peaks. Saturation rather than wrapping follows the
// design; the 4.4 fixed-point drive (16 = 1.0, up to 15.94) is this
// design's choice.
//
// Timing: out_valid and y follow in_valid by one clock.
module clipper
  import audio_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  input  logic        [7:0]   drive,
  output logic                out_valid,
  output logic signed [W-1:0] y
);

  logic signed [W+8:0] prod;

  assign prod = x * $signed({1'b0, drive});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= W'(sat16(32'(prod >>> 4)));
    end
  end

endmodule
