// attenuator: scales one audio sample by an 8-bit gain.
//
// y = floor(x * gain / 256): gain is unsigned 0.8 fixed point, so 0 mutes
// and 255 passes the sample at 255/256. The block is combinational; the
// mixer registers its result. Gain format and rounding are this design's
// choice; the role of the block (one attenuator per sample, its gain set
// by the mixer controls) follows the system diagram.
module attenuator #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] x,
  input  logic        [7:0]   gain,
  output logic signed [W-1:0] y
);

  logic signed [W+8:0] prod;

  always_comb begin
    prod = x * $signed({1'b0, gain});
    y    = W'(prod >>> 8);
  end

endmodule
