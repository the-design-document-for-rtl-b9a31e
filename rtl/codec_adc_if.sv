// codec_adc_if: serial audio input from the WM8731 codec's ADC (line-in).
//
// The codec's ADC port runs as a slave on the clocks of the output side:
// BCLK and the left/right clock come from codec_dac_if (the top drives the
// codec's ADCLRCK with the same signal as DACLRCK). The codec sends each
// word left-justified and MSB first, changing ADCDAT after falling BCLK
// edges; this block takes a bit on every rising BCLK edge. The first 16
// bits after the left/right clock goes high form the left word, which is
// given out with a one-clock `valid` pulse. The right word is ignored, so
// the recording is mono from the left input.
//
// BCLK and LRCK are registered outputs of this clock domain, so a rising
// BCLK edge is found by comparing with last clock's value. ADCDAT comes
// from outside and passes through two flip-flops first. With the default
// 4-clock BCLK half period, the bit is taken about three clocks after the
// codec changed it and well before it changes again. Timing: `valid`
// comes 2 clocks after the rising BCLK edge that carries the last bit,
// once per frame (halfway through the frame). Recording from line-in
// follows the design; the format comes from the codec's data sheet; the
// mono left channel and the synchroniser are this design's choice.
module codec_adc_if #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                bclk,
  input  logic                lrck,
  input  logic                adcdat,
  output logic signed [W-1:0] sample,
  output logic                valid
);

  logic           bclk_q, lrck_q;
  logic [1:0]     dat_sync;
  logic [W-2:0]   shreg;     // bits of the word taken so far
  logic [5:0]     nbits;     // bits taken since the left/right clock rose
  logic           rise;

  assign rise = bclk && !bclk_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bclk_q   <= 1'b0;
      lrck_q   <= 1'b0;
      dat_sync <= '0;
      shreg    <= '0;
      nbits    <= 6'(W);
      sample   <= '0;
      valid    <= 1'b0;
    end else begin
      bclk_q   <= bclk;
      dat_sync <= {dat_sync[0], adcdat};
      valid    <= 1'b0;
      if (rise) begin
        lrck_q <= lrck;
        if (lrck && !lrck_q) begin
          // first bit of a left word
          shreg <= {{(W-2){1'b0}}, dat_sync[1]};
          nbits <= 6'd1;
        end else if (32'(nbits) < W) begin
          shreg <= {shreg[W-3:0], dat_sync[1]};
          nbits <= nbits + 1'b1;
          if (32'(nbits) == W - 1 && lrck) begin
            sample <= {shreg, dat_sync[1]};
            valid  <= 1'b1;
          end
        end
      end
    end
  end

endmodule
