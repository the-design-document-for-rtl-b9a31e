// codec_dac_if: serial audio output to the WM8731 codec's DAC.
//
// The FPGA is the clock master of the serial audio port. BCLK runs at the
// system clock divided by 2*CLKS_PER_BCLK_HALF; a frame is 32 BCLK periods,
// 16 for the left and 16 for the right channel, so with the default divider
// a frame is 256 clocks: 48 kHz from a 12.288 MHz clock. The format is
// left-justified 16-bit: DACLRCK is high for the left channel, changes on a
// falling BCLK edge together with the sample's MSB, and the codec samples
// DACDAT on rising edges. The output is mono: the same sample goes to both
// channels.
//
// The block also sets the pace of the whole datapath: `tick` pulses for one
// clock at the start of every frame, which is when the sample players take
// their next step. The most recent sample given with in_valid is held and
// sent starting with the next frame. The 16-bit, 48 kHz audio path follows
// the design; the serial format and codec register settings come from the
// codec's data sheet, and the clock plan is this design's choice.
module codec_dac_if #(
  parameter int unsigned CLKS_PER_BCLK_HALF = 4,
  parameter int unsigned W                  = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] sample,
  output logic                tick,
  output logic                bclk,
  output logic                daclrck,
  output logic                dacdat
);

  localparam int unsigned DW = (CLKS_PER_BCLK_HALF > 1) ? $clog2(CLKS_PER_BCLK_HALF) : 1;

  logic [DW-1:0]  div;
  logic [4:0]     bitcnt;
  logic [W-1:0]   held;
  logic [2*W-1:0] shreg;
  logic           fall;      // BCLK goes low on this clock edge

  assign fall    = bclk && (32'(div) == CLKS_PER_BCLK_HALF - 1);
  assign dacdat  = shreg[2*W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div     <= '0;
      bclk    <= 1'b0;
      bitcnt  <= 5'd31;
      held    <= '0;
      shreg   <= '0;
      daclrck <= 1'b0;
      tick    <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (in_valid) held <= sample;
      if (32'(div) == CLKS_PER_BCLK_HALF - 1) begin
        div  <= '0;
        bclk <= !bclk;
      end else begin
        div <= div + 1'b1;
      end
      if (fall) begin
        bitcnt <= bitcnt + 1'b1;          // wraps 31 -> 0
        if (bitcnt == 5'd31) begin
          shreg   <= {held, held};
          daclrck <= 1'b1;
          tick    <= 1'b1;
        end else begin
          shreg <= {shreg[2*W-2:0], 1'b0};
          if (bitcnt == 5'd15) daclrck <= 1'b0;
        end
      end
    end
  end

endmodule
