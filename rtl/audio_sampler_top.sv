// audio_sampler_top: FPGA datapath of a two-voice sample player with
// low-pass filter, clipping distortion and delay.
//
// The host processor decodes a USB-MIDI keyboard and writes note numbers
// (0..48 for C2..C6) and note on/off over Avalon-MM, and loads two audio
// samples into on-chip memory through the same agent. For every 48 kHz
// output sample:
//   1. the codec interface pulses `tick` at the start of a frame;
//   2. both sample players read their memory at a position advanced by the
//      equal-temperament pitch step of the current note (sample_param),
//      forwards or in reverse;
//   3. the mixer scales the two voices by the level potentiometers (pot1,
//      pot2), normalised so the total never exceeds full scale, and adds;
//   4. the 36-tap FIR low-pass filters the mix with one of 64 coefficient
//      banks, picked by the cutoff potentiometer (pot3[7:2]);
//   5. the clipper applies drive and saturation;
//   6. the delay adds a fed-back echo;
//   7. the codec interface shifts the result out in the next frame.
// A sample can also be recorded from the codec's line input: on a host
// command the recorder writes one ADC word per frame into sample memory 1
// or 2. While it runs it owns the memories' write port, and host writes to
// the sample regions are dropped.
// The whole chain takes well under one frame (about 50 of 256 clocks), so
// the filter's backpressure is not used: its source ready is tied high and
// its sink ready is left open, and an assertion checks that the filter is
// always idle when a mixed sample arrives. The filter's error input is
// tied to "no error", as this design has no packets, and an assertion
// checks that no error comes out. After reset the codec is
// configured over I2C. The three potentiometer values come from the board
// ADC as 8-bit numbers.
//
// Interface: clk is assumed to be 12.288 MHz (256 clocks per 48 kHz
// frame); rst_n is asynchronous, active low. Block structure and signal
// flow follow the design's block diagram; the clock plan, the placement of
// the clipper between filter and delay, and the register map are this
// design's choice.
module audio_sampler_top
  import audio_pkg::*;
#(
  parameter int unsigned SAMPLE_DEPTH       = 48000,
  parameter int unsigned DELAY_DEPTH        = 48000,
  parameter int unsigned NTAPS              = 36,
  parameter int unsigned NBANKS             = 64,
  parameter int unsigned CLKS_PER_BCLK_HALF = 4,
  parameter int unsigned I2C_QUARTER        = 31
) (
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM agent (host bridge)
  input  logic [17:0] avs_address,
  input  logic        avs_write,
  input  logic [15:0] avs_writedata,
  input  logic        avs_read,
  output logic [15:0] avs_readdata,
  output logic        avs_waitrequest,
  // potentiometer values from the ADC
  input  logic [7:0]  pot1,
  input  logic [7:0]  pot2,
  input  logic [7:0]  pot3,
  // codec serial audio
  output logic        aud_bclk,
  output logic        aud_daclrck,
  output logic        aud_dacdat,
  output logic        aud_adclrck,
  input  logic        aud_adcdat,
  // codec configuration bus
  output logic        i2c_sclk,
  output logic        i2c_sdat_oe,
  input  logic        i2c_sdat_in,
  output logic        cfg_done,
  output logic        cfg_error,
  // status
  output logic [1:0]  voice_active
);

  localparam int unsigned BW = $clog2(NBANKS);

  logic [5:0]  note;
  logic        note_on, trigger;
  ctrl_t       ctrl;
  logic [1:0]  ram_we;
  logic [15:0] ram_waddr, ram_wdata;
  logic [18:0] phase_inc;
  logic        tick;

  logic [15:0] raddr1, raddr2;
  logic [15:0] rdata1, rdata2;
  sample_t     smp1, smp2;
  logic        v1, v2, act1, act2;

  logic        mix_valid;
  sample_t     mix;
  logic        fir_sink_ready;
  logic [1:0]  fir_error;
  logic        fir_valid;
  sample_t     fir_out;
  logic        clip_valid;
  sample_t     clip_out;
  logic        dly_valid, dly_busy;
  sample_t     dly_out;
  logic        rec_start, rec_bank, rec_busy, rec_owns;
  logic [1:0]  rec_we, mem_we;
  logic [15:0] rec_waddr, mem_waddr;
  logic [15:0] rec_wdata, mem_wdata;
  sample_t     adc_sample;
  logic        adc_valid;

  note_receiver u_regs (
    .clk, .rst_n,
    .avs_address, .avs_write, .avs_writedata, .avs_read, .avs_readdata, .avs_waitrequest,
    .note, .note_on, .trigger, .ctrl,
    .ram_we, .ram_waddr, .ram_wdata,
    .rec_start, .rec_bank, .rec_busy
  );

  sample_param u_param (.clk, .rst_n, .note, .phase_inc);

  sample_ram #(.DEPTH(SAMPLE_DEPTH)) u_ram1 (
    .clk, .we(mem_we[0]), .waddr(mem_waddr), .wdata(mem_wdata), .raddr(raddr1), .rdata(rdata1)
  );
  sample_ram #(.DEPTH(SAMPLE_DEPTH)) u_ram2 (
    .clk, .we(mem_we[1]), .waddr(mem_waddr), .wdata(mem_wdata), .raddr(raddr2), .rdata(rdata2)
  );

  sample_player #(.DEPTH(SAMPLE_DEPTH)) u_play1 (
    .clk, .rst_n, .tick, .trigger, .note_on, .reverse(ctrl.reverse), .length(ctrl.len1),
    .phase_inc, .raddr(raddr1), .rdata(rdata1), .sample(smp1), .valid(v1), .active(act1)
  );
  sample_player #(.DEPTH(SAMPLE_DEPTH)) u_play2 (
    .clk, .rst_n, .tick, .trigger, .note_on, .reverse(ctrl.reverse), .length(ctrl.len2),
    .phase_inc, .raddr(raddr2), .rdata(rdata2), .sample(smp2), .valid(v2), .active(act2)
  );

  mixer u_mix (
    .clk, .rst_n, .in_valid(v1 && v2), .s1(smp1), .s2(smp2), .pot1, .pot2,
    .out_valid(mix_valid), .mix
  );

  lowpass_fir #(.NTAPS(NTAPS), .NBANKS(NBANKS)) u_fir (
    .clk, .rst_n, .bank(pot3[7 -: BW]),
    .ast_sink_data(mix), .ast_sink_valid(mix_valid), .ast_sink_ready(fir_sink_ready),
    .ast_sink_error(2'b00),
    .ast_source_data(fir_out), .ast_source_valid(fir_valid), .ast_source_ready(1'b1),
    .ast_source_error(fir_error)
  );

  clipper u_clip (
    .clk, .rst_n, .in_valid(fir_valid), .x(fir_out), .drive(ctrl.clip_drive),
    .out_valid(clip_valid), .y(clip_out)
  );

  delay_effect #(.DEPTH(DELAY_DEPTH)) u_delay (
    .clk, .rst_n, .in_valid(clip_valid), .x(clip_out),
    .delay_samples(ctrl.delay), .feedback(ctrl.feedback), .mix(ctrl.mix),
    .out_valid(dly_valid), .y(dly_out), .busy(dly_busy)
  );

  codec_dac_if #(.CLKS_PER_BCLK_HALF(CLKS_PER_BCLK_HALF)) u_dac (
    .clk, .rst_n, .in_valid(dly_valid), .sample(dly_out),
    .tick, .bclk(aud_bclk), .daclrck(aud_daclrck), .dacdat(aud_dacdat)
  );

  codec_i2c_config #(.QUARTER(I2C_QUARTER)) u_i2c (
    .clk, .rst_n, .sclk(i2c_sclk), .sdat_oe(i2c_sdat_oe), .sdat_in(i2c_sdat_in),
    .done(cfg_done), .error(cfg_error)
  );

  codec_adc_if u_adc (
    .clk, .rst_n, .bclk(aud_bclk), .lrck(aud_daclrck), .adcdat(aud_adcdat),
    .sample(adc_sample), .valid(adc_valid)
  );
  assign aud_adclrck = aud_daclrck;

  sample_recorder #(.DEPTH(SAMPLE_DEPTH)) u_rec (
    .clk, .rst_n, .start(rec_start), .bank(rec_bank),
    .length(rec_bank ? ctrl.len2 : ctrl.len1),
    .in_valid(adc_valid), .in_sample(adc_sample),
    .we(rec_we), .waddr(rec_waddr), .wdata(rec_wdata), .busy(rec_busy)
  );

  // the recorder has the memories' write port while it runs, including
  // the clock of its last write
  assign rec_owns  = rec_busy || (rec_we != 2'b00);
  assign mem_we    = rec_owns ? rec_we    : ram_we;
  assign mem_waddr = rec_owns ? rec_waddr : ram_waddr;
  assign mem_wdata = rec_owns ? rec_wdata : ram_wdata;

  assign voice_active = {act2, act1};

  // With one sample per frame the filter and the delay are always free
  // when the next sample reaches them.
  a_fir_free:   assert property (@(posedge clk) disable iff (!rst_n) mix_valid |-> fir_sink_ready);
  a_delay_free: assert property (@(posedge clk) disable iff (!rst_n) clip_valid |-> !dly_busy);
  // No packets are used, so the filter never reports an error.
  a_fir_no_err: assert property (@(posedge clk) disable iff (!rst_n) fir_valid |-> fir_error == 2'b00);

endmodule
