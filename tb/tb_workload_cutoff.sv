// tb_workload_cutoff: the low-pass workload of the design's filter
// experiments, run through the whole sampler at its default sizes.
//
// Two voices are set up as in the reference experiment: voice 1 at gain 0
// and voice 2 at about 0.4 (pot2 = 102), no echo. Voice 2 holds a test
// signal of three tones, 1 kHz, 5 kHz and 14 kHz, at 10000 each. The
// cutoff potentiometer selects the bank nearest to 2907 Hz (bank 7,
// 3000 Hz) and then the one nearest to 7601 Hz (bank 19, 7500 Hz). For
// each setting 960 output samples are captured from the codec's serial
// data and the amplitude of each tone is measured with a DFT at its exact
// bin. Checks: every measured tone gain matches the frequency response of
// the reference coefficient bank within 2 % of full input level; 1 kHz
// passes both filters, 14 kHz is stopped by both, and 5 kHz is stopped by
// the 3000 Hz bank but passed by the 7500 Hz bank; voice 1 (a loud 700 Hz
// tone) is absent.
module tb_workload_cutoff;
  import tb_ref_pkg::*;

  localparam int NT = 36, NB = 64, N = 960, LEN = 1400;
  localparam real FS = 48000.0;

  logic clk = 0, rst_n = 0;
  logic [17:0] avs_address = 0;
  logic avs_write = 0, avs_read = 0, avs_waitrequest;
  logic [15:0] avs_writedata = 0, avs_readdata;
  logic [7:0] pot1 = 0, pot2 = 8'd102, pot3 = 0;
  logic aud_bclk, aud_daclrck, aud_dacdat, aud_adclrck, aud_adcdat;
  logic i2c_sclk, i2c_sdat_oe, i2c_sdat_in, cfg_done, cfg_error;
  logic [1:0] voice_active;
  logic sda_pull;
  wire  sda = !(i2c_sdat_oe || sda_pull);
  assign i2c_sdat_in = sda;

  audio_sampler_top dut (.*);
  wm8731_model codec (.bclk(aud_bclk), .daclrck(aud_daclrck), .dacdat(aud_dacdat),
                      .adclrck(aud_adclrck), .adcdat(aud_adcdat),
                      .scl(i2c_sclk), .sda, .nack(1'b0), .sda_pull);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real tones [3] = '{1000.0, 5000.0, 14000.0};
  real y [N];

  task automatic wr(input logic [17:0] a, input int d);
    @(negedge clk); avs_address = a; avs_writedata = 16'(d); avs_write = 1;
    @(negedge clk); avs_write = 0;
  endtask

  function automatic real amp_at(real f);
    real re, im;
    re = 0.0; im = 0.0;
    for (int n = 0; n < N; n++) begin
      re += y[n] * $cos(2.0 * PI * f * n / FS);
      im -= y[n] * $sin(2.0 * PI * f * n / FS);
    end
    return 2.0 * ((re * re + im * im) ** 0.5) / N;
  endfunction

  function automatic real bank_gain(int b, real f);
    real re, im;
    re = 0.0; im = 0.0;
    for (int k = 0; k < NT; k++) begin
      re += lp_coef(b, k, NB, NT) * $cos(2.0 * PI * f * k / FS);
      im -= lp_coef(b, k, NB, NT) * $sin(2.0 * PI * f * k / FS);
    end
    return ((re * re + im * im) ** 0.5) / 128.0;
  endfunction

  task automatic run_bank(input int b, output real g [3]);
    pot3 = 8'(b << 2);
    wr(18'h0, 256 | 24);                   // note on at native pitch
    repeat (60) @(posedge aud_daclrck);    // let the filter history fill
    for (int n = 0; n < N; n++) begin
      @(posedge aud_daclrck);
      repeat (130) @(negedge clk);
      y[n] = real'($signed(codec.left));
    end
    wr(18'h0, 24);                         // note off
    for (int i = 0; i < 3; i++) g[i] = amp_at(tones[i]) / (10000.0 * 102.0 / 256.0);
    begin
      real a700;
      a700 = amp_at(700.0);
      checks++;
      if (a700 > 50.0) begin failures++; $display("FAIL muted voice 1 audible, %f", a700); end
    end
    for (int i = 0; i < 3; i++) begin
      real e;
      e = bank_gain(b, tones[i]);
      $display("bank %0d (%0d Hz): tone %0d Hz gain %f, expected %f", b, (b + 1) * 375, int'(tones[i]), g[i], e);
      checks++;
      if (g[i] - e > 0.02 || e - g[i] > 0.02) begin failures++; $display("FAIL gain mismatch"); end
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real g7 [3], g19 [3];
    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < LEN; i++) begin
      real s;
      s = 0.0;
      for (int t = 0; t < 3; t++) s += 10000.0 * $sin(2.0 * PI * tones[t] * i / FS);
      wr({2'd2, 16'(i)}, int'($floor(s + 0.5)));
      wr({2'd1, 16'(i)}, int'($floor(30000.0 * $sin(2.0 * PI * 700.0 * i / FS) + 0.5)));
    end
    wr(18'h1, LEN);
    wr(18'h2, LEN);
    run_bank(7, g7);     // nearest to 2907 Hz
    run_bank(19, g19);   // nearest to 7601 Hz
    checks++; if (g7[0] < 0.9 || g19[0] < 0.9) begin failures++; $display("FAIL 1 kHz not passed"); end
    checks++; if (g7[2] > 0.02 || g19[2] > 0.02) begin failures++; $display("FAIL 14 kHz not stopped"); end
    checks++; if (g7[1] > 0.1 || g19[1] < 0.9) begin failures++; $display("FAIL 5 kHz not separated by the two cutoffs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
