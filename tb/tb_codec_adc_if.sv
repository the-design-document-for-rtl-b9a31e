// tb_codec_adc_if: the ADC receiver against the codec model's transmitter.
// The serial clocks come from codec_dac_if, as in the full design. Every
// word the receiver gives out must be the left word the model sent in that
// frame (the right word is the inverse and must never appear), exactly one
// word per frame, with valid one clock long and halfway through the frame.
module tb_codec_adc_if;
  logic clk = 0, rst_n = 0;
  logic tick, bclk, daclrck, dacdat, adcdat, sda_pull;
  logic signed [15:0] sample;
  logic valid;
  int checks = 0, failures = 0;
  int nwords = 0, tick_time = 0, cyc = 0;

  codec_dac_if u_dac (.clk, .rst_n, .in_valid(1'b0), .sample(16'sd0), .tick, .bclk, .daclrck, .dacdat);
  codec_adc_if dut (.clk, .rst_n, .bclk, .lrck(daclrck), .adcdat, .sample, .valid);
  wm8731_model codec (.bclk, .daclrck, .dacdat, .adclrck(daclrck), .adcdat,
                      .scl(1'b1), .sda(1'b1), .nack(1'b0), .sda_pull);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    cyc++;
    if (tick) tick_time = cyc;
    if (rst_n && valid) begin
      nwords++;
      checks++;
      if (sample !== codec.adc_log[(codec.adc_n - 1) % 4096]) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d: got %h sent %h", nwords, sample, codec.adc_log[(codec.adc_n - 1) % 4096]);
      end
      // the left word ends 16 BCLK periods (128 clocks) into the frame
      checks++;
      if (cyc - tick_time < 120 || cyc - tick_time > 140) begin
        failures++; $display("FAIL valid %0d clocks after the frame start", cyc - tick_time);
      end
    end
  end

  always @(negedge clk) if (rst_n && valid) begin
    @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL valid longer than one clock"); end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (300 * 256) @(negedge clk);
    checks++;
    // the first frame after reset may start mid-word; all others count
    if (nwords < codec.adc_n - 2 || nwords > codec.adc_n) begin
      failures++; $display("FAIL %0d words for %0d frames", nwords, codec.adc_n);
    end
    $display("words=%0d frames=%0d", nwords, codec.adc_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
