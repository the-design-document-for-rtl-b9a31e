// tb_codec_dac_if: decodes the serial output with the codec model and
// checks that each frame carries, on both channels, the sample given
// during the previous frame; checks the 256-clock frame period, the tick
// pulse and the BCLK division.
module tb_codec_dac_if;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] sample = 0;
  logic tick, bclk, daclrck, dacdat;
  logic sda_pull;
  int checks = 0, failures = 0;
  int last_tick = -1, cyc = 0, nticks = 0;
  logic signed [15:0] sent [$];

  codec_dac_if dut (.*);
  wm8731_model codec (.bclk, .daclrck, .dacdat, .adclrck(daclrck), .adcdat(), .scl(1'b1), .sda(1'b1), .nack(1'b0), .sda_pull);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // tick period
  always @(posedge clk) if (rst_n && tick) begin
    if (last_tick >= 0) begin
      checks++;
      if (cyc - last_tick != 256) begin failures++; $display("FAIL frame of %0d clocks", cyc - last_tick); end
    end
    last_tick = cyc;
    nticks++;
  end

  // BCLK half period = 4 clocks
  int last_edge = -1;
  always @(posedge bclk) begin
    if (last_edge >= 0) begin
      checks++;
      if (cyc - last_edge != 8) begin failures++; $display("FAIL BCLK period %0d", cyc - last_edge); end
    end
    last_edge = cyc;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      // wait for a tick, then give a new sample mid-frame
      @(posedge clk iff tick);
      repeat (60) @(negedge clk);
      sample = (k % 3 == 0) ? 16'sh8000 : (k % 3 == 1) ? 16'sh7FFF : $signed(16'($urandom));
      in_valid = 1;
      @(negedge clk); in_valid = 0;
      sent.push_back(sample);
      // the right word of the last frame carries the sample given two frames ago
      if (k >= 2) begin
        checks++;
        if (codec.right !== sent[k-2]) begin
          failures++; $display("FAIL frame %0d: right %h expected %h", k - 1, codec.right, sent[k-2]);
        end
      end
      // the left word of this frame, complete 128 clocks into it, carries
      // the sample given during the previous frame
      repeat (140) @(negedge clk);
      if (k >= 1) begin
        checks++;
        if (codec.left !== sent[k-1]) begin
          failures++; $display("FAIL frame %0d: left %h expected %h", k, codec.left, sent[k-1]);
        end
      end
    end
    checks++;
    if (nticks < 190) begin failures++; $display("FAIL only %0d ticks", nticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
