// tb_sample_player: pitch-shifted, one-shot, forward and reverse playback.
// A reference phase accumulator predicts which word each tick must return;
// after the end of the sample (or note-off) the output must be silent.
module tb_sample_player;
  localparam int DEPTH = 1000;
  logic clk = 0, rst_n = 0;
  logic tick = 0, trigger = 0, note_on = 0, reverse = 0;
  logic [15:0] length;
  logic [18:0] phase_inc;
  logic [15:0] raddr;
  logic signed [15:0] rdata, sample;
  logic valid, active;
  logic we = 0;
  logic [15:0] waddr = 0, wdata = 0;
  int checks = 0, failures = 0;

  sample_ram #(.DEPTH(DEPTH)) ram (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  sample_player #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] word(int a);
    return 16'(a * 37 - 5000);
  endfunction

  // One tick; sample and valid must appear exactly two clocks later.
  task automatic do_tick(input int exp_word, input bit exp_active);
    @(negedge clk); tick = 1;
    @(negedge clk); tick = 0;
    checks++;
    if (valid) begin failures++; $display("FAIL valid one clock after tick"); end
    @(negedge clk);
    checks++;
    if (!valid || sample !== (exp_active ? word(exp_word) : 16'd0)) begin
      failures++;
      $display("FAIL expected %0s word %0d (%0d), got %0d valid %b", exp_active ? "" : "silence",
               exp_word, $signed(word(exp_word)), sample, valid);
    end
    repeat (2) @(negedge clk);
  endtask

  task automatic play(input int len, input int inc, input bit rev, input int nticks);
    longint pos;
    bit act;
    @(negedge clk);
    length = 16'(len); phase_inc = 19'(inc); reverse = rev; note_on = 1; trigger = 1;
    @(negedge clk); trigger = 0;
    pos = rev ? longint'(len - 1) * 65536 : 0;
    act = (len != 0);
    for (int k = 0; k < nticks; k++) begin
      do_tick(int'(pos >>> 16), act);
      if (act) begin
        if (rev) begin
          if (pos < inc) act = 0; else pos -= inc;
        end else begin
          if (((pos + inc) >>> 16) >= len) act = 0; else pos += inc;
        end
      end
      checks++;
      if (active !== act) begin failures++; $display("FAIL active=%b expected %b at tick %0d", active, act, k); end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    length = 0; phase_inc = 19'd65536;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 16'(a); wdata = word(a);
    end
    @(negedge clk); we = 0; rst_n = 1;
    play(100, 65536, 0, 110);       // native pitch, runs past the end
    play(100, 98304, 0, 80);        // a fifth up (1.5)
    play(300, 16384, 0, 50);        // two octaves down
    play(100, 262144, 0, 30);       // two octaves up
    play(100, 65536, 1, 110);       // reverse, from the last word
    play(250, 77936, 1, 60);        // reverse, pitch-shifted
    // note-off silences immediately
    play(500, 65536, 0, 5);
    @(negedge clk); note_on = 0;
    @(negedge clk);
    do_tick(0, 0);
    checks++; if (active) begin failures++; $display("FAIL active after note-off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
