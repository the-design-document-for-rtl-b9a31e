// tb_workload_one_second: the one-second buffers of the design at full
// size. Sample 1 fills the whole 48000-word memory (silence with two
// impulses, at words 0 and 47000) and is played at its recorded pitch
// from start to end, through the widest filter bank and the delay set to
// its longest time, 47999 samples, with the echo at full level and no
// feedback. A reference model of mixer, filter, clipper and delay predicts
// every one of the ~48100 output samples: the first impulse, the second
// impulse 47000 frames later, the echo of the first 47999 frames after it,
// and silence in between. The voice must stop exactly at the end of the
// memory.
module tb_workload_one_second;
  import tb_ref_pkg::*;

  localparam int DEPTH = 48000, NT = 36, NB = 64, BANK = 63;
  localparam int NFRAMES = DEPTH + 100;

  logic clk = 0, rst_n = 0;
  logic [17:0] avs_address = 0;
  logic avs_write = 0, avs_read = 0, avs_waitrequest;
  logic [15:0] avs_writedata = 0, avs_readdata;
  logic [7:0] pot1 = 8'd255, pot2 = 8'd0, pot3 = 8'(BANK << 2);
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
  int h [NT];
  int hist [NT];
  int dbuf [];
  int wp = 0;
  int nonzero = 0, echo_seen = 0;

  function automatic int word(int i);
    return (i == 0) ? 20000 : (i == 47000) ? -12000 : 0;
  endfunction

  task automatic wr(input logic [17:0] a, input int d);
    @(negedge clk); avs_address = a; avs_writedata = 16'(d); avs_write = 1;
    @(negedge clk); avs_write = 0;
  endtask

  function automatic int model(int n);
    int x, mx, f, d, y;
    longint acc;
    x  = (n < DEPTH) ? word(n) : 0;
    mx = sat(scale_floor(x, 255, 256));
    for (int i = NT - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = mx;
    acc = 0;
    for (int k = 0; k < NT; k++) acc += longint'(h[k]) * hist[k];
    f = sat(acc >>> 7);                      // clipper at unity passes f
    d = dbuf[(wp - (DEPTH - 1) + DEPTH) % DEPTH];
    y = sat(f + scale_floor(d, 255, 256));
    dbuf[wp] = f;                            // no feedback
    wp = (wp + 1) % DEPTH;
    if (d != 0) echo_seen++;
    return y;
  endfunction

  initial begin
    repeat (NFRAMES * 256 + 400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_prev, e;
    dbuf = new[DEPTH];
    for (int i = 0; i < DEPTH; i++) dbuf[i] = 0;
    for (int i = 0; i < NT; i++) begin hist[i] = 0; h[i] = lp_coef(BANK, i, NB, NT); end
    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) wr({2'd1, 16'(i)}, word(i));
    wr(18'h1, DEPTH);
    wr(18'h5, DEPTH - 1);    // longest delay
    wr(18'h6, 0);
    wr(18'h7, 255);          // echo at full level
    @(posedge aud_daclrck);
    repeat (130) @(negedge clk);
    wr(18'h0, 256 | 24);     // note on, native pitch: word n plays in frame n
    exp_prev = 0;
    for (int n = 0; n < NFRAMES; n++) begin
      @(posedge aud_daclrck);
      e = model(n);
      repeat (130) @(negedge clk);
      if (n >= 1) begin
        checks++;
        if (codec.left !== 16'(exp_prev)) begin
          failures++;
          if (failures < 20) $display("FAIL frame %0d: output %0d expected %0d", n - 1, $signed(codec.left), exp_prev);
        end
        if (exp_prev != 0) nonzero++;
      end
      exp_prev = e;
      // the voice plays word n in frame n and stops after word 47999
      checks++;
      if (voice_active[0] !== (n < DEPTH - 1)) begin
        failures++;
        if (failures < 20) $display("FAIL frame %0d: voice_active %b", n, voice_active[0]);
      end
    end
    checks++;
    if (nonzero < 60 || echo_seen == 0) begin failures++; $display("FAIL impulses or echo missing (%0d, %0d)", nonzero, echo_seen); end
    $display("nonzero output frames %0d, echo frames %0d", nonzero, echo_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
