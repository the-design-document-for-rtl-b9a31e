// tb_audio_sampler_top: end-to-end test of the sampler at its full default
// sizes (48000-word sample and delay memories, 36 taps, 64 banks).
//
// The test loads two short samples (and a few words at the far end of the
// sample memory) over Avalon-MM, then plays a scripted performance while a
// frame-accurate reference model of the signal chain (sample players,
// normalising mixer, FIR bank, clipper, delay) predicts every output
// sample. The codec model decodes the serial audio and each frame is
// compared with the prediction made one frame earlier. Settings are only
// changed in the second half of a frame, after the datapath has finished,
// so they take effect from the next frame in both the design and the
// model. Each mechanism of the design is counted and must occur: note-on
// retrigger, pitch shifting, reverse playback, end of a one-shot sample,
// note-off, level normalisation, filter bank switching, clipping, delay
// echo and feedback, delay limiting, waitrequest on a read, the codec
// configuration over I2C, and recording. For the recording, sample 2 is
// recorded from the codec model's line-in words after the performance. The
// memory must then hold a run of consecutive sent words in words
// 0..LEN2-1 and nothing past them. A host write to that memory during the
// recording must be dropped.
module tb_audio_sampler_top;
  import tb_ref_pkg::*;

  localparam int DEPTH = 48000, NT = 36, NB = 64;
  localparam int NFRAMES = 500;

  logic clk = 0, rst_n = 0;
  logic [17:0] avs_address = 0;
  logic avs_write = 0, avs_read = 0, avs_waitrequest;
  logic [15:0] avs_writedata = 0, avs_readdata;
  logic [7:0] pot1 = 0, pot2 = 0, pot3 = 0;
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

  // ---------------- reference model state ----------------
  int mem1 [int];
  int mem2 [int];
  int coefs [NB][NT];
  int hist [NT];
  int dbuf [];
  int wp = 0;
  longint pos [2];
  bit act [2];
  bit dir;
  int len [2];
  int m_note = 0, m_inc = 65536;
  bit m_on = 0, m_rev = 0;
  int m_len1 = 48000, m_len2 = 48000;
  int m_drive = 16, m_delay = 24000, m_fb = 0, m_mix = 0;
  int last_bank = -1;
  int exp_q [$];

  // mechanism counters
  int n_trigger = 0, n_pitch = 0, n_reverse = 0, n_end = 0, n_noteoff = 0;
  int n_norm = 0, n_bank = 0, n_clip = 0, n_echo = 0, n_feedback = 0, n_limit = 0;
  int n_wait = 0, n_record = 0;

  function automatic int step_for(int n);
    real r;
    r = (2.0 ** ((real'(n) - 24.0) / 12.0)) * 65536.0;
    return int'($floor(r + 0.5));
  endfunction

  // the design's table is rounded per semitone, then shifted by octave
  function automatic int step_rtl(int n);
    int s, o;
    real r;
    s = n % 12; o = n / 12;
    r = (2.0 ** (real'(s) / 12.0)) * 16384.0;
    return int'($floor(r + 0.5)) << o;
  endfunction

  function automatic int rd_mem(int v, int a);
    if (v == 0) return mem1.exists(a) ? mem1[a] : 0;
    return mem2.exists(a) ? mem2[a] : 0;
  endfunction

  // One output sample of the whole chain, computed at a tick.
  function automatic int model_frame();
    int w [2];
    int g1, g2, mx, f, c, dl, rp, d, y, bi, bank;
    longint acc, raw;
    for (int v = 0; v < 2; v++) begin
      w[v] = act[v] ? rd_mem(v, int'(pos[v] >>> 16)) : 0;
      if (act[v]) begin
        if (m_inc != 65536) n_pitch++;
        if (dir) n_reverse++;
        if (dir) begin
          if (pos[v] < m_inc) begin act[v] = 0; n_end++; end else pos[v] -= m_inc;
        end else begin
          if (((pos[v] + m_inc) >>> 16) >= len[v]) begin act[v] = 0; n_end++; end else pos[v] += m_inc;
        end
      end
    end
    // mixer
    if (int'(pot1) + int'(pot2) <= 255) begin g1 = pot1; g2 = pot2; end
    else begin
      g1 = int'(scale_floor(pot1, 255, int'(pot1) + int'(pot2)));
      g2 = int'(scale_floor(pot2, 255, int'(pot1) + int'(pot2)));
      if (w[0] != 0 || w[1] != 0) n_norm++;
    end
    mx = sat(scale_floor(w[0], g1, 256) + scale_floor(w[1], g2, 256));
    // filter
    bank = int'(pot3) >> 2;
    if (last_bank >= 0 && bank != last_bank) n_bank++;
    last_bank = bank;
    for (int i = NT - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = mx;
    acc = 0;
    for (int k = 0; k < NT; k++) acc += longint'(coefs[bank][k]) * hist[k];
    f = sat(acc >>> 7);
    // clipper
    raw = scale_floor(f, m_drive, 16);
    c = sat(raw);
    if (raw != c) n_clip++;
    // delay
    dl = (m_delay == 0) ? 1 : (m_delay >= DEPTH ? DEPTH - 1 : m_delay);
    rp = (wp - dl + DEPTH) % DEPTH;
    d = dbuf[rp];
    bi = sat(c + scale_floor(d, m_fb, 256));
    y = sat(c + scale_floor(d, m_mix, 256));
    if (d != 0 && m_mix != 0) n_echo++;
    if (d != 0 && m_fb != 0) n_feedback++;
    if (y != c + scale_floor(d, m_mix, 256) || bi != c + scale_floor(d, m_fb, 256)) n_limit++;
    dbuf[wp] = bi;
    wp = (wp + 1) % DEPTH;
    return y;
  endfunction

  // ---------------- bus tasks ----------------
  task automatic wr(input logic [17:0] a, input int d);
    @(negedge clk); avs_address = a; avs_writedata = 16'(d); avs_write = 1;
    @(negedge clk); avs_write = 0;
  endtask

  task automatic rd(input logic [17:0] a, output logic [15:0] d);
    @(negedge clk); avs_address = a; avs_read = 1;
    #1;
    while (avs_waitrequest) begin n_wait++; @(negedge clk); #1; end
    d = avs_readdata;
    @(negedge clk); avs_read = 0;
  endtask

  task automatic note(input int n, input bit on);
    wr(18'h0, (on ? 256 : 0) | n);
    m_note = (n > 48) ? 48 : n;
    m_inc = step_rtl(m_note);
    if (on) begin
      n_trigger++;
      dir = m_rev;
      len[0] = (m_len1 > DEPTH) ? DEPTH : m_len1;
      len[1] = (m_len2 > DEPTH) ? DEPTH : m_len2;
      for (int v = 0; v < 2; v++) begin
        act[v] = (len[v] != 0);
        pos[v] = m_rev ? longint'(len[v] - 1) * 65536 : 0;
      end
    end else begin
      n_noteoff++;
      act[0] = 0; act[1] = 0;
    end
    m_on = on;
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (NFRAMES * 256 + 200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus and checking ----------------
  initial begin
    logic [15:0] rdv;
    dbuf = new[DEPTH];
    for (int i = 0; i < DEPTH; i++) dbuf[i] = 0;
    for (int i = 0; i < NT; i++) hist[i] = 0;
    for (int b = 0; b < NB; b++) for (int k = 0; k < NT; k++) coefs[b][k] = lp_coef(b, k, NB, NT);
    act[0] = 0; act[1] = 0; dir = 0; len[0] = 0; len[1] = 0; pos[0] = 0; pos[1] = 0;
    pot1 = 8'd200; pot2 = 8'd150; pot3 = 8'd160;

    repeat (5) @(negedge clk);
    rst_n = 1;

    // load the samples: a sawtooth and a square wave
    for (int i = 0; i < 400; i++) begin
      mem1[i] = ((i * 300) % 60000) - 30000;
      wr({2'd1, 16'(i)}, mem1[i]);
    end
    for (int i = 0; i < 300; i++) begin
      mem2[i] = ((i / 25) % 2) ? 20000 : -20000;
      wr({2'd2, 16'(i)}, mem2[i]);
    end
    for (int i = 0; i < 64; i++) begin
      mem1[DEPTH - 1 - i] = $signed(16'($urandom));
      wr({2'd1, 16'(DEPTH - 1 - i)}, mem1[DEPTH - 1 - i]);
    end
    wr(18'h1, 400); m_len1 = 400;
    wr(18'h2, 300); m_len2 = 300;
    rd(18'h1, rdv);
    checks++; if (rdv != 16'd400) begin failures++; $display("FAIL LEN1 read back %0d", rdv); end

    for (int k = 0; k < NFRAMES; k++) begin
      @(posedge aud_daclrck);
      exp_q.push_back(model_frame());
      repeat (130) @(negedge clk);
      // this frame's left word carries the previous frame's result
      if (k >= 1) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (codec.left !== 16'(e)) begin
          failures++;
          if (failures < 20) $display("FAIL frame %0d: output %0d expected %0d", k - 1, codec.left, e);
        end
      end
      // scripted performance; changes apply from the next frame
      case (k)
        10:  note(24, 1);                                         // native pitch
        60:  note(31, 1);                                         // a fifth up, retrigger
        100: begin pot1 = 8'd100; pot2 = 8'd60; pot3 = 8'd20; end // no normalisation, low cutoff
        120: pot3 = 8'd252;                                       // widest bank
        150: begin wr(18'h3, 1); m_rev = 1; note(36, 1); end      // reverse, octave up
        200: begin wr(18'h4, 64); m_drive = 64; end               // 4x drive: clipping
        250: begin
               wr(18'h5, 20); m_delay = 20;
               wr(18'h6, 160); m_fb = 160;
               wr(18'h7, 180); m_mix = 180;
               pot1 = 8'd255; pot2 = 8'd255; pot3 = 8'd100;
             end
        300: begin wr(18'h4, 16); m_drive = 16; wr(18'h3, 0); m_rev = 0; note(12, 1); end
        420: note(12, 0);                                         // note off: echoes decay
        460: begin
               wr(18'h1, 48000); m_len1 = 48000;                  // whole memory, reverse
               wr(18'h3, 1); m_rev = 1;
               note(48, 1);
             end
        476: note(48, 0);
        default: ;
      endcase
    end

    checks++; if (!cfg_done || cfg_error) begin failures++; $display("FAIL codec configuration done=%b error=%b", cfg_done, cfg_error); end
    checks++; if (codec.nwrites != 8 || codec.regs[0] !== 9'h117 || codec.regs[7] !== 9'h001 || codec.regs[9] !== 9'h001) begin
      failures++; $display("FAIL codec registers (%0d writes)", codec.nwrites);
    end

    // ---------------- recording from line-in into sample 2 ----------------
    begin
      localparam int RLEN = 200;
      logic [15:0] before500, first;
      int s, polls;
      before500 = dut.u_ram2.mem[500];
      wr(18'h2, RLEN);
      wr(18'h8, 1);
      rd(18'h8, rdv);
      checks++; if (rdv != 16'd1) begin failures++; $display("FAIL recorder not busy after start"); end
      wr({2'd2, 16'd500}, 16'(~before500));         // must be dropped
      polls = 0;
      do begin
        repeat (256) @(negedge clk);
        rd(18'h8, rdv);
        polls++;
      end while (rdv[0] && polls < RLEN + 10);
      checks++; if (polls < RLEN - 2 || polls > RLEN + 3) begin failures++; $display("FAIL recording took %0d frames", polls); end
      // the memory holds consecutive line-in words
      first = dut.u_ram2.mem[0];
      s = -1;
      for (int i = 0; i < int'(codec.adc_n); i++) if (codec.adc_log[i] == first) s = i;
      checks++;
      if (s < 0) begin failures++; $display("FAIL first recorded word %h was never sent", first); end
      else begin
        for (int i = 0; i < RLEN; i++) begin
          checks++;
          if (dut.u_ram2.mem[i] !== codec.adc_log[s + i]) begin
            failures++;
            if (failures < 20) $display("FAIL recorded word %0d: %h, sent %h", i, dut.u_ram2.mem[i], codec.adc_log[s + i]);
          end
        end
        n_record = RLEN;
      end
      checks++; if (dut.u_ram2.mem[RLEN] !== 16'(mem2[RLEN])) begin failures++; $display("FAIL write past the recording length"); end
      checks++; if (dut.u_ram2.mem[500] !== before500) begin failures++; $display("FAIL host write not dropped during recording"); end
    end

    $display("mechanisms: trigger=%0d pitch=%0d reverse=%0d end=%0d noteoff=%0d norm=%0d bank=%0d clip=%0d echo=%0d feedback=%0d limit=%0d wait=%0d cfg=%0d record=%0d",
             n_trigger, n_pitch, n_reverse, n_end, n_noteoff, n_norm, n_bank, n_clip, n_echo, n_feedback, n_limit, n_wait, codec.nwrites, n_record);
    begin
      int counts [14];
      string names [14];
      counts = '{n_trigger, n_pitch, n_reverse, n_end, n_noteoff, n_norm, n_bank, n_clip, n_echo, n_feedback, n_limit, n_wait, int'(codec.nwrites), n_record};
      names  = '{"trigger", "pitch", "reverse", "end", "noteoff", "norm", "bank", "clip", "echo", "feedback", "limit", "wait", "cfg", "record"};
      for (int i = 0; i < 14; i++) begin
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
