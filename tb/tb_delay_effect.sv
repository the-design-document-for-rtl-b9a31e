// tb_delay_effect: runs a reduced 64-word delay line against a reference
// model of recording, recall after `delay` samples, feedback into the
// buffer and dry + wet mixing, with saturation. Also checks the clamping
// of the delay time, the zero wet signal while the buffer is being
// cleared, and the 3-clock latency.
module tb_delay_effect;
  import tb_ref_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, busy;
  logic signed [15:0] x, y;
  logic [15:0] delay_samples;
  logic [7:0] feedback, mix;
  int checks = 0, failures = 0;
  int bufm [DEPTH];
  int wp = 0;
  int echoes = 0, limited = 0;

  delay_effect #(.DEPTH(DEPTH), .AW(6)) dut (.*);

  always #5 clk = ~clk;

  task automatic sample(input int xi, input int d, input int fb, input int mx, input bit cleared);
    int dl, rp, dd, exp, bi;
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy between samples"); end
    x = 16'(xi); delay_samples = 16'(d); feedback = 8'(fb); mix = 8'(mx); in_valid = 1;
    @(negedge clk); in_valid = 0;
    dl = (d == 0) ? 1 : (d >= DEPTH ? DEPTH - 1 : d);
    rp = (wp - dl + DEPTH) % DEPTH;
    dd = cleared ? bufm[rp] : 0;
    bi = sat(xi + scale_floor(dd, fb, 256));
    exp = sat(xi + scale_floor(dd, mx, 256));
    if (dd != 0 && mx != 0) echoes++;
    if (exp != xi + scale_floor(dd, mx, 256) || bi != xi + scale_floor(dd, fb, 256)) limited++;
    bufm[wp] = bi;
    wp = (wp + 1) % DEPTH;
    repeat (1) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL output too early"); end
    @(negedge clk);
    checks++;
    if (!out_valid || y !== 16'(exp)) begin
      failures++;
      $display("FAIL x=%0d d=%0d fb=%0d mix=%0d y=%0d expected %0d (valid %b)", xi, d, fb, mx, y, exp, out_valid);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0; delay_samples = 8; feedback = 0; mix = 0;
    for (int i = 0; i < DEPTH; i++) bufm[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // while clearing: wet forced to zero, samples still recorded
    sample(1000, 4, 128, 255, 0);
    sample(2000, 4, 128, 255, 0);
    repeat (DEPTH + 5) @(negedge clk);
    // single echo: impulse then silence, delay 5, mix 1/2, no feedback
    sample(20000, 5, 0, 128, 1);
    for (int i = 0; i < 12; i++) sample(0, 5, 0, 128, 1);
    // repeating, decaying echo with feedback
    sample(16000, 7, 192, 200, 1);
    for (int i = 0; i < 40; i++) sample(0, 7, 192, 200, 1);
    // delay clamps: 0 -> 1, >= DEPTH -> DEPTH-1
    for (int i = 0; i < 10; i++) sample(3000 * i, 0, 100, 100, 1);
    for (int i = 0; i < 10; i++) sample(-3000 * i, 1000, 100, 100, 1);
    // loud input with full feedback: the limiter must hold the range
    for (int i = 0; i < 200; i++) sample($signed(16'($urandom)), int'($urandom % 70), int'($urandom % 256), int'($urandom % 256), 1);
    checks++;
    if (echoes == 0 || limited == 0) begin failures++; $display("FAIL echo or limiter not exercised"); end
    $display("echoes=%0d limited=%0d", echoes, limited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
