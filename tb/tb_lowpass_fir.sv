// tb_lowpass_fir: filters random and impulse inputs with random bank
// changes and random backpressure, and compares each output with
// sat(sum_k h_b[k] x[n-k] >>> 7) computed from an independent coefficient
// design. Checks the Avalon-ST rules (data held while not ready, no new
// input accepted while busy), that the error code given with each input
// comes out with its result, and the NTAPS+2 clock latency.
module tb_lowpass_fir;
  import tb_ref_pkg::*;
  localparam int NT = 36, NB = 64;
  logic clk = 0, rst_n = 0;
  logic [5:0] bank = 0;
  logic signed [15:0] ast_sink_data = 0, ast_source_data;
  logic ast_sink_valid = 0, ast_sink_ready, ast_source_valid, ast_source_ready = 1;
  logic [1:0] ast_sink_error = 0, ast_source_error;
  int checks = 0, failures = 0;
  int hist [NT];
  int coefs [NB][NT];
  int stalls = 0, bank_changes = 0, saturations = 0, errors_passed = 0;

  lowpass_fir dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input int x, input int b, input bit stall);
    longint acc;
    int exp, lat;
    logic [1:0] err;
    @(negedge clk);
    checks++;
    if (!ast_sink_ready) begin failures++; $display("FAIL sink not ready when idle"); end
    ast_sink_data = 16'(x); ast_sink_valid = 1; bank = 6'(b);
    err = (($urandom % 3) == 0) ? 2'($urandom) : 2'b00;
    ast_sink_error = err;
    ast_source_ready = !stall;
    @(negedge clk);
    ast_sink_valid = 0;
    ast_sink_error = 2'($urandom);   // ignored while not accepted
    for (int i = NT - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = x;
    acc = 0;
    for (int k = 0; k < NT; k++) acc += longint'(coefs[b][k]) * hist[k];
    exp = sat(acc >>> 7);
    if (exp != (acc >>> 7)) saturations++;
    lat = 1;
    while (!ast_source_valid && lat < 200) begin
      checks++;
      if (ast_sink_ready) begin failures++; $display("FAIL sink ready while busy"); end
      @(negedge clk); lat++;
    end
    checks++;
    if (lat != NT + 2) begin failures++; $display("FAIL latency %0d, expected %0d", lat, NT + 2); end
    if (stall) begin
      stalls++;
      repeat (5) begin
        @(negedge clk);
        checks++;
        if (!ast_source_valid || ast_source_data !== 16'(exp) || ast_source_error !== err) begin failures++; $display("FAIL output not held under backpressure"); end
      end
      ast_source_ready = 1;
    end
    checks++;
    if (ast_source_data !== 16'(exp)) begin
      failures++;
      $display("FAIL bank %0d got %0d expected %0d", b, ast_source_data, exp);
    end
    checks++;
    if (ast_source_error !== err) begin
      failures++;
      $display("FAIL error code %b, expected %b", ast_source_error, err);
    end
    if (err != 0) errors_passed++;
    @(negedge clk);
    checks++;
    if (ast_source_valid) begin failures++; $display("FAIL source valid after the beat was taken"); end
  endtask

  initial begin
    int b;
    for (int i = 0; i < NB; i++) for (int k = 0; k < NT; k++) coefs[i][k] = lp_coef(i, k, NB, NT);
    for (int i = 0; i < NT; i++) hist[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // impulse response of bank 10: the output replays the coefficients
    push(16384, 10, 0);
    for (int i = 1; i < NT + 2; i++) push(0, 10, 0);
    // random signal, bank changing every few samples, random stalls
    b = 0;
    for (int i = 0; i < 600; i++) begin
      if (i % 7 == 0) begin b = int'($urandom % NB); bank_changes++; end
      push((i % 50 < 25) ? 30000 : -30000 + int'($urandom % 1000), b, ($urandom % 5) == 0);
    end
    for (int i = 0; i < 200; i++) push($signed(16'($urandom)), int'($urandom % NB), ($urandom % 4) == 0);
    checks++;
    if (stalls == 0 || bank_changes == 0 || errors_passed == 0) begin failures++; $display("FAIL mechanisms not exercised"); end
    $display("stalls=%0d bank_changes=%0d saturations=%0d errors_passed=%0d", stalls, bank_changes, saturations, errors_passed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
