// tb_mixer: checks level normalisation, weighted sum and one-clock latency.
// Reference: gains g_i = pot_i when pot1+pot2 <= 255, else
// floor(pot_i*255/(pot1+pot2)); output = sat(floor(s1*g1/256) + floor(s2*g2/256)).
module tb_mixer;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [15:0] s1, s2, mix;
  logic [7:0] pot1, pot2;
  int checks = 0, failures = 0;
  int normalised = 0;

  mixer dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_mix(int a, int b, int p1, int p2);
    longint g1, g2;
    if (p1 + p2 <= 255) begin g1 = p1; g2 = p2; end
    else begin g1 = scale_floor(p1, 255, p1 + p2); g2 = scale_floor(p2, 255, p1 + p2); end
    return sat(scale_floor(a, g1, 256) + scale_floor(b, g2, 256));
  endfunction

  task automatic run(input int a, input int b, input int p1, input int p2);
    int exp;
    @(negedge clk);
    s1 = 16'(a); s2 = 16'(b); pot1 = 8'(p1); pot2 = 8'(p2); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    exp = ref_mix(a, b, p1, p2);
    if (p1 + p2 > 255) normalised++;
    checks++;
    if (!out_valid || mix !== 16'(exp)) begin
      failures++;
      $display("FAIL s1=%0d s2=%0d p1=%0d p2=%0d mix=%0d exp=%0d v=%b", a, b, p1, p2, mix, exp, out_valid);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid longer than one clock"); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s1 = 0; s2 = 0; pot1 = 0; pot2 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // two voices at 0.75 each of full scale: total stays at full scale
    run(32767, 32767, 191, 191);
    checks++;
    if (mix > 32767 || mix < 32000) begin failures++; $display("FAIL 0.75/0.75 case gives %0d", mix); end
    run(32767, 32767, 255, 255);
    run(-32768, -32768, 255, 255);
    run(-32768, -32768, 128, 127);
    run(1000, -1000, 100, 50);
    run(32767, 0, 255, 0);
    for (int i = 0; i < 1000; i++)
      run($signed(16'($urandom)), $signed(16'($urandom)), int'($urandom % 256), int'($urandom % 256));
    checks++;
    if (normalised == 0) begin failures++; $display("FAIL normalisation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
