// tb_fir_coef_rom: reads every coefficient of every bank and compares it
// with an independent windowed-sinc design; also checks symmetry (linear
// phase), unity DC gain and that low banks reject high frequencies.
module tb_fir_coef_rom;
  import tb_ref_pkg::*;
  localparam int NB = 64, NT = 36;
  logic clk = 0;
  logic [5:0] bank = 0, tap = 0;
  logic signed [7:0] coef;
  int checks = 0, failures = 0;
  int c [NT];

  fir_coef_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      int s;
      real re, im, mag;
      s = 0;
      for (int k = 0; k < NT; k++) begin
        @(negedge clk); bank = 6'(b); tap = 6'(k);
        @(negedge clk);
        c[k] = coef;
        s += c[k];
        checks++;
        if (coef !== 8'(lp_coef(b, k, NB, NT))) begin
          failures++;
          $display("FAIL bank %0d tap %0d: %0d expected %0d", b, k, coef, lp_coef(b, k, NB, NT));
        end
      end
      for (int k = 0; k < NT / 2; k++) begin
        checks++;
        if (c[k] != c[NT-1-k]) begin failures++; $display("FAIL bank %0d not symmetric at %0d", b, k); end
      end
      checks++;
      if (s < 110 || s > 146) begin failures++; $display("FAIL bank %0d DC gain %0d/128", b, s); end
      // response at 0.45 fs for the lower half of the banks (cutoff <= 0.25 fs)
      if (b < 32) begin
        re = 0.0; im = 0.0;
        for (int k = 0; k < NT; k++) begin
          re += c[k] * $cos(2.0 * PI * 0.45 * k);
          im -= c[k] * $sin(2.0 * PI * 0.45 * k);
        end
        mag = (re * re + im * im) ** 0.5 / 128.0;
        checks++;
        if (mag > 0.05) begin failures++; $display("FAIL bank %0d passes 0.45 fs at %f", b, mag); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
