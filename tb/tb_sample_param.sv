// tb_sample_param: checks the equal-temperament step for every note.
// Reference: step = 2^((note-24)/12) * 65536, notes above 48 clamped;
// allowed error is the rounding of the semitone table scaled by the octave.
module tb_sample_param;
  logic clk = 0, rst_n = 0;
  logic [5:0] note;
  logic [18:0] phase_inc;
  int checks = 0, failures = 0;

  sample_param dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    note = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 64; n++) begin
      real expf;
      int  nn, tol;
      longint got;
      note = 6'(n);
      @(negedge clk);
      nn   = (n > 48) ? 48 : n;
      expf = (2.0 ** ((real'(nn) - 24.0) / 12.0)) * 65536.0;
      tol  = (1 << (nn / 12));
      got  = phase_inc;
      checks++;
      if ((real'(got) - expf > real'(tol)) || (expf - real'(got) > real'(tol))) begin
        failures++;
        $display("FAIL note %0d step %0d expected %f", n, got, expf);
      end
    end
    // exact octave points
    note = 0;  @(negedge clk); checks++; if (phase_inc != 19'd16384)  begin failures++; $display("FAIL C2"); end
    note = 24; @(negedge clk); checks++; if (phase_inc != 19'd65536)  begin failures++; $display("FAIL C4"); end
    note = 36; @(negedge clk); checks++; if (phase_inc != 19'd131072) begin failures++; $display("FAIL C5"); end
    note = 48; @(negedge clk); checks++; if (phase_inc != 19'd262144) begin failures++; $display("FAIL C6"); end
    // one-cycle latency: output follows the note of the previous clock
    note = 12; @(posedge clk); #1; checks++;
    if (phase_inc != 19'd32768) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
