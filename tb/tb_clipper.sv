// tb_clipper: checks y = clamp(floor(x*drive/16)) and the one-clock latency.
module tb_clipper;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [15:0] x, y;
  logic [7:0] drive;
  int checks = 0, failures = 0, clipped = 0;

  clipper dut (.*);

  always #5 clk = ~clk;

  task automatic run(input int xi, input int d);
    int exp;
    longint raw;
    @(negedge clk);
    x = 16'(xi); drive = 8'(d); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    raw = scale_floor(xi, d, 16);
    exp = sat(raw);
    if (raw != exp) clipped++;
    checks++;
    if (!out_valid || y !== 16'(exp)) begin
      failures++;
      $display("FAIL x=%0d drive=%0d y=%0d exp=%0d", xi, d, y, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0; drive = 16;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(32000, 32);     // doubled: saturates at 32767
    run(-32000, 32);    // and at -32768
    run(12345, 16);     // unity drive passes unchanged
    run(-12345, 16);
    run(32767, 255);
    for (int i = 0; i < 2000; i++) run($signed(16'($urandom)), int'($urandom % 256));
    checks++;
    if (clipped == 0) begin failures++; $display("FAIL saturation never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
