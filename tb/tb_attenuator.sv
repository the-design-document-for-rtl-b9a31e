// tb_attenuator: checks y = floor(x * gain / 256) for corner and random values.
module tb_attenuator;
  import tb_ref_pkg::*;
  logic signed [15:0] x, y;
  logic [7:0] gain;
  int checks = 0, failures = 0;

  attenuator dut (.x, .gain, .y);

  task automatic check(input int xi, input int g);
    longint exp;
    x = 16'(xi); gain = 8'(g);
    #1;
    exp = scale_floor(xi, g, 256);
    checks++;
    if (y !== 16'(exp)) begin
      failures++;
      $display("FAIL x=%0d gain=%0d y=%0d exp=%0d", xi, g, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32767, 255); check(-32768, 255); check(1000, 0); check(-1, 1);
    check(256, 128); check(-32768, 128); check(12345, 191);
    for (int i = 0; i < 2000; i++) check($signed(16'($urandom)), int'($urandom % 256));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
