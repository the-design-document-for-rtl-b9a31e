// tb_sample_ram: writes a pattern over the whole memory and reads it back
// with the one-clock read latency; writes beyond DEPTH must be ignored.
module tb_sample_ram;
  localparam int DEPTH = 48000;
  logic clk = 0, we = 0;
  logic [15:0] waddr = 0, wdata = 0, raddr = 0, rdata;
  int checks = 0, failures = 0;

  sample_ram dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] pat(int a, int seed);
    return 16'((a * 40503 + seed * 977 + 12345) & 16'hFFFF);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 16'(a); wdata = pat(a, 1);
    end
    // out-of-range writes alias onto nothing
    for (int a = DEPTH; a < 65536; a += 97) begin
      @(negedge clk); we = 1; waddr = 16'(a); wdata = 16'hDEAD;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 16'(a);
      @(negedge clk);
      checks++;
      if (rdata !== pat(a, 1)) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d read %h expected %h", a, rdata, pat(a, 1));
      end
    end
    // simultaneous write and read of different words
    @(negedge clk); we = 1; waddr = 16'd5; wdata = 16'h1234; raddr = 16'd6;
    @(negedge clk); we = 0; checks++;
    if (rdata !== pat(6, 1)) begin failures++; $display("FAIL read during write"); end
    raddr = 16'd5;
    @(negedge clk); checks++;
    if (rdata !== 16'h1234) begin failures++; $display("FAIL rewritten word"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
