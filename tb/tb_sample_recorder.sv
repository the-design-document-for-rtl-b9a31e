// tb_sample_recorder: feeds input samples at random intervals and checks
// that a recording writes them, in order, to words 0..length-1 of the
// chosen memory, one write per input and none before start or after the
// end. Also checks length clamping (0 -> 1 word, beyond DEPTH -> DEPTH
// words), a restart during a recording, and the busy flag.
module tb_sample_recorder;
  localparam int DEPTH = 100;
  logic clk = 0, rst_n = 0;
  logic start = 0, bank = 0, in_valid = 0;
  logic [6:0] length = 0;
  logic signed [15:0] in_sample = 0;
  logic [1:0] we;
  logic [6:0] waddr;
  logic [15:0] wdata;
  logic busy;
  int checks = 0, failures = 0;
  logic [15:0] sent [$];
  int exp_addr, exp_bank, writes;

  sample_recorder #(.DEPTH(DEPTH), .AW(7)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // every write must be the next expected word
  always @(negedge clk) if (rst_n && we != 0) begin
    writes++;
    checks++;
    if (we !== (exp_bank ? 2'b10 : 2'b01) || waddr !== 7'(exp_addr) || sent.size() == 0 || wdata !== sent[0]) begin
      failures++;
      if (failures < 10) $display("FAIL write we=%b addr=%0d data=%h, expected bank %0d addr %0d", we, waddr, wdata, exp_bank, exp_addr);
    end
    if (sent.size() != 0) void'(sent.pop_front());
    exp_addr++;
  end

  task automatic feed(input bit expect_write);
    @(negedge clk);
    in_sample = 16'($urandom); in_valid = 1;
    if (expect_write) sent.push_back(in_sample);
    @(negedge clk);
    in_valid = 0;
    repeat ($urandom % 4) @(negedge clk);
  endtask

  task automatic record(input int len, input bit b, input int words);
    @(negedge clk);
    start = 1; bank = b; length = 7'(len);
    @(negedge clk);
    start = 0;
    exp_addr = 0; exp_bank = b; writes = 0;
    checks++; if (!busy) begin failures++; $display("FAIL not busy after start"); end
    for (int i = 0; i < words; i++) feed(1);
    @(negedge clk);
    checks++; if (busy || writes != words) begin failures++; $display("FAIL length %0d: %0d writes, busy %b", len, writes, busy); end
    // inputs after the end are not written
    for (int i = 0; i < 3; i++) feed(0);
    checks++; if (writes != words) begin failures++; $display("FAIL write after the end"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3; i++) feed(0);        // idle: no writes
    checks++; if (writes != 0) begin failures++; $display("FAIL write while idle"); end
    record(10, 0, 10);
    record(37, 1, 37);
    record(0, 1, 1);                            // clamped up to one word
    record(127, 0, DEPTH);                      // clamped down to DEPTH
    // a second start in the middle begins again at word 0
    @(negedge clk); start = 1; bank = 1; length = 20; @(negedge clk); start = 0;
    exp_addr = 0; exp_bank = 1; writes = 0;
    for (int i = 0; i < 5; i++) feed(1);
    @(negedge clk); start = 1; bank = 0; length = 8; @(negedge clk); start = 0;
    exp_addr = 0; exp_bank = 0; writes = 0;
    for (int i = 0; i < 8; i++) feed(1);
    @(negedge clk);
    checks++; if (busy || writes != 8) begin failures++; $display("FAIL restart: %0d writes", writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
