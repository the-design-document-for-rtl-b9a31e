// tb_note_receiver: Avalon-MM register writes and reads (with the one
// clock of waitrequest on reads), note clamping, the note-on trigger
// pulse, the record command (start pulse, memory choice, busy read back),
// and forwarding of sample-region writes to the two memories.
module tb_note_receiver;
  import audio_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [17:0] avs_address = 0;
  logic avs_write = 0, avs_read = 0, avs_waitrequest;
  logic [15:0] avs_writedata = 0, avs_readdata;
  logic [5:0] note;
  logic note_on, trigger;
  ctrl_t ctrl;
  logic [1:0] ram_we;
  logic [15:0] ram_waddr, ram_wdata;
  logic rec_start, rec_bank, rec_busy = 0;
  int checks = 0, failures = 0, waits = 0, triggers = 0, rec_starts = 0;
  logic last_rec_bank;

  note_receiver dut (.*);

  always #5 clk = ~clk;
  always @(negedge clk) if (trigger) triggers++;
  always @(negedge clk) if (rec_start) begin rec_starts++; last_rec_bank = rec_bank; end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input logic [17:0] a, input logic [15:0] d);
    @(negedge clk); avs_address = a; avs_writedata = d; avs_write = 1;
    #1;
    chk(!avs_waitrequest, "waitrequest on write");
    if (a[17:16] == 2'd1) chk(ram_we == 2'b01 && ram_waddr == a[15:0] && ram_wdata == d, "sample 1 write forwarded");
    else if (a[17:16] == 2'd2) chk(ram_we == 2'b10 && ram_waddr == a[15:0] && ram_wdata == d, "sample 2 write forwarded");
    else chk(ram_we == 2'b00, "no memory write for registers");
    @(negedge clk); avs_write = 0;
    @(negedge clk); #1;
  endtask

  task automatic rd(input logic [17:0] a, output logic [15:0] d);
    int n;
    @(negedge clk); avs_address = a; avs_read = 1;
    n = 0;
    #1;
    while (avs_waitrequest) begin @(negedge clk); n++; #1; end
    if (n > 0) waits++;
    chk(n == 1, "read takes one wait clock");
    d = avs_readdata;
    @(negedge clk); avs_read = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!note_on && ctrl.len1 == 16'd48000 && ctrl.clip_drive == 8'd16, "reset values");
    // note on, 30
    wr(18'h00000, 16'h011E);
    chk(note == 6'd30 && note_on, "note 30 on");
    chk(triggers == 1, $sformatf("one trigger pulse (%0d)", triggers));
    rd(18'h00000, d); chk(d == 16'h011E, "read NOTE");
    // note above 48 clamps
    wr(18'h00000, 16'h013F);
    chk(note == 6'd48, "note clamped to 48");
    chk(triggers == 2, "second trigger");
    // note off: no trigger
    wr(18'h00000, 16'h0010);
    chk(!note_on && note == 6'd16 && triggers == 2, "note off");
    // other registers
    wr(18'h00001, 16'd1234); wr(18'h00002, 16'd777); wr(18'h00003, 16'h0001);
    wr(18'h00004, 16'h0020); wr(18'h00005, 16'd4800); wr(18'h00006, 16'h00C0); wr(18'h00007, 16'h0080);
    chk(ctrl.len1 == 16'd1234 && ctrl.len2 == 16'd777 && ctrl.reverse && ctrl.clip_drive == 8'h20
        && ctrl.delay == 16'd4800 && ctrl.feedback == 8'hC0 && ctrl.mix == 8'h80, "control registers");
    rd(18'h00001, d); chk(d == 16'd1234, "read LEN1");
    rd(18'h00002, d); chk(d == 16'd777, "read LEN2");
    rd(18'h00003, d); chk(d == 16'd1, "read REVERSE");
    rd(18'h00004, d); chk(d == 16'h20, "read CLIPDRV");
    rd(18'h00005, d); chk(d == 16'd4800, "read DELAY");
    rd(18'h00006, d); chk(d == 16'hC0, "read FEEDBACK");
    rd(18'h00007, d); chk(d == 16'h80, "read MIX");
    rd(18'h10005, d); chk(d == 16'd0, "sample region reads 0");
    // record command
    chk(rec_starts == 0, "no record start from other registers");
    wr(18'h00008, 16'h0001);
    chk(rec_starts == 1 && last_rec_bank == 1'b1, "record into sample 2");
    wr(18'h00008, 16'h0000);
    chk(rec_starts == 2 && last_rec_bank == 1'b0, "record into sample 1");
    rd(18'h00008, d); chk(d == 16'd0, "read RECORD idle");
    rec_busy = 1;
    rd(18'h00008, d); chk(d == 16'd1, "read RECORD busy");
    rec_busy = 0;
    rd(18'h00009, d); chk(d == 16'd0, "unused register reads 0");
    // sample loading
    for (int i = 0; i < 20; i++) wr({2'd1, 16'(i * 101)}, 16'($urandom));
    for (int i = 0; i < 20; i++) wr({2'd2, 16'(47999 - i)}, 16'($urandom));
    wr({2'd3, 16'd5}, 16'h5555);
    chk(waits > 0, "waitrequest exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
