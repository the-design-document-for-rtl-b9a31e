// sample_recorder: records line-in audio into one of the sample memories.
//
// A `start` pulse arms the recorder for the memory chosen by `bank` (0:
// sample 1, 1: sample 2) and a length in words. From then on every input
// sample (one per frame, from the codec ADC) is written to the next word
// of that memory, from word 0 up to word length-1. After that the recorder
// returns to idle. The length is clamped to 1..DEPTH. While `busy` is high
// the recorder owns the memories' write port. A start during a recording
// begins again at word 0.
//
// Interface: we[1:0] selects the memory, with waddr and wdata; the write
// happens in the clock after in_valid. Recording into the sample memory
// from line-in follows the design (listed there as a tentative feature);
// the start/length control and the one-word-per-frame rate are this
// design's choice.
module sample_recorder #(
  parameter int unsigned DEPTH = 48000,
  parameter int unsigned AW    = 16,
  parameter int unsigned W     = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                bank,
  input  logic [AW-1:0]       length,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_sample,
  output logic [1:0]          we,
  output logic [AW-1:0]       waddr,
  output logic [W-1:0]        wdata,
  output logic                busy
);

  logic          bank_q;
  logic [AW-1:0] last;       // index of the final word
  logic [AW-1:0] next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      bank_q <= 1'b0;
      last   <= '0;
      next   <= '0;
      we     <= '0;
      waddr  <= '0;
      wdata  <= '0;
    end else begin
      we <= '0;
      if (start) begin
        busy   <= 1'b1;
        bank_q <= bank;
        next   <= '0;
        if (length == '0)             last <= '0;
        else if (32'(length) > DEPTH) last <= AW'(DEPTH - 1);
        else                          last <= length - 1'b1;
      end else if (busy && in_valid) begin
        we     <= bank_q ? 2'b10 : 2'b01;
        waddr  <= next;
        wdata  <= in_sample;
        next   <= next + 1'b1;
        if (next == last) busy <= 1'b0;
      end
    end
  end

endmodule
