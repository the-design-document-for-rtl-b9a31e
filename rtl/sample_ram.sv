// sample_ram: embedded memory holding one audio sample.
//
// A simple dual-port RAM of DEPTH words of WIDTH bits: one write port, used
// by the host's memory-mapped agent to load the sample, and one read port
// used by the sample player. The read is synchronous: rdata shows the word
// at raddr one clock later. Writes at or beyond DEPTH are ignored. The
// contents are not reset. The default size, 48000 words of 16 bits (one
// second of 48 kHz audio), is the sample bank size of the design; the
// one-cycle read and the port structure are this implementation's choice.
module sample_ram #(
  parameter int unsigned DEPTH = 48000,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = 16
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
    rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end

endmodule
