// delay_effect: digital echo with feedback.
//
// The input is recorded into a circular buffer of DEPTH samples (one
// second at 48 kHz by default) and read back `delay_samples` samples later.
// Part of the delayed signal is fed back into the buffer together with the
// new input, so an echo repeats and decays; the delayed ("wet") signal is
// scaled and added to the unmodified ("dry") input:
//   d      = buf[wp - delay]
//   buf[wp] = sat(x + d * feedback / 256)
//   y      = sat(x + d * mix / 256)
// Saturation acts as the limiter that keeps a high feedback setting from
// growing without bound. delay_samples is clamped to 1..DEPTH-1.
// After reset the buffer is cleared in the background, one word per free
// clock; until that finishes the wet signal is forced to zero so no stale
// memory is heard. Recording, recall, feedback and dry/wet mixing follow
// the design; the formulas, the fixed-point gains and the clearing are
// this design's choice.
//
// Timing: one sample is processed at a time. in_valid is taken only while
// busy is low; out_valid and y appear 3 clocks after in_valid.
module delay_effect
  import audio_pkg::*;
#(
  parameter int unsigned DEPTH = 48000,
  parameter int unsigned AW    = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [15:0]  x,
  input  logic [15:0]         delay_samples,
  input  logic [7:0]          feedback,
  input  logic [7:0]          mix,
  output logic                out_valid,
  output logic signed [15:0]  y,
  output logic                busy
);

  typedef enum logic [1:0] {S_IDLE, S_READ, S_CALC} state_e;

  state_e             state;
  logic [AW-1:0]      wp;          // next write position
  logic [AW-1:0]      rp;          // read position of the delayed sample
  logic [AW-1:0]      clr_addr;
  logic               cleared;
  logic signed [15:0] x_q;
  logic [7:0]         fb_q, mix_q;
  logic [AW-1:0]      d_lim;
  logic [15:0]        rdata;
  logic signed [15:0] wet;
  logic               ram_we;
  logic [AW-1:0]      ram_waddr;
  logic [15:0]        ram_wdata;
  logic signed [25:0] fb_prod, mix_prod;
  logic signed [15:0] buf_in;

  sample_ram #(.DEPTH(DEPTH), .WIDTH(16), .AW(AW)) u_buf (
    .clk   (clk),
    .we    (ram_we),
    .waddr (ram_waddr),
    .wdata (ram_wdata),
    .raddr (rp),
    .rdata (rdata)
  );

  always_comb begin
    if (delay_samples == 16'd0)               d_lim = AW'(1);
    else if (32'(delay_samples) >= DEPTH)     d_lim = AW'(DEPTH - 1);
    else                                      d_lim = AW'(delay_samples);
  end

  assign wet      = cleared ? $signed(rdata) : 16'sd0;
  assign fb_prod  = wet * $signed({1'b0, fb_q});
  assign mix_prod = wet * $signed({1'b0, mix_q});
  assign buf_in   = sat16(32'(x_q) + 32'(fb_prod >>> 8));

  // The write port serves the sample being processed first, otherwise
  // the background clearing.
  always_comb begin
    if (state == S_CALC) begin
      ram_we    = 1'b1;
      ram_waddr = wp;
      ram_wdata = buf_in;
    end else begin
      ram_we    = !cleared;
      ram_waddr = clr_addr;
      ram_wdata = '0;
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      wp        <= '0;
      rp        <= '0;
      clr_addr  <= '0;
      cleared   <= 1'b0;
      x_q       <= '0;
      fb_q      <= '0;
      mix_q     <= '0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!cleared && state != S_CALC) begin
        if (32'(clr_addr) == DEPTH - 1) cleared <= 1'b1;
        else                            clr_addr <= clr_addr + 1'b1;
      end
      unique case (state)
        S_IDLE: if (in_valid) begin
          x_q   <= x;
          fb_q  <= feedback;
          mix_q <= mix;
          rp    <= (wp >= d_lim) ? wp - d_lim : AW'(32'(wp) + DEPTH - 32'(d_lim));
          state <= S_READ;
        end
        S_READ: state <= S_CALC;
        S_CALC: begin
          y         <= sat16(32'(x_q) + 32'(mix_prod >>> 8));
          out_valid <= 1'b1;
          wp        <= (32'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
