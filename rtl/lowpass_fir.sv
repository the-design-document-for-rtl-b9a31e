// lowpass_fir: 36-tap low-pass FIR filter with 64 selectable cutoffs.
//
// Computes y[n] = sum_k h_b[k] * x[n-k], the direct-form FIR structure: a
// delay line of the last NTAPS input samples, one multiplier per tap and an
// adder chain. Here the taps are evaluated serially with a single
// multiplier: after a sample is accepted, one coefficient is read from the
// bank ROM and one product accumulated per clock. The coefficient bank
// (cutoff step) is taken from `bank` when the sample is accepted, so the
// cutoff can change between samples but never within one. The result is
// shifted right by CW-1 (coefficients have CW-1 fraction bits) and
// saturated to 16 bits.
//
// Both sides are Avalon-ST with ready latency 0: a beat moves on a clock
// edge where valid and ready are both high. ast_sink_ready is high only
// while the filter is idle; ast_source_valid stays high, with the data
// held, until ast_source_ready is seen. The 2-bit Avalon-ST error code
// (00 none, 01 missing start of packet, 10 missing end of packet, 11 other)
// given with an input beat is carried through and presented with that
// beat's result; the filter itself raises no errors, since a single
// channel without packets cannot break the packet rules. Channel and
// start/end-of-packet signals are left out (one channel, no packets). The
// filter function, the tap and bank counts, the Avalon-ST handshake and
// the error signal follow the design; the serial architecture, the
// rounding and passing the error through are this design's choice.
//
// Timing: ast_source_valid is high NTAPS+2 cycles after the cycle in which
// a sample is accepted (38 with 36 taps); a new sample can be accepted in
// the cycle after the result is taken, i.e. at most one sample every
// NTAPS+3 cycles.
module lowpass_fir
  import audio_pkg::*;
#(
  parameter int unsigned NTAPS  = 36,
  parameter int unsigned NBANKS = 64,
  parameter int unsigned CW     = 8,
  parameter int unsigned W      = 16,
  parameter int unsigned BW     = $clog2(NBANKS),
  parameter int unsigned TW     = $clog2(NTAPS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [BW-1:0]       bank,
  input  logic signed [W-1:0] ast_sink_data,
  input  logic                ast_sink_valid,
  output logic                ast_sink_ready,
  input  logic [1:0]          ast_sink_error,
  output logic signed [W-1:0] ast_source_data,
  output logic                ast_source_valid,
  output logic [1:0]          ast_source_error,
  input  logic                ast_source_ready
);

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_OUT} state_e;

  state_e              state;
  logic signed [W-1:0] x_hist [NTAPS];
  logic [BW-1:0]       bank_q;
  logic [TW-1:0]       tap;       // tap whose coefficient is being read
  logic                issuing;   // taps still to be read
  logic [TW-1:0]       tap_d;     // tap whose coefficient is at coef
  logic                mac_v;     // coef holds a coefficient to accumulate
  logic signed [CW-1:0] coef;
  logic signed [31:0]  acc;
  logic signed [31:0]  acc_next;

  fir_coef_rom #(.NBANKS(NBANKS), .NTAPS(NTAPS), .CW(CW), .BW(BW), .TW(TW)) u_rom (
    .clk  (clk),
    .bank (bank_q),
    .tap  (tap),
    .coef (coef)
  );

  assign ast_sink_ready = (state == S_IDLE);
  assign acc_next       = acc + 32'(x_hist[tap_d] * coef);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      bank_q           <= '0;
      tap              <= '0;
      issuing          <= 1'b0;
      tap_d            <= '0;
      mac_v            <= 1'b0;
      acc              <= '0;
      ast_source_data  <= '0;
      ast_source_valid <= 1'b0;
      ast_source_error <= '0;
      for (int i = 0; i < NTAPS; i++) x_hist[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (ast_sink_valid) begin
            x_hist[0] <= ast_sink_data;
            for (int i = 1; i < NTAPS; i++) x_hist[i] <= x_hist[i-1];
            bank_q  <= bank;
            // the previous result has been taken, so the error output is free
            ast_source_error <= ast_sink_error;
            tap     <= '0;
            issuing <= 1'b1;
            acc     <= '0;
            state   <= S_MAC;
          end
        end
        S_MAC: begin
          mac_v <= issuing;
          tap_d <= tap;
          if (issuing) begin
            if (32'(tap) == NTAPS - 1) issuing <= 1'b0;
            else                       tap <= tap + 1'b1;
          end
          if (mac_v) begin
            acc <= acc_next;
            if (32'(tap_d) == NTAPS - 1) begin
              mac_v            <= 1'b0;
              ast_source_data  <= W'(sat16(acc_next >>> (CW - 1)));
              ast_source_valid <= 1'b1;
              state            <= S_OUT;
            end
          end
        end
        S_OUT: begin
          if (ast_source_ready) begin
            ast_source_valid <= 1'b0;
            state            <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Avalon-ST source rule: a presented beat is held until it is taken.
  a_source_hold: assert property (@(posedge clk) disable iff (!rst_n)
      ast_source_valid && !ast_source_ready |=> ast_source_valid && $stable(ast_source_data) && $stable(ast_source_error));

endmodule
