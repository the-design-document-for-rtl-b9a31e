// fir_coef_rom: the coefficient banks of the low-pass filter.
//
// NBANKS banks of NTAPS signed CW-bit coefficients (64 x 36 x 8 bits by
// default), one bank per cutoff step of the filter. Bank b is a low-pass
// with cutoff fc = (b+1)/(2*NBANKS) of the sample rate, i.e. 375 Hz steps at
// 48 kHz, from 375 Hz up to the Nyquist frequency. Coefficients are a
// Hamming-windowed sinc,
//   h[k] = 2fc * sinc(2fc * (k - (NTAPS-1)/2)) * (0.54 - 0.46 cos(2 pi k/(NTAPS-1))),
// scaled so that each bank sums to 2^(CW-1) (unity DC gain with CW-1
// fraction bits), rounded and clamped to the CW-bit range. The table is
// computed at elaboration; no data file is read. The bank count, tap count
// and width are the design's; the coefficient design and the cutoff spacing
// are this design's choice.
//
// Timing: synchronous read, coef is valid one clock after bank/tap.
module fir_coef_rom #(
  parameter int unsigned NBANKS = 64,
  parameter int unsigned NTAPS  = 36,
  parameter int unsigned CW     = 8,
  parameter int unsigned BW     = $clog2(NBANKS),
  parameter int unsigned TW     = $clog2(NTAPS)
) (
  input  logic                 clk,
  input  logic [BW-1:0]        bank,
  input  logic [TW-1:0]        tap,
  output logic signed [CW-1:0] coef
);

  localparam int unsigned N = NBANKS * NTAPS;
  localparam real PI = 3.14159265358979323846;

  function automatic logic [NTAPS*CW-1:0] bank_coefs(input int b);
    logic [NTAPS*CW-1:0] r;
    real h [NTAPS];
    real fc, m, x, sum, v;
    int  q;
    fc  = real'(b + 1) / real'(2 * NBANKS);
    sum = 0.0;
    for (int k = 0; k < NTAPS; k++) begin
      m = real'(k) - real'(NTAPS - 1) / 2.0;
      x = 2.0 * fc * m;
      h[k] = (x == 0.0) ? 2.0 * fc : 2.0 * fc * $sin(PI * x) / (PI * x);
      h[k] = h[k] * (0.54 - 0.46 * $cos(2.0 * PI * real'(k) / real'(NTAPS - 1)));
      sum = sum + h[k];
    end
    for (int k = 0; k < NTAPS; k++) begin
      v = h[k] * real'(2 ** (CW - 1)) / sum;
      q = $rtoi(v >= 0.0 ? v + 0.5 : v - 0.5);
      if (q > 2 ** (CW - 1) - 1) q = 2 ** (CW - 1) - 1;
      if (q < -(2 ** (CW - 1))) q = -(2 ** (CW - 1));
      r[k*CW +: CW] = CW'(q);
    end
    return r;
  endfunction

  function automatic logic [N*CW-1:0] all_coefs();
    logic [N*CW-1:0] r;
    for (int b = 0; b < NBANKS; b++) r[b*NTAPS*CW +: NTAPS*CW] = bank_coefs(b);
    return r;
  endfunction

  localparam logic [N*CW-1:0] TABLE = all_coefs();

  logic [CW-1:0] rom [N];

  initial begin
    for (int i = 0; i < N; i++) rom[i] = TABLE[i*CW +: CW];
  end

  always_ff @(posedge clk) coef <= rom[32'(bank) * NTAPS + 32'(tap)];

endmodule
