// wm8731_model: behavioural model of the codec's digital side, for tests.
//
// Serial audio receiver: left-justified, MSB first, sampled on rising BCLK,
// DACLRCK high = left. Each complete 16-bit word is stored in `left` or
// `right`; `frames` counts completed left words.
// I2C slave: recognises START/STOP, collects bytes, acknowledges every byte
// (unless `nack` is set) by pulling SDA low during the ninth clock, and
// records each {address 0x34, word} write in regs[] and in a log.
// Serial audio transmitter (ADC side, line-in): at every rising edge of
// ADCLRCK it starts a new random left word, and at every falling edge the
// bitwise inverse as the right word. Both go out MSB first, left-justified,
// changing just after falling BCLK edges. Left words are logged in
// adc_log[] and counted in adc_n.
module wm8731_model (
  input  logic bclk,
  input  logic daclrck,
  input  logic dacdat,
  input  logic adclrck,
  output logic adcdat,
  input  logic scl,
  input  logic sda,
  input  logic nack,
  output logic sda_pull
);

  logic signed [15:0] left, right;
  int unsigned        frames;
  logic [15:0]        shift;
  int                 nbits;
  logic               lr_prev;

  logic [8:0]  regs [128];
  logic [15:0] log_words [64];
  int unsigned nwrites;
  int unsigned bad_addr;

  logic [7:0]  byte_sh;
  int          bitn;
  int          bytes_in;
  logic [7:0]  bytes [3];
  logic        in_xfer;

  logic [15:0] adc_log [4096];
  int unsigned adc_n;
  logic [15:0] adc_tx;
  logic        adc_lr_prev;

  initial begin
    left = '0; right = '0; frames = 0; shift = '0; nbits = 16; lr_prev = 1'b0;
    nwrites = 0; bad_addr = 0; sda_pull = 1'b0; bitn = 0; bytes_in = 0; in_xfer = 1'b0;
    byte_sh = '0;
    adc_n = 0; adc_tx = '0; adc_lr_prev = 1'b0; adcdat = 1'b0;
    for (int i = 0; i < 128; i++) regs[i] = '0;
  end

  // ---------------- serial audio ----------------
  always @(posedge bclk) begin
    if (daclrck != lr_prev) nbits = 0;
    lr_prev = daclrck;
    if (nbits < 16) begin
      shift = {shift[14:0], dacdat};
      nbits++;
      if (nbits == 16) begin
        if (daclrck) begin left = shift; frames++; end
        else right = shift;
      end
    end
  end

  // ---------------- ADC output ----------------
  always @(negedge bclk) begin
    #1;
    if (adclrck && !adc_lr_prev) begin
      adc_tx = 16'($urandom);
      adc_log[adc_n % 4096] = adc_tx;
      adc_n++;
    end else if (!adclrck && adc_lr_prev) begin
      adc_tx = ~adc_log[(adc_n - 1) % 4096];
    end else begin
      adc_tx = {adc_tx[14:0], 1'b0};
    end
    adc_lr_prev = adclrck;
    adcdat = adc_tx[15];
  end

  // ---------------- I2C ----------------
  always @(negedge sda) if (scl) begin
    in_xfer = 1'b1; bitn = 0; bytes_in = 0;
  end
  always @(posedge sda) if (scl && in_xfer) begin
    in_xfer = 1'b0;
    if (bytes_in == 3) begin
      if (bytes[0] != 8'h34) bad_addr++;
      regs[bytes[1][7:1]] = {bytes[1][0], bytes[2]};
      if (nwrites < 64) log_words[nwrites] = {bytes[1], bytes[2]};
      nwrites++;
    end
  end
  always @(posedge scl) if (in_xfer) begin
    if (bitn < 8) byte_sh = {byte_sh[6:0], sda};
    bitn++;
  end
  always @(negedge scl) if (in_xfer) begin
    if (bitn == 8) begin
      if (bytes_in < 3) bytes[bytes_in] = byte_sh;
      bytes_in++;
      sda_pull = !nack;
    end else if (bitn == 9) begin
      sda_pull = 1'b0;
      bitn = 0;
    end
  end

endmodule
