// codec_i2c_config: writes the WM8731 codec's configuration over I2C.
//
// After reset the block sends NREGS register writes to the codec over the
// two-wire bus, one I2C transaction each: START, the device address byte
// 0x34 (address 0x1A, write), then the 16-bit control word {register[6:0],
// value[8:0]} as two bytes, each byte followed by an acknowledge clock,
// and STOP. The settings (codec data sheet values) are: reset, power all
// sections up, line input unmuted at 0 dB on both channels, analogue path
// with the DAC to the output and the line input to the ADC, digital path
// unmuted with the ADC high-pass filter on,
// left-justified 16-bit interface with the codec as clock slave, 48 kHz
// normal-mode sampling, and finally activate. A byte that is not
// acknowledged (SDAT high during the acknowledge clock) sets `error`; the
// sequence still runs to the end, after which `done` stays high.
//
// Each bit takes four quarter periods of QUARTER clocks (SCL about 99 kHz
// from 12.288 MHz with the default). SCL is driven push-pull; SDAT is open
// drain: sdat_oe = 1 pulls the line low, and sdat_in is the line's level.
// Configuring the codec over the two-wire bus follows the design; the
// register values come from the codec's data sheet.
module codec_i2c_config #(
  parameter int unsigned QUARTER = 31
) (
  input  logic clk,
  input  logic rst_n,
  output logic sclk,
  output logic sdat_oe,
  input  logic sdat_in,
  output logic done,
  output logic error
);

  localparam int unsigned NREGS = 8;
  localparam logic [7:0] DEV_ADDR = 8'h34;
  localparam logic [NREGS*16-1:0] REGS = {
    16'h1201,   // R9  active
    16'h1000,   // R8  sampling: normal mode, 48 kHz
    16'h0E01,   // R7  interface: left-justified, 16 bit, slave
    16'h0A00,   // R5  digital path: DAC soft mute off
    16'h0812,   // R4  analogue path: DAC selected, line in to ADC, mic muted
    16'h0117,   // R0  line in: both channels, 0 dB, unmuted
    16'h0C00,   // R6  power down: all sections on
    16'h1E00    // R15 reset
  };            // sent from the lowest entry upwards

  typedef enum logic [2:0] {S_WAIT, S_START, S_BIT, S_STOP, S_DONE} state_e;

  localparam int unsigned QW = $clog2(QUARTER + 1);

  state_e       state;
  logic [QW-1:0] qcnt;
  logic         qtick;
  logic [1:0]   q;        // quarter of the current symbol
  logic [2:0]   reg_i;
  logic [1:0]   byte_i;
  logic [3:0]   bit_i;    // 0..7 data, 8 acknowledge
  logic [23:0]  frame;
  logic         scl_c, oe_c, data_bit;

  assign qtick    = (32'(qcnt) == QUARTER - 1);
  assign frame    = {DEV_ADDR, REGS[reg_i*16 +: 16]};
  assign data_bit = frame[5'd23 - 5'({byte_i, 3'b000}) - 5'(bit_i)];

  always_comb begin
    scl_c = 1'b1;
    oe_c  = 1'b0;
    unique case (state)
      S_WAIT:  begin scl_c = 1'b1; oe_c = 1'b0; end
      S_START: begin scl_c = (q < 2'd2); oe_c = (q != 2'd0); end
      S_BIT:   begin
        scl_c = (q == 2'd1) || (q == 2'd2);
        oe_c  = (bit_i == 4'd8) ? 1'b0 : !data_bit;
      end
      S_STOP:  begin scl_c = (q != 2'd0); oe_c = (q < 2'd2); end
      S_DONE:  begin scl_c = 1'b1; oe_c = 1'b0; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_WAIT;
      qcnt    <= '0;
      q       <= '0;
      reg_i   <= '0;
      byte_i  <= '0;
      bit_i   <= '0;
      sclk    <= 1'b1;
      sdat_oe <= 1'b0;
      done    <= 1'b0;
      error   <= 1'b0;
    end else begin
      sclk    <= scl_c;
      sdat_oe <= oe_c;
      qcnt    <= qtick ? '0 : qcnt + 1'b1;
      if (qtick) begin
        q <= q + 1'b1;
        // acknowledge is sampled after SCL has been high for a quarter
        if (state == S_BIT && bit_i == 4'd8 && q == 2'd2 && sdat_in) error <= 1'b1;
        if (q == 2'd3) begin
          unique case (state)
            S_WAIT:  state <= S_START;
            S_START: begin state <= S_BIT; byte_i <= '0; bit_i <= '0; end
            S_BIT: begin
              if (bit_i != 4'd8) bit_i <= bit_i + 1'b1;
              else begin
                bit_i <= '0;
                if (byte_i == 2'd2) state <= S_STOP;
                else                byte_i <= byte_i + 1'b1;
              end
            end
            S_STOP: begin
              if (32'(reg_i) == NREGS - 1) state <= S_DONE;
              else begin
                reg_i <= reg_i + 1'b1;
                state <= S_WAIT;
              end
            end
            S_DONE: done <= 1'b1;
            default: state <= S_WAIT;
          endcase
        end
      end
    end
  end

endmodule
