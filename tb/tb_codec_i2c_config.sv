// tb_codec_i2c_config: lets the configuration master run against the codec
// model's I2C slave and checks the eight register writes, their order and
// values, the device address, and that a missing acknowledge sets error.
module tb_codec_i2c_config;
  logic clk = 0, rst_n = 0;
  logic sclk, sdat_oe, sdat_in, done, error;
  logic sda_pull, nack = 0;
  wire  sda = !(sdat_oe || sda_pull);
  int checks = 0, failures = 0;
  logic [15:0] expected [8] = '{16'h1E00, 16'h0C00, 16'h0117, 16'h0812, 16'h0A00, 16'h0E01, 16'h1000, 16'h1201};

  assign sdat_in = sda;

  codec_i2c_config #(.QUARTER(4)) dut (.*);
  wm8731_model codec (.bclk(1'b0), .daclrck(1'b0), .dacdat(1'b0), .adclrck(1'b0), .adcdat(),
                      .scl(sclk), .sda, .nack, .sda_pull);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done);
    repeat (20) @(negedge clk);
    checks++; if (error) begin failures++; $display("FAIL error with acknowledging codec"); end
    checks++; if (codec.nwrites != 8) begin failures++; $display("FAIL %0d writes", codec.nwrites); end
    checks++; if (codec.bad_addr != 0) begin failures++; $display("FAIL wrong device address"); end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (codec.log_words[i] !== expected[i]) begin
        failures++; $display("FAIL write %0d: %h expected %h", i, codec.log_words[i], expected[i]);
      end
    end
    checks++; if (codec.regs[7] !== 9'h001 || codec.regs[9] !== 9'h001 || codec.regs[4] !== 9'h012) begin
      failures++; $display("FAIL register contents");
    end
    // second run: the codec does not acknowledge
    nack = 1;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++; if (done || error) begin failures++; $display("FAIL done/error not reset"); end
    wait (done);
    checks++; if (!error) begin failures++; $display("FAIL missing acknowledge not detected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
