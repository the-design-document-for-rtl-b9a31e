// mixer: summer for the two sample voices with level normalisation.
//
// Each voice passes through its own attenuator before the two are added.
// The attenuator gains come from the two level potentiometers (8-bit ADC
// values, 255 = full scale). As long as pot1 + pot2 stays at or below full
// scale the gains are the pot values themselves; when the two together ask
// for more than full scale, both are multiplied by 255 / (pot1 + pot2), so
// that the mix keeps the balance that was set but the total gain never
// exceeds one (two pots at 0.75 each give 0.5 + 0.5). The sum is saturated
// to 16 bits. The normalisation rule follows the design's own example; the
// fixed-point formats and the single register stage are this design's
// choice.
//
// Timing: out_valid and mix follow in_valid by one clock.
module mixer
  import audio_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] s1,
  input  logic signed [W-1:0] s2,
  input  logic        [7:0]   pot1,
  input  logic        [7:0]   pot2,
  output logic                out_valid,
  output logic signed [W-1:0] mix
);

  logic [8:0]  pot_sum;
  logic [7:0]  g1, g2;
  logic signed [W-1:0] a1, a2;
  logic signed [W+1:0] sum;

  // Gain normalisation: g_i = pot_i * 255 / (pot1 + pot2) when the sum
  // exceeds full scale.
  always_comb begin
    pot_sum = {1'b0, pot1} + {1'b0, pot2};
    if (pot_sum <= 9'd255) begin
      g1 = pot1;
      g2 = pot2;
    end else begin
      g1 = 8'((17'(pot1) * 17'd255) / 17'(pot_sum));
      g2 = 8'((17'(pot2) * 17'd255) / 17'(pot_sum));
    end
  end

  attenuator #(.W(W)) u_att1 (.x(s1), .gain(g1), .y(a1));
  attenuator #(.W(W)) u_att2 (.x(s2), .gain(g2), .y(a2));

  assign sum = (W+2)'(a1) + (W+2)'(a2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mix       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) mix <= W'(sat16(32'(sum)));
    end
  end

endmodule
