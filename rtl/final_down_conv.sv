// final_down_conv: final down-converter of a channel.
//
// Removes the residual carrier (Doppler) from the selected input by mixing it
// with the conjugate of the local carrier replica:
//   I_bb = I*cos + Q*sin,   Q_bb = Q*cos - I*sin.
// The mixing follows the receiver; the complex-multiplier form and the result
// width (5-bit signed, |value| <= 14) are this design's choices.
//
// Timing: one register stage; i_o/q_o are the mix of the inputs of the
// previous clock.
module final_down_conv
  import gnss_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_ni,
  input  iq_sample_t        iq_i,
  input  logic signed [1:0] cos_i,
  input  logic signed [1:0] sin_i,
  output logic signed [4:0] i_o,
  output logic signed [4:0] q_o
);
  logic signed [4:0] i_lvl, q_lvl, i_mix, q_mix;

  always_comb begin
    i_lvl = 5'(iq_level(iq_i.i));
    q_lvl = 5'(iq_level(iq_i.q));
    i_mix = i_lvl * 5'(cos_i) + q_lvl * 5'(sin_i);
    q_mix = q_lvl * 5'(cos_i) - i_lvl * 5'(sin_i);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      i_o <= '0;
      q_o <= '0;
    end else begin
      i_o <= i_mix;
      q_o <= q_mix;
    end
  end
endmodule
