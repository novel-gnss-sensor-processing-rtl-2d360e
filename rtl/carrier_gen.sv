// carrier_gen: carrier NCO producing the local carrier replica of a channel.
//
// Software sets the carrier frequency as an NCO increment (part of the carrier
// tracking loop); the NCO is a 32-bit phase accumulator advanced once per
// sample, so the replica frequency is freq_i / 2^32 times the sample rate.
// The replica is read from the three most significant phase bits through an
// eight-entry table of cos and sin rounded to -1, 0 or +1 (cos 0, 45, 90 ...
// degrees). That a programmable NCO generates the carrier follows the
// receiver; the accumulator width and the three-level eight-phase table are
// this design's choices. At zero frequency and zero phase the replica is
// cos = +1, sin = 0, so the down-converter passes the input unchanged.
//
// Timing: cos_o/sin_o show the replica for the current phase_o and are both
// registered; phase_o advances by freq_i each clock while enable_i is high and
// returns to 0 while it is low.
module carrier_gen (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              enable_i,
  input  logic [31:0]       freq_i,
  output logic [31:0]       phase_o,
  output logic signed [1:0] cos_o,
  output logic signed [1:0] sin_o
);
  logic [31:0] phase_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)        phase_q <= '0;
    else if (!enable_i) phase_q <= '0;
    else                phase_q <= phase_q + freq_i;
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cos_o <= 2'sd1;
      sin_o <= 2'sd0;
    end else begin
      unique case (phase_q[31:29])
        3'd0: begin cos_o <=  2'sd1; sin_o <=  2'sd0; end
        3'd1: begin cos_o <=  2'sd1; sin_o <=  2'sd1; end
        3'd2: begin cos_o <=  2'sd0; sin_o <=  2'sd1; end
        3'd3: begin cos_o <= -2'sd1; sin_o <=  2'sd1; end
        3'd4: begin cos_o <= -2'sd1; sin_o <=  2'sd0; end
        3'd5: begin cos_o <= -2'sd1; sin_o <= -2'sd1; end
        3'd6: begin cos_o <=  2'sd0; sin_o <= -2'sd1; end
        3'd7: begin cos_o <=  2'sd1; sin_o <= -2'sd1; end
      endcase
    end
  end

  assign phase_o = phase_q;
endmodule
