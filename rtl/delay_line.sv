// delay_line: delay line unit of a channel.
//
// Makes the five code replicas Early-Early, Early, Prompt, Late and Late-Late
// from the code generator output. The code enters a shift register, one
// position per sample; the taps sit at 0, d, 2d, 3d and 4d samples, d being
// the software-set spacing (1..MAX_SPACING samples; 0 is read as 1). The
// epoch marker travels along the same register and is taken at the Prompt
// tap, so that all five correlators dump when the Prompt replica finishes an
// epoch. The five E/P/L replicas follow the receiver; the shift-register form,
// the uniform spacing and the Prompt-aligned epoch are this design's choices.
//
// Timing: all outputs are registered. taps_o[k] is code_i delayed by k*d+2
// clocks (two clocks for Early-Early), epoch_o is epoch_i delayed by 2d+2
// clocks, the delay of the Prompt tap.
module delay_line
  import gnss_pkg::*;
#(
  parameter int unsigned MAX_SPACING = 8
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic [3:0]          spacing_i,
  input  logic                code_i,
  input  logic                epoch_i,
  output logic [NUM_TAPS-1:0] taps_o,
  output logic                epoch_o
);
  localparam int unsigned LEN = 4 * MAX_SPACING + 1;

  logic [LEN-1:0] code_sr, epoch_sr;
  int unsigned    d;

  always_comb begin
    d = (spacing_i == 0) ? 1 : int'(spacing_i);
    if (d > MAX_SPACING) d = MAX_SPACING;
  end

  // Position k holds the input of k+1 clocks ago.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      code_sr  <= '0;
      epoch_sr <= '0;
    end else begin
      code_sr  <= {code_sr[LEN-2:0], code_i};
      epoch_sr <= {epoch_sr[LEN-2:0], epoch_i};
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      taps_o  <= '0;
      epoch_o <= 1'b0;
    end else begin
      for (int k = 0; k < NUM_TAPS; k++) taps_o[k] <= code_sr[k * d];
      epoch_o <= epoch_sr[2 * d];
    end
  end

  initial assert (MAX_SPACING >= 1 && MAX_SPACING <= 15) else $error("delay_line: MAX_SPACING out of range");
endmodule
