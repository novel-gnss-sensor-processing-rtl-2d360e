// input_selector: chooses the I/Q sample stream a channel processes.
//
// A channel either takes the common input (here the built-in C/A signal
// generator, which replaces the front-end input modules) or the stream of the
// previous channel, so that channels can be slaved to each other. The two
// sources follow the receiver; registering the output is this design's choice.
//
// Timing: iq_o is the selected sample one clock later.
module input_selector
  import gnss_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  input_src_e sel_i,
  input  iq_sample_t gen_iq_i,
  input  iq_sample_t prev_iq_i,
  output iq_sample_t iq_o
);
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)                     iq_o <= '0;
    else if (sel_i == SRC_PREV_CHAN) iq_o <= prev_iq_i;
    else                             iq_o <= gen_iq_i;
  end
endmodule
