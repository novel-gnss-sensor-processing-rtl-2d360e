// gnss_channel: one tracking channel of the channel matrix.
//
// Chain of the channel units: the input selector picks the common generator
// stream or the previous channel's stream, the final down-converter mixes it
// with the carrier generator's replica, and the correlator integrates it
// against the five replicas (EE, E, P, L, LL) that the delay line makes from
// the code generator's output. At the end of every integration epoch the
// correlator totals become the integration-epoch (IE) observables and ie_o
// pulses. At every measurement epoch strobe (me_i) the channel latches its
// code chip index, code NCO phase and carrier NCO phase as ME observables.
// The unit structure follows the receiver; see each unit for its own choices.
//
// Timing: the sample path (selector, down-converter) and the code path (code
// generator, delay line) both have two register stages before the correlator,
// so a sample and the code chip generated in the same clock meet at the
// EE tap; the Prompt tap sees the code 2*spacing clocks later. Disabling the
// channel (cfg_i.enable low) resets the NCOs, the chip counters and the
// accumulators; the observables keep their last values.
module gnss_channel
  import gnss_pkg::*;
#(
  parameter int unsigned CODE_LEN    = 1023,
  parameter int unsigned ACC_W       = 24,
  parameter int unsigned MAX_SPACING = 8
) (
  input  logic                    clk_i,
  input  logic                    rst_ni,
  input  chan_cfg_t               cfg_i,
  input  logic                    ram_we_i,
  input  logic [4:0]              ram_addr_i,
  input  logic [31:0]             ram_wdata_i,
  input  iq_sample_t              gen_iq_i,
  input  iq_sample_t              prev_iq_i,
  input  logic                    me_i,
  output iq_sample_t              iq_o,        // selected input, for slaving the next channel
  output logic signed [ACC_W-1:0] obs_i_o [NUM_TAPS],
  output logic signed [ACC_W-1:0] obs_q_o [NUM_TAPS],
  output logic                    ie_o,
  output logic [9:0]              me_chip_o,
  output logic [31:0]             me_code_phase_o,
  output logic [31:0]             me_carr_phase_o
);
  iq_sample_t              sel_iq;
  logic signed [1:0]       cos_r, sin_r;
  logic [31:0]             carr_phase, code_phase;
  logic signed [4:0]       bb_i, bb_q;
  logic                    code, code_epoch, dl_epoch;
  logic [9:0]              chip;
  logic [NUM_TAPS-1:0]     taps;

  input_selector u_sel (
    .clk_i, .rst_ni,
    .sel_i     (cfg_i.input_sel),
    .gen_iq_i,
    .prev_iq_i,
    .iq_o      (sel_iq)
  );

  carrier_gen u_carr (
    .clk_i, .rst_ni,
    .enable_i (cfg_i.enable),
    .freq_i   (cfg_i.carr_freq),
    .phase_o  (carr_phase),
    .cos_o    (cos_r),
    .sin_o    (sin_r)
  );

  final_down_conv u_fdc (
    .clk_i, .rst_ni,
    .iq_i  (sel_iq),
    .cos_i (cos_r),
    .sin_i (sin_r),
    .i_o   (bb_i),
    .q_o   (bb_q)
  );

  code_gen #(.CODE_LEN(CODE_LEN)) u_code (
    .clk_i, .rst_ni,
    .enable_i      (cfg_i.enable),
    .freq_i        (cfg_i.code_freq),
    .epoch_chips_i (cfg_i.epoch_chips),
    .ram_we_i, .ram_addr_i, .ram_wdata_i,
    .code_o        (code),
    .epoch_o       (code_epoch),
    .phase_o       (code_phase),
    .chip_o        (chip)
  );

  delay_line #(.MAX_SPACING(MAX_SPACING)) u_dl (
    .clk_i, .rst_ni,
    .spacing_i (cfg_i.dl_spacing),
    .code_i    (code),
    .epoch_i   (code_epoch),
    .taps_o    (taps),
    .epoch_o   (dl_epoch)
  );

  correlator #(.ACC_W(ACC_W)) u_corr (
    .clk_i, .rst_ni,
    .clear_i     (!cfg_i.enable),
    .i_i         (bb_i),
    .q_i         (bb_q),
    .code_i      (taps),
    .dump_i      (dl_epoch),
    .obs_i_o,
    .obs_q_o,
    .obs_valid_o (ie_o)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      me_chip_o       <= '0;
      me_code_phase_o <= '0;
      me_carr_phase_o <= '0;
    end else if (me_i) begin
      me_chip_o       <= chip;
      me_code_phase_o <= code_phase;
      me_carr_phase_o <= carr_phase;
    end
  end

  assign iq_o = sel_iq;
endmodule
