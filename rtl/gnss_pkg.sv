// gnss_pkg: types and constants shared by the GNSS receiver blocks.
//
// Samples. The channels take I and Q as 3-bit words covering the odd levels
// -7,-5,-3,-1,+1,+3,+5,+7. A word is read as a signed number s in [-4,3] and
// stands for the level 2*s+1, so appending a '1' LSB gives the level directly.
// The level set follows the receiver's input format; the bit encoding is this
// design's choice.
//
// Register map. A register access reaches the core as a one-hot chip-select
// vector (one bit per channel plus one for the global block) and a 6-bit word
// offset. The offsets below are this design's own compact map; the LLPP byte
// address that selects them is decoded in sync_module.
package gnss_pkg;

  typedef logic [2:0] iq_code_t;

  typedef struct packed {
    iq_code_t i;
    iq_code_t q;
  } iq_sample_t;

  // Correlator taps in order of increasing code delay.
  localparam int NUM_TAPS = 5;
  // Width of the integration-epoch length in chips: up to 8191 chips, enough
  // for the 4 ms (4092-chip) tracking epochs of the receiver software.
  localparam int EPOCH_W = 13;
  typedef enum logic [2:0] {
    TAP_EE = 3'd0,
    TAP_E  = 3'd1,
    TAP_P  = 3'd2,
    TAP_L  = 3'd3,
    TAP_LL = 3'd4
  } tap_e;

  // Level of a 3-bit sample word as a 4-bit signed number.
  function automatic logic signed [3:0] iq_level(iq_code_t c);
    return signed'({c, 1'b1});
  endfunction

  // Input selector sources.
  typedef enum logic {
    SRC_GENERATOR = 1'b0,
    SRC_PREV_CHAN = 1'b1
  } input_src_e;

  // Per-channel configuration, written through the register file.
  typedef struct packed {
    logic        enable;
    input_src_e  input_sel;
    logic [3:0]  dl_spacing;   // delay-line tap spacing in samples
    logic [31:0] carr_freq;    // carrier NCO increment, 2^32 = one cycle per sample
    logic [31:0] code_freq;    // code NCO increment, 2^32 = one chip per sample
    logic [EPOCH_W-1:0] epoch_chips;  // chips per integration epoch
  } chan_cfg_t;

  // Channel register word offsets.
  localparam logic [5:0] CH_CTRL        = 6'd0;   // [0] enable [1] input_sel [11:8] dl_spacing
  localparam logic [5:0] CH_CARR_FREQ   = 6'd1;
  localparam logic [5:0] CH_CODE_FREQ   = 6'd2;
  localparam logic [5:0] CH_EPOCH_CHIPS = 6'd3;
  localparam logic [5:0] CH_STATUS      = 6'd4;   // [0] epoch flag (write 1 to clear) [31:16] epoch count
  localparam logic [5:0] CH_OBS_BASE    = 6'd8;   // 8..12 I EE..LL, 13..17 Q EE..LL
  localparam logic [5:0] CH_ME_CHIP     = 6'd18;  // code chip index latched at the measurement epoch
  localparam logic [5:0] CH_ME_CODE_PH  = 6'd19;  // code NCO phase latched at the measurement epoch
  localparam logic [5:0] CH_ME_CARR_PH  = 6'd20;  // carrier NCO phase latched at the measurement epoch
  localparam logic [5:0] CH_CODE_RAM    = 6'd32;  // 32..63: primary code RAM, 32 chips per word

  // Global register word offsets.
  localparam logic [5:0] G_GEN_CTRL     = 6'd0;   // [0] C/A generator enable, [1] running (read), [31:16] table passes (read)
  localparam logic [5:0] G_GEN_DELAY    = 6'd1;   // generator start delay in samples
  localparam logic [5:0] G_ME_PERIOD    = 6'd2;   // measurement epoch period in samples
  localparam logic [5:0] G_TIME         = 6'd3;   // receiver time in samples (read only)
  localparam logic [5:0] G_IE_STATUS    = 6'd4;   // epoch flag of every channel (read only)

  // AHB constants.
  localparam logic [1:0] HTRANS_IDLE   = 2'b00;
  localparam logic [1:0] HTRANS_NONSEQ = 2'b10;
  localparam logic [2:0] HBURST_SINGLE = 3'b000;

  // AXI response codes.
  localparam logic [1:0] AXI_OKAY   = 2'b00;
  localparam logic [1:0] AXI_SLVERR = 2'b10;
  localparam logic [1:0] AXI_DECERR = 2'b11;

endpackage
