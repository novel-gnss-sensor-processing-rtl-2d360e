// code_gen: code generator unit of a channel.
//
// Produces the channel's local replica of the PRN code. The code chips are
// read from the primary code RAM, which software preloads with the satellite's
// code (32 chips per 32-bit word, chip k in word k/32, bit k%32). A 32-bit
// code NCO advanced by freq_i each sample sets the chip rate (freq_i/2^32
// chips per sample; 1.023 MHz at 4.875 MHz is about 0x35BB_1A5A); each NCO
// overflow moves to the next chip, wrapping after CODE_LEN chips. A chip
// counter marks the end of an integration epoch after epoch_chips_i chips.
// Code RAM, software-set code rate and epochs counted in chips follow the
// receiver; the NCO width and RAM organisation are this design's choices.
//
// Timing: code_o and epoch_o are registered. code_o is the chip of the current
// sample; epoch_o is high on the last sample of an integration epoch. While
// enable_i is low the NCO, chip index and epoch counter are held at zero, so
// the first sample after enable carries chip 0.
module code_gen
  import gnss_pkg::*;
#(
  parameter int unsigned CODE_LEN = 1023
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        enable_i,
  input  logic [31:0] freq_i,
  input  logic [EPOCH_W-1:0] epoch_chips_i,
  // code RAM write port
  input  logic        ram_we_i,
  input  logic [4:0]  ram_addr_i,
  input  logic [31:0] ram_wdata_i,
  // replica
  output logic        code_o,
  output logic        epoch_o,
  // state for measurement latching
  output logic [31:0] phase_o,
  output logic [9:0]  chip_o
);
  logic [31:0] ram_q [32];
  logic [31:0] phase_q;
  logic [9:0]  chip_q;
  logic [EPOCH_W-1:0] ep_cnt_q;
  logic [32:0] phase_sum;
  logic        carry;
  logic        last_chip_of_epoch;

  always_ff @(posedge clk_i) begin
    if (ram_we_i) ram_q[ram_addr_i] <= ram_wdata_i;
  end

  always_comb begin
    phase_sum          = {1'b0, phase_q} + {1'b0, freq_i};
    carry              = phase_sum[32];
    last_chip_of_epoch = (ep_cnt_q + 1'b1 >= epoch_chips_i);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      phase_q  <= '0;
      chip_q   <= '0;
      ep_cnt_q <= '0;
      code_o   <= 1'b0;
      epoch_o  <= 1'b0;
    end else if (!enable_i) begin
      phase_q  <= '0;
      chip_q   <= '0;
      ep_cnt_q <= '0;
      code_o   <= 1'b0;
      epoch_o  <= 1'b0;
    end else begin
      code_o  <= ram_q[chip_q[9:5]][chip_q[4:0]];
      epoch_o <= carry && last_chip_of_epoch;
      phase_q <= phase_sum[31:0];
      if (carry) begin
        chip_q   <= (chip_q == 10'(CODE_LEN - 1)) ? '0 : chip_q + 1'b1;
        ep_cnt_q <= last_chip_of_epoch ? '0 : ep_cnt_q + 1'b1;
      end
    end
  end

  assign phase_o = phase_q;
  assign chip_o  = chip_q;

  initial assert (CODE_LEN >= 2 && CODE_LEN <= 1024) else $error("code_gen: CODE_LEN out of range");
endmodule
