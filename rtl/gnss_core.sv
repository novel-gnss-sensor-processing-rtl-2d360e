// gnss_core: GNSS Core, the signal-processing part of the GNSS Module.
//
// Holds the channel matrix (NUM_CH tracking channels, four on the prototype),
// the time base generator, the built-in C/A code signal generator that stands
// in for the front-end input modules, and the register file through which
// software configures the channels and reads their observables. The channels
// run in parallel on the same clock; channel 0 takes the generator stream or
// nothing, channel n>0 may instead be slaved to channel n-1's input stream.
// The units, four channels, the generator in place of the front end and the
// 3-bit inputs follow the receiver; register layout and latencies are this
// design's (register offsets are listed in gnss_pkg).
//
// Register interface: req_i is a one-clock request with chip selects cs_i (one
// bit per channel, bit NUM_CH for the global block), word offset word_i, we_i
// and wdata_i. A write takes effect at the clock edge that samples req_i and
// is acknowledged WR_LAT clocks later; a read returns rdata_o with ack_o
// RD_LAT clocks after req_i (defaults 4 and 2, the core access times seen on
// the prototype). No chip select reads as zero. A new request may follow only
// after the acknowledge.
//
// Interrupt lines: ie_irq_o[n] pulses for one clock when channel n has new
// integration-epoch observables, me_irq_o when a measurement epoch occurs.
// They are meant for shared peripheral interrupt inputs of the CPU's interrupt
// controller; the core has no interrupt controller of its own.
module gnss_core
  import gnss_pkg::*;
#(
  parameter int unsigned NUM_CH      = 4,
  parameter int unsigned LUT_LEN     = 4875,
  parameter int unsigned CODE_LEN    = 1023,
  parameter int unsigned PRN         = 1,
  parameter int unsigned ACC_W       = 24,
  parameter int unsigned MAX_SPACING = 8,
  parameter int unsigned ME_PERIOD   = 97500,   // 20 ms at 4.875 MHz
  parameter int unsigned RD_LAT      = 2,
  parameter int unsigned WR_LAT      = 4
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              req_i,
  input  logic              we_i,
  input  logic [NUM_CH:0]   cs_i,
  input  logic [5:0]        word_i,
  input  logic [31:0]       wdata_i,
  output logic              ack_o,
  output logic [31:0]       rdata_o,
  output logic [NUM_CH-1:0] ie_irq_o,
  output logic              me_irq_o
);
  // Code NCO word for CODE_LEN chips in LUT_LEN samples, rounded up so that
  // one epoch is exactly LUT_LEN samples.
  localparam logic [63:0] CODE_FREQ_DEF =
      ((64'(CODE_LEN) << 32) + 64'(LUT_LEN) - 64'd1) / 64'(LUT_LEN);

  chan_cfg_t               cfg_q    [NUM_CH];
  logic [NUM_CH-1:0]       flag_q;
  logic [15:0]             ep_cnt_q [NUM_CH];
  logic                    gen_en_q;
  logic [31:0]             gen_delay_q;
  logic [31:0]             me_period_q;
  logic [15:0]             gen_wraps_q;

  iq_sample_t              gen_iq;
  logic                    gen_wrap, gen_running;
  logic [31:0]             time_now;
  logic                    me;

  iq_sample_t              chan_iq  [NUM_CH];
  logic signed [ACC_W-1:0] obs_i    [NUM_CH][NUM_TAPS];
  logic signed [ACC_W-1:0] obs_q    [NUM_CH][NUM_TAPS];
  logic [NUM_CH-1:0]       ie;
  logic [9:0]              me_chip  [NUM_CH];
  logic [31:0]             me_code  [NUM_CH];
  logic [31:0]             me_carr  [NUM_CH];

  logic                    wr;
  logic [NUM_CH-1:0]       ram_we;

  // ---------------------------------------------------------------- units
  ca_code_gen #(.LUT_LEN(LUT_LEN), .CODE_LEN(CODE_LEN), .PRN(PRN)) u_gen (
    .clk_i, .rst_ni,
    .enable_i  (gen_en_q),
    .delay_i   (gen_delay_q),
    .iq_o      (gen_iq),
    .wrap_o    (gen_wrap),
    .running_o (gen_running)
  );

  time_base u_tb (
    .clk_i, .rst_ni,
    .period_i (me_period_q),
    .time_o   (time_now),
    .me_o     (me)
  );

  for (genvar n = 0; n < NUM_CH; n++) begin : g_ch
    gnss_channel #(
      .CODE_LEN(CODE_LEN), .ACC_W(ACC_W), .MAX_SPACING(MAX_SPACING)
    ) u_ch (
      .clk_i, .rst_ni,
      .cfg_i           (cfg_q[n]),
      .ram_we_i        (ram_we[n]),
      .ram_addr_i      (word_i[4:0]),
      .ram_wdata_i     (wdata_i),
      .gen_iq_i        (gen_iq),
      .prev_iq_i       ((n == 0) ? gen_iq : chan_iq[(n == 0) ? 0 : n - 1]),
      .me_i            (me),
      .iq_o            (chan_iq[n]),
      .obs_i_o         (obs_i[n]),
      .obs_q_o         (obs_q[n]),
      .ie_o            (ie[n]),
      .me_chip_o       (me_chip[n]),
      .me_code_phase_o (me_code[n]),
      .me_carr_phase_o (me_carr[n])
    );
  end

  // -------------------------------------------------------- register writes
  assign wr = req_i && we_i;

  always_comb begin
    for (int n = 0; n < NUM_CH; n++) ram_we[n] = wr && cs_i[n] && word_i[5];
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int n = 0; n < NUM_CH; n++) begin
        cfg_q[n] <= '{enable: 1'b0, input_sel: SRC_GENERATOR, dl_spacing: 4'd1,
                      carr_freq: '0, code_freq: CODE_FREQ_DEF[31:0],
                      epoch_chips: EPOCH_W'(CODE_LEN)};
        ep_cnt_q[n] <= '0;
      end
      flag_q      <= '0;
      gen_en_q    <= 1'b0;
      gen_delay_q <= '0;
      me_period_q <= 32'(ME_PERIOD);
      gen_wraps_q <= '0;
    end else begin
      if (!gen_en_q)     gen_wraps_q <= '0;
      else if (gen_wrap) gen_wraps_q <= gen_wraps_q + 1'b1;
      for (int n = 0; n < NUM_CH; n++) begin
        if (wr && cs_i[n]) begin
          unique case (word_i)
            CH_CTRL: begin
              cfg_q[n].enable     <= wdata_i[0];
              cfg_q[n].input_sel  <= input_src_e'(wdata_i[1]);
              cfg_q[n].dl_spacing <= wdata_i[11:8];
            end
            CH_CARR_FREQ:   cfg_q[n].carr_freq   <= wdata_i;
            CH_CODE_FREQ:   cfg_q[n].code_freq   <= wdata_i;
            CH_EPOCH_CHIPS: cfg_q[n].epoch_chips <= wdata_i[EPOCH_W-1:0];
            default: ;
          endcase
        end
        if (ie[n]) begin
          flag_q[n]   <= 1'b1;
          ep_cnt_q[n] <= ep_cnt_q[n] + 1'b1;
        end else if (wr && cs_i[n] && word_i == CH_STATUS && wdata_i[0]) begin
          flag_q[n]   <= 1'b0;
        end
      end
      if (wr && cs_i[NUM_CH]) begin
        unique case (word_i)
          G_GEN_CTRL:  gen_en_q    <= wdata_i[0];
          G_GEN_DELAY: gen_delay_q <= wdata_i;
          G_ME_PERIOD: me_period_q <= wdata_i;
          default: ;
        endcase
      end
    end
  end

  // --------------------------------------------------------- register reads
  logic [31:0] rd_c;

  always_comb begin
    rd_c = '0;
    for (int n = 0; n < NUM_CH; n++) begin
      if (cs_i[n]) begin
        if (word_i >= CH_CODE_RAM) begin
          rd_c = '0;   // code RAM is write-only
        end else if (word_i >= CH_OBS_BASE && word_i < CH_OBS_BASE + 6'(2 * NUM_TAPS)) begin
          for (int k = 0; k < NUM_TAPS; k++) begin
            if (word_i == CH_OBS_BASE + 6'(k))            rd_c = 32'(obs_i[n][k]);
            if (word_i == CH_OBS_BASE + 6'(NUM_TAPS + k)) rd_c = 32'(obs_q[n][k]);
          end
        end else begin
          unique case (word_i)
            CH_CTRL:        rd_c = {20'd0, cfg_q[n].dl_spacing, 6'd0,
                                    cfg_q[n].input_sel, cfg_q[n].enable};
            CH_CARR_FREQ:   rd_c = cfg_q[n].carr_freq;
            CH_CODE_FREQ:   rd_c = cfg_q[n].code_freq;
            CH_EPOCH_CHIPS: rd_c = 32'(cfg_q[n].epoch_chips);
            CH_STATUS:      rd_c = {ep_cnt_q[n], 15'd0, flag_q[n]};
            CH_ME_CHIP:     rd_c = {22'd0, me_chip[n]};
            CH_ME_CODE_PH:  rd_c = me_code[n];
            CH_ME_CARR_PH:  rd_c = me_carr[n];
            default:        rd_c = '0;
          endcase
        end
      end
    end
    if (cs_i[NUM_CH]) begin
      unique case (word_i)
        G_GEN_CTRL:  rd_c = {gen_wraps_q, 14'd0, gen_running, gen_en_q};
        G_GEN_DELAY: rd_c = gen_delay_q;
        G_ME_PERIOD: rd_c = me_period_q;
        G_TIME:      rd_c = time_now;
        G_IE_STATUS: rd_c = 32'(flag_q);
        default:     rd_c = '0;
      endcase
    end
  end

  // ------------------------------------------------------- access latency
  localparam int unsigned LAT = (RD_LAT > WR_LAT) ? RD_LAT : WR_LAT;

  logic [LAT:1]  rd_pipe_q, wr_pipe_q;
  logic [31:0]   rdata_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rd_pipe_q <= '0;
      wr_pipe_q <= '0;
      rdata_q   <= '0;
    end else begin
      rd_pipe_q <= {rd_pipe_q[LAT-1:1], req_i && !we_i};
      wr_pipe_q <= {wr_pipe_q[LAT-1:1], req_i && we_i};
      if (req_i && !we_i) rdata_q <= rd_c;
    end
  end

  assign ack_o    = rd_pipe_q[RD_LAT] || wr_pipe_q[WR_LAT];
  assign rdata_o  = rdata_q;
  assign ie_irq_o = ie;
  assign me_irq_o = me;

  initial assert (RD_LAT >= 1 && WR_LAT >= 1 && LAT >= 2)
    else $error("gnss_core: latencies must be at least 1 and one of them at least 2");
endmodule
