// gnss_module: the GNSS Module as seen from the bus.
//
// Joins the Sync Module (AHB-Lite slave and address decoder) to the GNSS Core
// (channels, time base, C/A signal generator and register file). The DMA
// engine and AHB master of the original module are not part of this design:
// the receiver software does not use them. Both blocks share one clock.
//
// Interface: an AHB-Lite slave port (HSEL is expected to be tied high and
// HREADY fed back from HREADYOUT, as the single master does) and the
// interrupt pulses of the core, one per channel for new integration-epoch
// observables and one for the measurement epoch. Timing is that of
// sync_module plus the core's register latencies.
module gnss_module #(
  parameter int unsigned NUM_CH      = 4,
  parameter int unsigned LUT_LEN     = 4875,
  parameter int unsigned CODE_LEN    = 1023,
  parameter int unsigned PRN         = 1,
  parameter int unsigned ACC_W       = 24,
  parameter int unsigned MAX_SPACING = 8,
  parameter int unsigned ME_PERIOD   = 97500,
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned RD_LAT      = 2,
  parameter int unsigned WR_LAT      = 4
) (
  input  logic              hclk,
  input  logic              hresetn,
  input  logic              hsel,
  input  logic [31:0]       haddr,
  input  logic [1:0]        htrans,
  input  logic              hwrite,
  input  logic [2:0]        hsize,
  input  logic [2:0]        hburst,
  input  logic [3:0]        hprot,
  input  logic              hmastlock,
  input  logic              hready,
  input  logic [31:0]       hwdata,
  output logic              hreadyout,
  output logic              hresp,
  output logic [31:0]       hrdata,
  output logic [NUM_CH-1:0] ie_irq_o,
  output logic              me_irq_o
);
  logic              req, we, ack;
  logic [NUM_CH:0]   cs;
  logic [5:0]        word;
  logic [31:0]       wdata, rdata;

  sync_module #(.NUM_CH(NUM_CH), .SYNC_STAGES(SYNC_STAGES)) u_sync (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hburst,
    .hprot, .hmastlock, .hready, .hwdata, .hreadyout, .hresp, .hrdata,
    .core_req_o   (req),
    .core_we_o    (we),
    .core_cs_o    (cs),
    .core_word_o  (word),
    .core_wdata_o (wdata),
    .core_ack_i   (ack),
    .core_rdata_i (rdata)
  );

  gnss_core #(
    .NUM_CH(NUM_CH), .LUT_LEN(LUT_LEN), .CODE_LEN(CODE_LEN), .PRN(PRN),
    .ACC_W(ACC_W), .MAX_SPACING(MAX_SPACING), .ME_PERIOD(ME_PERIOD),
    .RD_LAT(RD_LAT), .WR_LAT(WR_LAT)
  ) u_core (
    .clk_i    (hclk),
    .rst_ni   (hresetn),
    .req_i    (req),
    .we_i     (we),
    .cs_i     (cs),
    .word_i   (word),
    .wdata_i  (wdata),
    .ack_o    (ack),
    .rdata_o  (rdata),
    .ie_irq_o,
    .me_irq_o
  );
endmodule
