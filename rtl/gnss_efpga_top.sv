// gnss_efpga_top: GNSS sensor-processing subsystem for the SoC's embedded FPGA.
//
// A GPS L1 C/A correlator receiver whose registers are reached from one CPU
// core's 32-bit low-latency peripheral port (LLPP), an AXI4 master that only
// passes the interconnect for clock-domain crossing. Inside:
//   clk_div        divides the 39 MHz fabric clock by 8 to the 4.875 MHz
//                  GNSS Core clock, which also clocks the bus side;
//   axi2ahb_bridge turns the LLPP's AXI4 transactions into AHB-Lite transfers
//                  (4 MB window, 256-clock timeout);
//   gnss_module    the Sync Module (AHB-Lite slave, address decoder) and the
//                  GNSS Core (four channels, time base, built-in C/A signal
//                  generator in place of an RF front end).
// The AHB-Lite connection follows the receiver's: the module is the only
// slave, so HRDATA/HRESP go straight back to the bridge without a multiplexor,
// HSEL is tied high, and HREADYOUT is fed to both the bridge's and the
// module's HREADY. The interrupt pulses are brought out for the CPU's
// interrupt controller.
//
// Interface: clk_39m_i and rst_ni (active low, asynchronous) in; gnss_clk_o
// is the clock of the AXI4 slave port and of the interrupt outputs, so the
// interconnect's port toward this block must run from it. The AXI4 port is a
// 32-bit-data slave with ID_W-bit IDs.
module gnss_efpga_top #(
  parameter int unsigned NUM_CH      = 4,
  parameter int unsigned CLK_DIV     = 8,
  parameter int unsigned LUT_LEN     = 4875,
  parameter int unsigned CODE_LEN    = 1023,
  parameter int unsigned PRN         = 1,
  parameter int unsigned ACC_W       = 24,
  parameter int unsigned ME_PERIOD   = 97500,
  parameter int unsigned ID_W        = 4,
  parameter logic [31:0] LLPP_BASE   = 32'h0000_0000,
  parameter int unsigned TIMEOUT     = 256
) (
  input  logic              clk_39m_i,
  input  logic              rst_ni,
  output logic              gnss_clk_o,
  // AXI4 slave (from the LLPP through the interconnect)
  input  logic [ID_W-1:0]   s_axi_awid,
  input  logic [31:0]       s_axi_awaddr,
  input  logic [7:0]        s_axi_awlen,
  input  logic [2:0]        s_axi_awsize,
  input  logic [1:0]        s_axi_awburst,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wlast,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [ID_W-1:0]   s_axi_bid,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [ID_W-1:0]   s_axi_arid,
  input  logic [31:0]       s_axi_araddr,
  input  logic [7:0]        s_axi_arlen,
  input  logic [2:0]        s_axi_arsize,
  input  logic [1:0]        s_axi_arburst,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [ID_W-1:0]   s_axi_rid,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rlast,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // interrupt requests
  output logic [NUM_CH-1:0] ie_irq_o,
  output logic              me_irq_o
);
  logic        gclk;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0]  htrans;
  logic        hwrite, hmastlock, hreadyout, hresp;
  logic [2:0]  hsize, hburst;
  logic [3:0]  hprot;

  clk_div #(.DIV(CLK_DIV)) u_clkdiv (
    .clk_i  (clk_39m_i),
    .rst_ni (rst_ni),
    .clk_o  (gclk)
  );

  assign gnss_clk_o = gclk;

  axi2ahb_bridge #(
    .ID_W(ID_W), .BASE_ADDR(LLPP_BASE), .WIN_BITS(22), .TIMEOUT(TIMEOUT)
  ) u_bridge (
    .aclk    (gclk),
    .aresetn (rst_ni),
    .s_axi_awid, .s_axi_awaddr, .s_axi_awlen, .s_axi_awsize, .s_axi_awburst,
    .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wlast, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bid, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_arid, .s_axi_araddr, .s_axi_arlen, .s_axi_arsize, .s_axi_arburst,
    .s_axi_arvalid, .s_axi_arready,
    .s_axi_rid, .s_axi_rdata, .s_axi_rresp, .s_axi_rlast, .s_axi_rvalid,
    .s_axi_rready,
    .haddr, .htrans, .hwrite, .hsize, .hburst, .hprot, .hmastlock, .hwdata,
    .hready (hreadyout),
    .hresp,
    .hrdata
  );

  gnss_module #(
    .NUM_CH(NUM_CH), .LUT_LEN(LUT_LEN), .CODE_LEN(CODE_LEN), .PRN(PRN),
    .ACC_W(ACC_W), .ME_PERIOD(ME_PERIOD)
  ) u_gnss (
    .hclk      (gclk),
    .hresetn   (rst_ni),
    .hsel      (1'b1),
    .haddr, .htrans, .hwrite, .hsize, .hburst, .hprot, .hmastlock,
    .hready    (hreadyout),
    .hwdata,
    .hreadyout,
    .hresp,
    .hrdata,
    .ie_irq_o,
    .me_irq_o
  );
endmodule
