// axi2ahb_bridge: AXI4 slave to AHB-Lite master bridge.
//
// Connects the CPU's 32-bit low-latency peripheral port (an AXI4 master, after
// the interconnect's clock-domain crossing) to the GNSS Module's AHB slave.
// As in the bridge the receiver uses, address and data are 32 bits on both
// sides, the AXI address is passed to AHB unchanged, the bridge answers only
// for a 4 MB window (2^WIN_BITS bytes at BASE_ADDR; outside it it answers
// DECERR without touching AHB), both sides share one clock, and a timeout
// module ends an AHB transfer whose slave keeps HREADY low for TIMEOUT
// (256) clocks, answering SLVERR. The state machines are this design's own:
// one transaction is handled at a time, writes and reads take turns when
// both are waiting, and every beat of an AXI burst becomes one AHB SINGLE
// transfer (INCR and WRAP bursts advance the address by the beat size, FIXED
// bursts keep it). An AHB ERROR response becomes SLVERR for that beat.
//
// Timing per beat: AXI handshake, one AHB address-phase clock, the data phase
// (as long as the slave holds HREADY low), then the B or R handshake. A write
// answers on B once all its beats are done; a read returns each beat on R
// before starting the next. A read reaches the AHB slave 2 clocks after the
// AR handshake, a write 3 clocks after AW when W follows at once; the R
// handshake comes RD_RESP_LAT (3) clocks and the B handshake WR_RESP_LAT (1)
// clock after the AHB data phase ends. With the GNSS Module's 7-clock read
// and 2-clock posted-write data phases this gives 11 clocks from AR to R and
// 5 from AW to B, the totals measured on the bridge the receiver used. The
// response delays are plain wait states (1 to 15 clocks; 1 answers at once).
module axi2ahb_bridge
  import gnss_pkg::*;
#(
  parameter int unsigned ID_W      = 4,
  parameter logic [31:0] BASE_ADDR = 32'h0000_0000,
  parameter int unsigned WIN_BITS  = 22,
  parameter int unsigned TIMEOUT   = 256,
  parameter int unsigned RD_RESP_LAT = 3,   // clocks from AHB data phase end to RVALID
  parameter int unsigned WR_RESP_LAT = 1    // clocks from the last AHB data phase end to BVALID
) (
  input  logic            aclk,
  input  logic            aresetn,
  // AXI4 write address
  input  logic [ID_W-1:0] s_axi_awid,
  input  logic [31:0]     s_axi_awaddr,
  input  logic [7:0]      s_axi_awlen,
  input  logic [2:0]      s_axi_awsize,
  input  logic [1:0]      s_axi_awburst,
  input  logic            s_axi_awvalid,
  output logic            s_axi_awready,
  // AXI4 write data
  input  logic [31:0]     s_axi_wdata,
  input  logic [3:0]      s_axi_wstrb,
  input  logic            s_axi_wlast,
  input  logic            s_axi_wvalid,
  output logic            s_axi_wready,
  // AXI4 write response
  output logic [ID_W-1:0] s_axi_bid,
  output logic [1:0]      s_axi_bresp,
  output logic            s_axi_bvalid,
  input  logic            s_axi_bready,
  // AXI4 read address
  input  logic [ID_W-1:0] s_axi_arid,
  input  logic [31:0]     s_axi_araddr,
  input  logic [7:0]      s_axi_arlen,
  input  logic [2:0]      s_axi_arsize,
  input  logic [1:0]      s_axi_arburst,
  input  logic            s_axi_arvalid,
  output logic            s_axi_arready,
  // AXI4 read data
  output logic [ID_W-1:0] s_axi_rid,
  output logic [31:0]     s_axi_rdata,
  output logic [1:0]      s_axi_rresp,
  output logic            s_axi_rlast,
  output logic            s_axi_rvalid,
  input  logic            s_axi_rready,
  // AHB-Lite master
  output logic [31:0]     haddr,
  output logic [1:0]      htrans,
  output logic            hwrite,
  output logic [2:0]      hsize,
  output logic [2:0]      hburst,
  output logic [3:0]      hprot,
  output logic            hmastlock,
  output logic [31:0]     hwdata,
  input  logic            hready,
  input  logic            hresp,
  input  logic [31:0]     hrdata
);
  typedef enum logic [3:0] {
    S_IDLE,
    S_W_DATA,    // waiting for a W beat
    S_W_ADDR,    // AHB address phase of a write beat
    S_W_AHB,     // AHB data phase of a write beat
    S_B_WAIT,    // response delay before B
    S_B_RESP,    // B channel handshake
    S_R_ADDR,    // AHB address phase of a read beat
    S_R_AHB,     // AHB data phase of a read beat
    S_R_WAIT,    // response delay before R
    S_R_RESP     // R channel handshake
  } state_e;

  localparam int unsigned TW = $clog2(TIMEOUT + 1);

  state_e          state_q;
  logic [ID_W-1:0] id_q;
  logic [31:0]     addr_q;
  logic [7:0]      beats_left_q;
  logic [2:0]      size_q;
  logic [1:0]      burst_q;
  logic            in_win_q;
  logic [31:0]     wdata_q;
  logic [1:0]      resp_q;      // accumulated write response
  logic [1:0]      rresp_q;
  logic [31:0]     rdata_q;
  logic            last_q;
  logic            prefer_rd_q; // turn-taking between reads and writes
  logic [TW-1:0]   tmo_q;
  logic [3:0]      wait_q;      // remaining response-delay clocks
  logic            timeout;

  function automatic logic in_window(logic [31:0] a);
    return (a >> WIN_BITS) == (BASE_ADDR >> WIN_BITS);
  endfunction

  function automatic logic [31:0] next_addr(logic [31:0] a, logic [2:0] sz, logic [1:0] bt);
    return (bt == 2'b00) ? a : a + (32'd1 << sz);
  endfunction

  assign timeout = (tmo_q == TW'(TIMEOUT - 1)) && !hready;

  // AXI handshakes.
  always_comb begin
    s_axi_awready = (state_q == S_IDLE) && s_axi_awvalid && !(s_axi_arvalid && prefer_rd_q);
    s_axi_arready = (state_q == S_IDLE) && s_axi_arvalid && !s_axi_awready;
    s_axi_wready  = (state_q == S_W_DATA);
    s_axi_bvalid  = (state_q == S_B_RESP);
    s_axi_bid     = id_q;
    s_axi_bresp   = resp_q;
    s_axi_rvalid  = (state_q == S_R_RESP);
    s_axi_rid     = id_q;
    s_axi_rdata   = rdata_q;
    s_axi_rresp   = rresp_q;
    s_axi_rlast   = last_q;
  end

  // AHB master outputs.
  always_comb begin
    haddr     = addr_q;
    hwrite    = (state_q == S_W_ADDR);
    htrans    = (state_q == S_W_ADDR || state_q == S_R_ADDR) ? HTRANS_NONSEQ : HTRANS_IDLE;
    hsize     = size_q;
    hburst    = HBURST_SINGLE;
    hprot     = 4'b0011;   // data access, privileged
    hmastlock = 1'b0;
    hwdata    = wdata_q;
  end

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      state_q      <= S_IDLE;
      id_q         <= '0;
      addr_q       <= '0;
      beats_left_q <= '0;
      size_q       <= 3'd2;
      burst_q      <= 2'b01;
      in_win_q     <= 1'b0;
      wdata_q      <= '0;
      resp_q       <= AXI_OKAY;
      rresp_q      <= AXI_OKAY;
      rdata_q      <= '0;
      last_q       <= 1'b0;
      prefer_rd_q  <= 1'b0;
      tmo_q        <= '0;
      wait_q       <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          resp_q <= AXI_OKAY;
          if (s_axi_awready) begin
            id_q         <= s_axi_awid;
            addr_q       <= s_axi_awaddr;
            beats_left_q <= s_axi_awlen;
            size_q       <= s_axi_awsize;
            burst_q      <= s_axi_awburst;
            in_win_q     <= in_window(s_axi_awaddr);
            prefer_rd_q  <= 1'b1;
            state_q      <= S_W_DATA;
          end else if (s_axi_arready) begin
            id_q         <= s_axi_arid;
            addr_q       <= s_axi_araddr;
            beats_left_q <= s_axi_arlen;
            size_q       <= s_axi_arsize;
            burst_q      <= s_axi_arburst;
            in_win_q     <= in_window(s_axi_araddr);
            prefer_rd_q  <= 1'b0;
            if (in_window(s_axi_araddr)) begin
              state_q <= S_R_ADDR;
            end else begin
              rdata_q <= '0;
              rresp_q <= AXI_DECERR;
              last_q  <= (s_axi_arlen == 8'd0);
              state_q <= S_R_RESP;
            end
          end
        end

        S_W_DATA: begin
          if (s_axi_wvalid) begin
            wdata_q <= s_axi_wdata;
            if (in_win_q) begin
              state_q <= S_W_ADDR;
            end else begin
              resp_q  <= AXI_DECERR;
              addr_q  <= next_addr(addr_q, size_q, burst_q);
              beats_left_q <= beats_left_q - 1'b1;
              state_q <= (beats_left_q == 8'd0) ? S_B_RESP : S_W_DATA;
            end
          end
        end

        S_W_ADDR: begin
          if (hready) begin
            tmo_q   <= '0;
            state_q <= S_W_AHB;
          end
        end

        S_W_AHB: begin
          if (hready || timeout) begin
            if (timeout || hresp) resp_q <= AXI_SLVERR;
            addr_q       <= next_addr(addr_q, size_q, burst_q);
            beats_left_q <= beats_left_q - 1'b1;
            wait_q       <= 4'(WR_RESP_LAT - 2);
            if (beats_left_q != 8'd0)  state_q <= S_W_DATA;
            else if (WR_RESP_LAT > 1)  state_q <= S_B_WAIT;
            else                       state_q <= S_B_RESP;
          end else begin
            tmo_q <= tmo_q + 1'b1;
          end
        end

        S_B_WAIT: begin
          wait_q <= wait_q - 1'b1;
          if (wait_q == '0) state_q <= S_B_RESP;
        end

        S_B_RESP: begin
          if (s_axi_bready) state_q <= S_IDLE;
        end

        S_R_ADDR: begin
          if (hready) begin
            tmo_q   <= '0;
            state_q <= S_R_AHB;
          end
        end

        S_R_AHB: begin
          if (hready || timeout) begin
            rdata_q <= timeout ? '0 : hrdata;
            rresp_q <= (timeout || hresp) ? AXI_SLVERR : AXI_OKAY;
            last_q  <= (beats_left_q == 8'd0);
            wait_q  <= 4'(RD_RESP_LAT - 2);
            state_q <= (RD_RESP_LAT > 1) ? S_R_WAIT : S_R_RESP;
          end else begin
            tmo_q <= tmo_q + 1'b1;
          end
        end

        S_R_WAIT: begin
          wait_q <= wait_q - 1'b1;
          if (wait_q == '0) state_q <= S_R_RESP;
        end

        S_R_RESP: begin
          if (s_axi_rready) begin
            if (last_q) begin
              state_q <= S_IDLE;
            end else begin
              addr_q       <= next_addr(addr_q, size_q, burst_q);
              beats_left_q <= beats_left_q - 1'b1;
              if (in_win_q) begin
                state_q <= S_R_ADDR;
              end else begin
                last_q  <= (beats_left_q == 8'd1);
                state_q <= S_R_RESP;
              end
            end
          end
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Byte strobes and WLAST carry no information for full-word single
  // transfers to the GNSS Module.
  logic unused_ok;
  assign unused_ok = ^{s_axi_wstrb, s_axi_wlast};

  // AXI rule: a response, once valid, stays valid until accepted.
  assert property (@(posedge aclk) disable iff (!aresetn)
                   s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  assert property (@(posedge aclk) disable iff (!aresetn)
                   s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
  // AHB rule: the address phase is held until the slave is ready.
  assert property (@(posedge aclk) disable iff (!aresetn)
                   htrans == HTRANS_NONSEQ && !hready |=> htrans == HTRANS_NONSEQ && $stable(haddr));
endmodule
