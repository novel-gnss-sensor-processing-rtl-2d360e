// sync_module: AHB-Lite slave front end of the GNSS Module.
//
// Accepts register accesses from the AHB-Lite bridge, decodes the compact
// address map that fits the CPU's 4 MB low-latency peripheral window into the
// GNSS Core's chip selects and word offsets, forwards the access to the core
// and returns the read data. The block keeps the structure of the module it
// replaces, which synchronised bus requests into a separate core clock
// domain: a request is passed through SYNC_STAGES register stages on its way
// to the core and the answer through SYNC_STAGES stages on its way back, even
// though bus and core now share one clock.
//
// HREADYOUT is a standard AHB-Lite ready: it is high when idle, is driven low
// in the data phase of an access and returns high in the clock that completes
// it. (The original block pulsed its ready for two clocks after the
// synchronisation instead.) Writes are posted: the data phase ends SYNC_STAGES
// clocks after it begins, and the core write completes in the background; an
// access that arrives while a posted write is still in the core waits, with
// HREADYOUT low, until the write has been acknowledged.
//
// Address decode (this design's own map): HADDR[15:12] selects the block,
// 0..NUM_CH-1 for the channels and 4'hF for the global registers; HADDR[7:2]
// is the word offset. Other blocks select nothing and read as zero. HSIZE is
// ignored: every access moves a full 32-bit register. HRESP is always OKAY.
// HSEL is expected to be tied high by the only master, and HMASTER is absent.
//
// Read timing with the defaults: data phase of 2 + 2 + 2 + 1 clocks (to core,
// core access, back, response cycle).
module sync_module #(
  parameter int unsigned NUM_CH      = 4,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic              hclk,
  input  logic              hresetn,
  // AHB-Lite slave
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
  // GNSS Core register interface
  output logic              core_req_o,
  output logic              core_we_o,
  output logic [NUM_CH:0]   core_cs_o,
  output logic [5:0]        core_word_o,
  output logic [31:0]       core_wdata_o,
  input  logic              core_ack_i,
  input  logic [31:0]       core_rdata_i
);
  typedef enum logic [2:0] {
    S_IDLE,     // no data phase in progress
    S_RD_FWD,   // read: request on its way to the core
    S_RD_CORE,  // read: waiting for the core
    S_RD_RET,   // read: data on its way back
    S_WR_DATA   // write: data phase
  } state_e;

  localparam int unsigned CW = $clog2(SYNC_STAGES + 1);

  state_e          state_q;
  logic [CW-1:0]   cnt_q;
  logic            accept;
  logic            done;
  logic            wr_busy_q;
  logic [NUM_CH:0] cs_q;
  logic [5:0]      word_q;
  logic [31:0]     rdata_q;
  logic [NUM_CH:0] cs_dec;

  // Address phase is taken whenever the bus is ready and a transfer is
  // signalled, which for this slave happens only while hreadyout is high.
  assign accept = hsel && hready && htrans[1];

  always_comb begin
    cs_dec = '0;
    if (haddr[15:12] == 4'hF) cs_dec[NUM_CH] = 1'b1;
    for (int n = 0; n < NUM_CH; n++)
      if (32'(haddr[15:12]) == n) cs_dec[n] = 1'b1;
  end

  // Final clock of a data phase.
  always_comb begin
    unique case (state_q)
      S_IDLE:    done = 1'b1;
      S_RD_RET:  done = (cnt_q == '0);
      S_WR_DATA: done = (cnt_q == '0) && !wr_busy_q;
      default:   done = 1'b0;
    endcase
  end

  assign hreadyout = done;
  assign hresp     = 1'b0;
  assign hrdata    = rdata_q;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state_q      <= S_IDLE;
      cnt_q        <= '0;
      wr_busy_q    <= 1'b0;
      cs_q         <= '0;
      word_q       <= '0;
      rdata_q      <= '0;
      core_req_o   <= 1'b0;
      core_we_o    <= 1'b0;
      core_cs_o    <= '0;
      core_word_o  <= '0;
      core_wdata_o <= '0;
    end else begin
      core_req_o <= 1'b0;
      if (core_ack_i && core_we_o) wr_busy_q <= 1'b0;

      unique case (state_q)
        S_RD_FWD: begin
          if (cnt_q != '0) cnt_q <= cnt_q - 1'b1;
          else if (!wr_busy_q) begin
            core_req_o  <= 1'b1;
            core_we_o   <= 1'b0;
            core_cs_o   <= cs_q;
            core_word_o <= word_q;
            state_q     <= S_RD_CORE;
          end
        end
        S_RD_CORE: begin
          if (core_ack_i) begin
            rdata_q <= core_rdata_i;
            cnt_q   <= CW'(SYNC_STAGES - 1);
            state_q <= S_RD_RET;
          end
        end
        S_RD_RET: begin
          if (cnt_q != '0) cnt_q <= cnt_q - 1'b1;
        end
        S_WR_DATA: begin
          if (cnt_q != '0) cnt_q <= cnt_q - 1'b1;
          else if (!wr_busy_q) begin
            // Post the write: the bus is released in this clock.
            core_req_o   <= 1'b1;
            core_we_o    <= 1'b1;
            core_cs_o    <= cs_q;
            core_word_o  <= word_q;
            core_wdata_o <= hwdata;
            wr_busy_q    <= 1'b1;
          end
        end
        default: ;
      endcase

      // A completing data phase may overlap the next address phase.
      if (done) begin
        if (accept) begin
          cs_q    <= cs_dec;
          word_q  <= haddr[7:2];
          cnt_q   <= CW'(SYNC_STAGES - 1);
          state_q <= hwrite ? S_WR_DATA : S_RD_FWD;
        end else begin
          state_q <= S_IDLE;
        end
      end
    end
  end

  // Unused AHB-Lite control inputs: bursts are issued as single transfers
  // by the bridge, and protection/lock carry no meaning for the core.
  logic unused_ok;
  assign unused_ok = ^{htrans[0], haddr[31:16], haddr[11:8], haddr[1:0], hsize, hburst, hprot, hmastlock};

  // The core is never given a second request before acknowledging the first.
  property p_single_outstanding;
    @(posedge hclk) disable iff (!hresetn) core_req_o |=> !core_req_o;
  endproperty
  assert property (p_single_outstanding);
endmodule
