// tb_gnss_efpga_top: end-to-end test of the GNSS subsystem at its default
// parameters (four channels, 4875-sample LUT, 1023-chip code, 1 ms epochs,
// divide-by-8 clock). An AXI4 master on the LLPP side, clocked by the
// divided clock as the interconnect's port would be, does everything the
// receiver software does, through the AXI4-to-AHB-Lite bridge and the Sync
// Module:
//   - loads the PRN 1 code into all four code RAMs with 32-beat INCR bursts;
//   - sets channel 0 and 2 on the C/A generator (delay-line spacing 1 and 2
//     samples), channel 1 slaved to channel 0 and channel 3 slaved to
//     channel 2 with a carrier offset;
//   - runs once to learn the clock distance between the generator and
//     channel 0 start writes, then again with the generator delay chosen so
//     that the generator's code meets channel 0's Prompt replica;
//   - reads all observables with 10-beat INCR bursts and compares each with a
//     sample-exact reference computed here from the measured start clocks.
//     Channel 0 must give EE/E/P/L/LL = 2827/3851/4875/3851/2827 of 4875;
//   - switches channel 0 to the 4 ms tracking integration (4092 chips) and
//     checks its length (19500 clocks) and its Prompt (19500);
//   - sets the measurement epoch back to its 20 ms default and checks one
//     interval (97500 clocks, 5 epochs of 4 ms on channel 0, 20 of 1 ms on
//     channel 2);
//   - checks that an isolated register read takes 11 clocks from the AR
//     handshake to the R handshake (2+2+2+2+3 over bridge, Sync Module
//     and core), and an isolated posted write 5 from AW to B (3+2);
//   - checks interrupts, the epoch flag and its clear, the measurement epoch
//     and time, a FIXED burst, a read and a write issued together, and
//     DECERR outside the 4 MB window.
// Each mechanism is counted and one that never happened is a failure:
// integration-epoch interrupts, measurement epochs, read stalls (HREADYOUT
// low), accesses held behind a posted write, channel slaving, generator LUT
// wrap-around, DECERR, INCR and FIXED bursts, read/write arbitration, the
// clock division and the 1 ms to 4 ms integration switch. (The bridge timeout cannot occur here because the module
// always answers; the bridge's own testbench covers it.)
module tb_gnss_efpga_top;
  import gnss_pkg::*;
  import tb_ref_pkg::*;
  localparam int NCH = 4, LEN = 4875;

  logic clk39 = 0, rst_n = 1, gclk;
  logic [3:0] awid = 0, arid = 0, bid, rid;
  logic [31:0] awaddr = 0, araddr = 0, wdata = 0, rdata;
  logic [7:0] awlen = 0, arlen = 0;
  logic [1:0] awburst = 1, arburst = 1, bresp, rresp;
  logic awvalid = 0, awready, wvalid = 0, wready, wlast = 0, bvalid, bready = 0;
  logic arvalid = 0, arready, rvalid, rready = 0, rlast;
  logic [NCH-1:0] ie;
  logic me;
  int checks = 0, failures = 0, gcyc = 0;

  gnss_efpga_top dut (
    .clk_39m_i(clk39), .rst_ni(rst_n), .gnss_clk_o(gclk),
    .s_axi_awid(awid), .s_axi_awaddr(awaddr), .s_axi_awlen(awlen), .s_axi_awsize(3'd2),
    .s_axi_awburst(awburst), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wlast(wlast), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bid(bid), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready), .s_axi_arid(arid), .s_axi_araddr(araddr), .s_axi_arlen(arlen),
    .s_axi_arsize(3'd2), .s_axi_arburst(arburst), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rid(rid), .s_axi_rdata(rdata), .s_axi_rresp(rresp),
    .s_axi_rlast(rlast), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .ie_irq_o(ie), .me_irq_o(me));

  always #12.82 clk39 = ~clk39;   // 39 MHz

  // ---------------------------------------------------------- mechanisms
  typedef enum int {
    M_IE, M_ME, M_RD_STALL, M_POSTED_WAIT, M_SLAVING, M_GEN_WRAP, M_DECERR,
    M_INCR_BURST, M_FIXED_BURST, M_RW_ARB, M_CLK_DIV, M_IE_4MS, M_NUM
  } mech_e;
  string mech_name [M_NUM] = '{"integration-epoch interrupt", "measurement epoch",
    "read stall (HREADYOUT low)", "access held behind posted write", "channel slaving",
    "generator LUT wrap", "DECERR outside window", "INCR burst", "FIXED burst",
    "read/write arbitration", "clock division by 8", "switch to 4 ms integration"};
  int mech [M_NUM];
  int ie_count [NCH];
  int e_gen, e_ch [NCH];
  bit gen_prev, ch_prev [NCH];

  always @(posedge gclk) begin
    gcyc <= gcyc + 1;
    for (int n = 0; n < NCH; n++) if (ie[n]) begin ie_count[n]++; mech[M_IE]++; end
    if (me) mech[M_ME]++;
  end

  always @(negedge gclk) begin
    // start clocks: the gclk edge that applied the enabling write
    if (dut.u_gnss.u_core.gen_en_q && !gen_prev) e_gen = gcyc;
    gen_prev = dut.u_gnss.u_core.gen_en_q;
    for (int n = 0; n < NCH; n++) begin
      if (dut.u_gnss.u_core.cfg_q[n].enable && !ch_prev[n]) e_ch[n] = gcyc;
      ch_prev[n] = dut.u_gnss.u_core.cfg_q[n].enable;
    end
    if (!dut.u_gnss.u_sync.hreadyout) mech[M_RD_STALL] += (dut.u_gnss.u_sync.state_q != 0) ? 1 : 0;
    if (dut.u_gnss.u_sync.wr_busy_q && dut.u_gnss.u_sync.cnt_q == 0 &&
        (dut.u_gnss.u_sync.state_q == 1 || dut.u_gnss.u_sync.state_q == 4)) mech[M_POSTED_WAIT]++;
    if (dut.u_bridge.state_q == 0 && awvalid && arvalid) mech[M_RW_ARB]++;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 16) $display("FAIL %s", msg); end
  endtask

  function automatic logic [31:0] ra(int blk, int w);
    return 32'((blk << 12) | (w << 2));
  endfunction

  // ---------------------------------------------------------- AXI master
  logic [31:0] buf_w [64], buf_r [64];
  logic [1:0]  resp_r [64];
  int          t_ar, t_rv;   // clock counts at the AR handshake and the first RVALID
  int          t_aw, t_b;    // clock counts at the AW handshake and BVALID

  task automatic axi_wr(logic [31:0] a, int len, logic [1:0] burst, logic [3:0] id,
                        output logic [1:0] resp);
    @(posedge gclk); #1;
    awvalid = 1; awaddr = a; awlen = 8'(len); awburst = burst; awid = id;
    forever begin @(negedge gclk); if (awready) break; end
    t_aw = gcyc;
    @(posedge gclk); #1; awvalid = 0;
    for (int b = 0; b <= len; b++) begin
      wvalid = 1; wdata = buf_w[b]; wlast = (b == len);
      forever begin @(negedge gclk); if (wready) break; end
      @(posedge gclk); #1; wvalid = 0; wlast = 0;
    end
    bready = 1;
    forever begin @(negedge gclk); if (bvalid) break; end
    t_b = gcyc;
    resp = bresp;
    check(bid == id, "BID echoes AWID");
    @(posedge gclk); #1; bready = 0;
  endtask

  task automatic axi_rd(logic [31:0] a, int len, logic [1:0] burst, logic [3:0] id);
    @(posedge gclk); #1;
    arvalid = 1; araddr = a; arlen = 8'(len); arburst = burst; arid = id;
    forever begin @(negedge gclk); if (arready) break; end
    t_ar = gcyc;
    @(posedge gclk); #1; arvalid = 0; rready = 1;
    for (int b = 0; b <= len; b++) begin
      forever begin @(negedge gclk); if (rvalid) break; end
      if (b == 0) t_rv = gcyc;
      buf_r[b] = rdata; resp_r[b] = rresp;
      check(rid == id && rlast == (b == len), $sformatf("RID/RLAST beat %0d", b));
      @(posedge gclk); #1;
    end
    rready = 0;
  endtask

  task automatic wr1(int blk, int w, logic [31:0] d);
    logic [1:0] r;
    buf_w[0] = d;
    axi_wr(ra(blk, w), 0, 2'b01, 4'h1, r);
    check(r == AXI_OKAY, "write OKAY");
  endtask

  task automatic rd1(int blk, int w, output logic [31:0] d);
    axi_rd(ra(blk, w), 0, 2'b01, 4'h2);
    d = buf_r[0];
    check(resp_r[0] == AXI_OKAY, "read OKAY");
  endtask

  // ---------------------------------------------------------- reference
  bit code_bits [1023];
  bit lut_bits [LEN];
  localparam logic [31:0] FCODE = 32'(((64'd1023 << 32) + 64'(LEN) - 1) / 64'(LEN));

  function automatic int tbl_cos(logic [2:0] b);
    int t [8] = '{1, 1, 0, -1, -1, -1, 0, 1};
    return t[b];
  endfunction
  function automatic int tbl_sin(logic [2:0] b);
    int t [8] = '{0, 1, 1, 1, 0, -1, -1, -1};
    return t[b];
  endfunction

  // Observables of epoch ep (0-based) of a channel with delay-line spacing d
  // and carrier word fc, whose input sample s is generator LUT entry s + off
  // (a level of +1 before the generator starts).
  task automatic model(int ep, int off, int d, logic [31:0] fc,
                       output longint oi [NUM_TAPS], output longint oq [NUM_TAPS]);
    int chips, e, lo, hi;
    chips = 0; e = 0; lo = 0; hi = -1;
    for (int m = 0; e <= ep; m++) begin
      if ((((longint'(m) + 1) * FCODE) >> 32) != ((longint'(m) * FCODE) >> 32)) begin
        chips++;
        if (chips % 1023 == 0) begin
          if (e == ep - 1) lo = m + 2 * d + 1;
          if (e == ep) hi = m + 2 * d;
          e++;
        end
      end
    end
    foreach (oi[k]) begin oi[k] = 0; oq[k] = 0; end
    for (int s = lo; s <= hi; s++) begin
      int n, x, c, sn;
      logic [31:0] ph;
      n = s + off;
      x = (n < 0) ? 1 : chip_sign(lut_bits[n % LEN]);
      ph = 32'((longint'(s) + 1) * fc);
      c = tbl_cos(ph[31:29]); sn = tbl_sin(ph[31:29]);
      for (int k = 0; k < NUM_TAPS; k++) begin
        int mm, cs;
        mm = s - k * d;
        cs = (mm < 0) ? 1 : chip_sign(code_bits[int'(((longint'(mm) * FCODE) >> 32) % 1023)]);
        oi[k] += cs * (x * c + x * sn);
        oq[k] += cs * (x * c - x * sn);
      end
    end
  endtask

  // ---------------------------------------------------------- channel plan
  localparam logic [31:0] CARR3 = 32'd440_000;   // about 0.5 kHz at 4.875 MHz
  int          spacing [NCH] = '{1, 1, 2, 2};
  bit          slaved  [NCH] = '{0, 1, 0, 1};
  logic [31:0] carr    [NCH] = '{0, 0, 0, CARR3};

  task automatic start_all(int delay);
    wr1(15, G_GEN_CTRL, 0);
    for (int n = 0; n < NCH; n++) wr1(n, CH_CTRL, 32'(spacing[n] << 8) | (slaved[n] ? 32'h2 : 32'h0));
    wr1(15, G_GEN_DELAY, 32'(delay));
    wr1(15, G_GEN_CTRL, 1);
    for (int n = 0; n < NCH; n++) wr1(n, CH_CTRL, 32'(spacing[n] << 8) | (slaved[n] ? 32'h3 : 32'h1));
  endtask

  initial begin
    logic [31:0] v, t [4];
    logic [1:0] r;
    int delay, gap0, base [NCH];
    longint ei [NUM_TAPS], eq [NUM_TAPS];
    foreach (mech[i]) mech[i] = 0;
    foreach (ie_count[n]) ie_count[n] = 0;
    for (int k = 0; k < 1023; k++) code_bits[k] = ca_chip(1, k);
    for (int n = 0; n < LEN; n++) lut_bits[n] = code_bits[lut_chip(n, LEN)];
    // asynchronous reset: the divided clock is held during reset, so the
    // falling edge is what resets the GNSS-clock flops
    #1 rst_n = 0;
    repeat (5) @(posedge clk39);
    rst_n <= 1;
    // clock division
    begin
      int c0, c1;
      @(posedge gclk);
      c0 = 0;
      fork
        forever @(posedge clk39) c0++;
        @(posedge gclk);
      join_any
      disable fork;
      check(c0 == 8, $sformatf("39 MHz clocks per GNSS clock: %0d", c0));
      if (c0 == 8) mech[M_CLK_DIV]++;
    end
    // out-of-window accesses
    buf_w[0] = 32'h1;
    axi_wr(32'h0040_0000 | ra(15, G_GEN_CTRL), 0, 2'b01, 4'h5, r);
    check(r == AXI_DECERR, "write outside window DECERR");
    if (r == AXI_DECERR) mech[M_DECERR]++;
    axi_rd(32'h0040_0000, 0, 2'b01, 4'h6);
    check(resp_r[0] == AXI_DECERR, "read outside window DECERR");
    if (resp_r[0] == AXI_DECERR) mech[M_DECERR]++;
    rd1(15, G_GEN_CTRL, v);
    check(v[0] == 1'b0, "generator not started by the rejected write");
    // code RAMs, one 32-beat INCR burst per channel
    for (int w = 0; w < 32; w++)
      for (int b = 0; b < 32; b++) buf_w[w][b] = (w * 32 + b < 1023) ? code_bits[w * 32 + b] : 1'b0;
    for (int n = 0; n < NCH; n++) begin
      axi_wr(ra(n, CH_CODE_RAM), 31, 2'b01, 4'(n), r);
      check(r == AXI_OKAY, "code burst OKAY");
      mech[M_INCR_BURST]++;
    end
    for (int n = 0; n < NCH; n++) begin
      wr1(n, CH_CARR_FREQ, carr[n]);
    end
    // configuration read back with a burst
    axi_rd(ra(3, CH_CTRL), 3, 2'b01, 4'h7);
    check(buf_r[CH_CARR_FREQ] == CARR3 && buf_r[CH_CODE_FREQ] == FCODE &&
          buf_r[CH_EPOCH_CHIPS] == 1023, $sformatf("channel 3 configuration burst read %h %h %h %h", buf_r[0], buf_r[1], buf_r[2], buf_r[3]));
    mech[M_INCR_BURST]++;
    wr1(15, G_ME_PERIOD, 32'd3000);
    // calibration run
    start_all(0);
    gap0 = e_ch[0] - e_gen;
    wait (ie_count[NCH - 1] >= 1);
    // aligned run
    delay = gap0 + 2 * spacing[0];
    start_all(delay);
    check(e_ch[0] - e_gen == gap0, $sformatf("start clocks repeat: %0d vs %0d", e_ch[0] - e_gen, gap0));
    foreach (base[n]) base[n] = ie_count[n];
    wait (ie_count[NCH - 1] == base[NCH - 1] + 2);
    // read and check all observables (second epoch of each channel)
    for (int n = 0; n < NCH; n++) begin
      int off;
      check(ie_count[n] == base[n] + 2, $sformatf("channel %0d epochs %0d", n, ie_count[n] - base[n]));
      axi_rd(ra(n, CH_OBS_BASE), 2 * NUM_TAPS - 1, 2'b01, 4'(8 + n));
      mech[M_INCR_BURST]++;
      off = e_ch[n] - e_gen - delay - (slaved[n] ? 1 : 0);
      model(1, off, spacing[n], carr[n], ei, eq);
      for (int k = 0; k < NUM_TAPS; k++) begin
        check(longint'($signed(buf_r[k])) == ei[k],
              $sformatf("ch%0d I tap %0d got %0d exp %0d", n, k, $signed(buf_r[k]), ei[k]));
        check(longint'($signed(buf_r[NUM_TAPS + k])) == eq[k],
              $sformatf("ch%0d Q tap %0d got %0d exp %0d", n, k, $signed(buf_r[NUM_TAPS + k]), eq[k]));
      end
      $display("channel %0d I EE..LL: %0d %0d %0d %0d %0d", n, $signed(buf_r[0]), $signed(buf_r[1]),
               $signed(buf_r[2]), $signed(buf_r[3]), $signed(buf_r[4]));
      if (slaved[n] && $signed(buf_r[TAP_P]) != 0) mech[M_SLAVING]++;
      if (n == 0)
        check($signed(buf_r[TAP_EE]) == 2827 && $signed(buf_r[TAP_E]) == 3851 &&
              $signed(buf_r[TAP_P]) == 4875 && $signed(buf_r[TAP_L]) == 3851 &&
              $signed(buf_r[TAP_LL]) == 2827, "channel 0 correlation triangle");
    end
    // status and its clear
    rd1(15, G_IE_STATUS, v);
    check(v[NCH-1:0] == '1, $sformatf("all epoch flags set %b", v[NCH-1:0]));
    rd1(0, CH_STATUS, v);
    check(v[0] && v[31:16] == 16'(ie_count[0]), $sformatf("channel 0 status %h", v));
    wr1(0, CH_STATUS, 1);
    rd1(0, CH_STATUS, v);
    check(!v[0], "epoch flag cleared by writing 1");
    // time with a FIXED burst, measurement epochs
    axi_rd(ra(15, G_TIME), 3, 2'b00, 4'hA);
    for (int b = 1; b < 4; b++) check(buf_r[b] > buf_r[b - 1], "time advances within FIXED burst");
    mech[M_FIXED_BURST]++;
    rd1(0, CH_ME_CODE_PH, v);
    check(v != 0, "measurement-epoch code phase latched");
    check(mech[M_ME] >= (gcyc - 200) / 3000 - 30 && mech[M_ME] > 0, $sformatf("%0d measurement epochs", mech[M_ME]));
    // a read and a write together
    buf_w[0] = 32'h0000_1234;
    fork
      axi_wr(ra(2, CH_CARR_FREQ), 0, 2'b01, 4'hB, r);
      axi_rd(ra(15, G_TIME), 0, 2'b01, 4'hC);
    join
    check(r == AXI_OKAY && resp_r[0] == AXI_OKAY, "concurrent read and write");
    rd1(2, CH_CARR_FREQ, v);
    check(v == 32'h0000_1234, "concurrent write landed");
    // switch channel 0 to the 4 ms tracking integration
    begin
      int c, t0, len4;
      wr1(0, CH_EPOCH_CHIPS, 4 * 1023);
      c = ie_count[0];
      wait (ie_count[0] == c + 2);
      t0 = gcyc;
      wait (ie_count[0] == c + 3);
      len4 = gcyc - t0;
      check(len4 == 4 * LEN, $sformatf("4 ms epoch lasts %0d clocks", len4));
      @(negedge gclk);
      axi_rd(ra(0, CH_OBS_BASE), NUM_TAPS - 1, 2'b01, 4'hD);
      check($signed(buf_r[TAP_P]) == 4 * LEN && $signed(buf_r[TAP_E]) == 4 * 3851,
            $sformatf("4 ms Prompt %0d Early %0d", $signed(buf_r[TAP_P]), $signed(buf_r[TAP_E])));
      if (len4 == 4 * LEN) mech[M_IE_4MS]++;
    end
    // measurement epoch at its 20 ms default: one interval of 97500 clocks,
    // during which channel 0 (4 ms epochs) gives 5 sets of observables and
    // channel 2 (1 ms epochs) gives 20
    begin
      int m, t0, len_me, c0, c2;
      wr1(15, G_ME_PERIOD, 32'd97500);
      m = mech[M_ME];
      wait (mech[M_ME] == m + 1);
      wait (mech[M_ME] == m + 2);
      t0 = gcyc;
      c0 = ie_count[0];
      c2 = ie_count[2];
      wait (mech[M_ME] == m + 3);
      len_me = gcyc - t0;
      check(len_me == 97500, $sformatf("20 ms measurement epoch lasts %0d clocks", len_me));
      check(ie_count[0] - c0 == 5 && ie_count[2] - c2 == 20,
            $sformatf("epochs per 20 ms: channel 0 %0d, channel 2 %0d", ie_count[0] - c0, ie_count[2] - c2));
    end
    // generator wrap count
    rd1(15, G_GEN_CTRL, v);
    check(v[1:0] == 2'b11, "generator running");
    // an isolated register read over the whole path: 2 clocks in the bridge,
    // 2 to the core, 2 in it, 2 back, 3 in the bridge = 11 clocks from the AR
    // handshake to the R handshake
    check(t_rv - t_ar == 11, $sformatf("LLPP read takes %0d clocks", t_rv - t_ar));
    // an isolated posted write: 3 clocks in the bridge, 2 in the Sync Module
    // = 5 clocks from the AW handshake to the B handshake
    wr1(2, CH_CARR_FREQ, 32'h0000_1234);
    check(t_b - t_aw == 5, $sformatf("LLPP write takes %0d clocks", t_b - t_aw));
    mech[M_GEN_WRAP] = int'(v[31:16]);
    // report
    for (int i = 0; i < M_NUM; i++) begin
      $display("mechanism %-34s %0d", mech_name[i], mech[i]);
      check(mech[i] > 0, $sformatf("mechanism never happened: %s", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk39);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
