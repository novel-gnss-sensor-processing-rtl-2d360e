// tb_axi2ahb_bridge: an AXI4 master drives the bridge, whose AHB-Lite side
// is answered by a memory model with random wait states. Checks: single and
// 4-beat INCR writes and reads land at the right addresses with the right
// data; FIXED bursts keep the address; a request outside the 4 MB window gets
// DECERR and never reaches AHB; an AHB ERROR response gives SLVERR; a slave
// that never answers is cut off with SLVERR after 256 clocks, and the bridge
// works normally afterwards. On normal transfers the R handshake must come
// 3 clocks and the B handshake 1 clock after the AHB data phase ends (the
// bridge's default response delays), and a read must reach the AHB
// address phase in the clock after the AR handshake.
module tb_axi2ahb_bridge;
  import gnss_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] awid = 0, arid = 0, bid, rid;
  logic [31:0] awaddr = 0, araddr = 0, wdata = 0, rdata;
  logic [7:0] awlen = 0, arlen = 0;
  logic [2:0] awsize = 2, arsize = 2;
  logic [1:0] awburst = 1, arburst = 1, bresp, rresp;
  logic awvalid = 0, awready, wvalid = 0, wready, wlast = 0, bvalid, bready = 0;
  logic arvalid = 0, arready, rvalid, rready = 0, rlast;
  logic [31:0] haddr, hwdata, hrdata = 0;
  logic [1:0] htrans; logic hwrite, hmastlock, hready = 1, hresp = 0;
  logic [2:0] hsize, hburst; logic [3:0] hprot;
  int checks = 0, failures = 0;
  logic [31:0] mem [logic [31:0]];
  int ahb_transfers = 0;
  // Time of the clock edge that ended the last AHB data phase, and whether
  // the response delays are checked (normal transfers only).
  time t_done = 0;
  bit  lat_check = 0;
  int  lat_checks = 0;

  axi2ahb_bridge #(.ID_W(4), .BASE_ADDR(32'h0), .WIN_BITS(22), .TIMEOUT(256)) dut (
    .aclk(clk), .aresetn(rst_n),
    .s_axi_awid(awid), .s_axi_awaddr(awaddr), .s_axi_awlen(awlen), .s_axi_awsize(awsize),
    .s_axi_awburst(awburst), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(4'hF), .s_axi_wlast(wlast), .s_axi_wvalid(wvalid),
    .s_axi_wready(wready), .s_axi_bid(bid), .s_axi_bresp(bresp), .s_axi_bvalid(bvalid),
    .s_axi_bready(bready), .s_axi_arid(arid), .s_axi_araddr(araddr), .s_axi_arlen(arlen),
    .s_axi_arsize(arsize), .s_axi_arburst(arburst), .s_axi_arvalid(arvalid),
    .s_axi_arready(arready), .s_axi_rid(rid), .s_axi_rdata(rdata), .s_axi_rresp(rresp),
    .s_axi_rlast(rlast), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .haddr, .htrans, .hwrite, .hsize, .hburst, .hprot, .hmastlock, .hwdata,
    .hready, .hresp, .hrdata);

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 12) $display("FAIL %s", msg); end
  endtask

  // AHB slave model. Address 0x3000xx answers ERROR, 0x3100xx never answers
  // within 300 clocks.
  initial begin
    logic [31:0] a; logic w, busy, err, errph; int cnt;
    busy = 0; err = 0; errph = 0; cnt = 0; a = 0; w = 0;
    forever begin
      bit start;
      @(posedge clk);
      start = (htrans == HTRANS_NONSEQ) && hready;
      if (busy && hready) begin
        t_done = $time;
        if (w && !err) mem[a] = hwdata;
        busy = 0;
      end
      if (start) begin
        a = haddr; w = hwrite; busy = 1; ahb_transfers++;
        err = (a[23:8] == 16'h3000); errph = 0;
        cnt = (a[23:8] == 16'h3100) ? 300 : $urandom_range(0, 3);
      end
      #1;
      if (!busy) begin
        hready = 1; hresp = 0; hrdata = 0;
      end else if (err) begin
        hresp = 1; hready = errph; errph = 1;
      end else if (cnt > 0) begin
        hready = 0; cnt--;
      end else begin
        hready = 1; hresp = 0;
        if (!w) hrdata = mem.exists(a) ? mem[a] : 32'hDEAD_BEEF;
      end
    end
  end

  task automatic axi_write(logic [31:0] a, int len, logic [1:0] burst, logic [31:0] d [],
                           output logic [1:0] resp);
    @(negedge clk);
    awaddr = a; awlen = 8'(len - 1); awburst = burst; awid = 4'(len); awvalid = 1;
    do @(posedge clk); while (!awready);
    #1 awvalid = 0;
    for (int i = 0; i < len; i++) begin
      wdata = d[i]; wlast = (i == len - 1); wvalid = 1;
      do @(posedge clk); while (!wready);
      #1 wvalid = 0;
    end
    bready = 1;
    do @(posedge clk); while (!bvalid);
    if (lat_check) begin
      check(($time - t_done) / 10 == 1, $sformatf("BVALID %0d clocks after the data phase", ($time - t_done) / 10));
      lat_checks++;
    end
    resp = bresp;
    check(bid == 4'(len), "BID echoes AWID");
    #1 bready = 0;
  endtask

  task automatic axi_read(logic [31:0] a, int len, logic [1:0] burst, output logic [31:0] d [],
                          output logic [1:0] resp);
    d = new[len];
    resp = AXI_OKAY;
    @(negedge clk);
    araddr = a; arlen = 8'(len - 1); arburst = burst; arid = 4'(len + 1); arvalid = 1;
    do @(posedge clk); while (!arready);
    #1 arvalid = 0; rready = 1;
    for (int i = 0; i < len; i++) begin
      do @(posedge clk); while (!rvalid);
      if (lat_check) begin
        check(($time - t_done) / 10 == 3, $sformatf("RVALID %0d clocks after the data phase", ($time - t_done) / 10));
        lat_checks++;
      end
      d[i] = rdata;
      if (rresp != AXI_OKAY) resp = rresp;
      check(rlast == (i == len - 1), $sformatf("RLAST on beat %0d", i));
      check(rid == 4'(len + 1), "RID echoes ARID");
    end
    #1 rready = 0;
  endtask

  initial begin
    logic [31:0] d [], r [];
    logic [1:0] resp;
    int t0, n0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // single and burst writes/reads, with the response delays checked
    lat_check = 1;
    for (int it = 0; it < 20; it++) begin
      int len; logic [31:0] a;
      len = (it % 2) ? 4 : 1;
      a = {10'd0, 14'($urandom), 8'($urandom) & 8'hF0};
      d = new[len];
      foreach (d[i]) d[i] = $urandom;
      axi_write(a, len, 2'b01, d, resp);
      check(resp == AXI_OKAY, "write OKAY");
      foreach (d[i]) check(mem.exists(a + 4 * i) && mem[a + 4 * i] == d[i], $sformatf("write beat %0d at %h", i, a + 4 * i));
      axi_read(a, len, 2'b01, r, resp);
      check(resp == AXI_OKAY, "read OKAY");
      foreach (d[i]) check(r[i] == d[i], $sformatf("read beat %0d got %h exp %h", i, r[i], d[i]));
    end
    lat_check = 0;
    check(lat_checks == 70, $sformatf("%0d response delays checked", lat_checks));
    // forward time: a read reaches the AHB address phase in the clock after
    // the AR handshake, so the slave samples it 2 clocks after ARVALID is seen
    begin
      time t_ar;
      @(negedge clk);
      araddr = 32'h200; arlen = 0; arburst = 1; arid = 4'h9; arvalid = 1;
      do @(posedge clk); while (!arready);
      t_ar = $time;
      #1 arvalid = 0; rready = 1;
      do @(posedge clk); while (!(htrans == HTRANS_NONSEQ && hready));
      check(($time - t_ar) / 10 == 1, $sformatf("read address phase %0d clocks after AR", ($time - t_ar) / 10));
      do @(posedge clk); while (!rvalid);
      #1 rready = 0;
    end
    // FIXED burst: every beat to one address, last one wins
    d = new[3]; d = '{32'h1, 32'h2, 32'h3};
    axi_write(32'h100, 3, 2'b00, d, resp);
    check(mem[32'h100] == 32'h3 && !mem.exists(32'h104), "FIXED burst keeps the address");
    // outside the 4 MB window
    n0 = ahb_transfers;
    d = new[1]; d[0] = 32'h55;
    axi_write(32'h0040_0000, 1, 2'b01, d, resp);
    check(resp == AXI_DECERR, "write outside window -> DECERR");
    axi_read(32'h0080_0010, 2, 2'b01, r, resp);
    check(resp == AXI_DECERR, "read outside window -> DECERR");
    check(ahb_transfers == n0, "no AHB transfer outside the window");
    // AHB ERROR
    axi_read(32'h0030_0004, 1, 2'b01, r, resp);
    check(resp == AXI_SLVERR, "AHB ERROR -> SLVERR");
    // timeout
    t0 = $time / 10;
    axi_write(32'h0031_0000, 1, 2'b01, d, resp);
    check(resp == AXI_SLVERR, "timeout -> SLVERR");
    check(($time / 10) - t0 >= 256 && ($time / 10) - t0 < 270, $sformatf("timeout after %0d clocks", ($time / 10) - t0));
    // works afterwards (the slave model finishes its stalled transfer first)
    d[0] = 32'h1234_5678;
    axi_write(32'h200, 1, 2'b01, d, resp);
    axi_read(32'h200, 1, 2'b01, r, resp);
    check(resp == AXI_OKAY && r[0] == 32'h1234_5678, "bridge recovers after timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
