// tb_gnss_module: the GNSS Module (Sync Module and GNSS Core) driven by a
// pipelined AHB-Lite master with HSEL tied high and HREADY fed back from
// HREADYOUT, as in the SoC. Checks: write data phases of 2 clocks (posted)
// and read data phases of 7 clocks; a read issued right behind a write
// waits for the posted write and returns the new value; register read-back
// through the address decoder for channels and global block; unmapped blocks
// read as zero; HRESP stays OKAY; the measurement-epoch interrupt rate; and a
// channel fed by the C/A generator with the PRN 1 code raising its epoch
// interrupt, reporting it in its status word (cleared by writing 1) and
// giving a Prompt correlation near the full 4875 of a 1 ms epoch once the
// generator delay has been swept to the Prompt.
module tb_gnss_module;
  import gnss_pkg::*;
  import tb_ref_pkg::*;
  localparam int NCH = 4;

  logic clk = 0, rst_n = 0;
  logic [31:0] haddr = 0, hwdata = 0, hrdata;
  logic [1:0] htrans = HTRANS_IDLE;
  logic hwrite = 0, hreadyout, hresp;
  logic [NCH-1:0] ie;
  logic me;
  int checks = 0, failures = 0, me_count = 0, resp_err = 0;
  int ie_count [NCH];

  gnss_module #(.NUM_CH(NCH)) dut (
    .hclk(clk), .hresetn(rst_n), .hsel(1'b1), .haddr(haddr), .htrans(htrans),
    .hwrite(hwrite), .hsize(3'b010), .hburst(HBURST_SINGLE), .hprot(4'b0011),
    .hmastlock(1'b0), .hready(hreadyout), .hwdata(hwdata), .hreadyout(hreadyout),
    .hresp(hresp), .hrdata(hrdata), .ie_irq_o(ie), .me_irq_o(me));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (me) me_count++;
    for (int n = 0; n < NCH; n++) if (ie[n]) ie_count[n]++;
    if (rst_n && hresp) resp_err++;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 12) $display("FAIL %s", msg); end
  endtask

  function automatic logic [31:0] ra(int blk, int w);
    return 32'((blk << 12) | (w << 2));
  endfunction

  // pipelined transfer sequence
  bit          sq_w [16];
  logic [31:0] sq_a [16], sq_d [16], sq_r [16];
  int          sq_len [16];

  task automatic run_seq(int n);
    int i, dp, cnt, acc;
    i = 0; dp = -1; cnt = 0;
    @(posedge clk); #1;
    htrans = HTRANS_NONSEQ; hwrite = sq_w[0]; haddr = sq_a[0]; i = 1;
    forever begin
      @(negedge clk);
      cnt++;
      if (hreadyout) begin
        if (dp >= 0) begin sq_r[dp] = hrdata; sq_len[dp] = cnt; end
        acc = (htrans == HTRANS_NONSEQ) ? i - 1 : -1;
        @(posedge clk); #1;
        dp = acc; cnt = 0;
        if (dp >= 0) hwdata = sq_d[dp];
        if (i < n) begin
          htrans = HTRANS_NONSEQ; hwrite = sq_w[i]; haddr = sq_a[i]; i++;
        end else begin
          htrans = HTRANS_IDLE; hwrite = 0; i = n + 1;
        end
        if (dp < 0) break;
      end
    end
  endtask

  task automatic wr(int blk, int w, logic [31:0] d);
    sq_w[0] = 1; sq_a[0] = ra(blk, w); sq_d[0] = d;
    run_seq(1);
  endtask

  task automatic rd(int blk, int w, output logic [31:0] d);
    sq_w[0] = 0; sq_a[0] = ra(blk, w);
    run_seq(1);
    d = sq_r[0];
  endtask

  initial begin
    logic [31:0] v;
    int best_p, best_dly;
    foreach (ie_count[n]) ie_count[n] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // single write and read: data phase lengths
    wr(2, CH_CARR_FREQ, 32'h1234_5678);
    check(sq_len[0] == 2, $sformatf("write data phase %0d", sq_len[0]));
    repeat (8) @(posedge clk);
    rd(2, CH_CARR_FREQ, v);
    check(v == 32'h1234_5678, "carrier word read back");
    check(sq_len[0] == 7, $sformatf("read data phase %0d", sq_len[0]));
    // write immediately followed by a read of the same register
    sq_w[0] = 1; sq_a[0] = ra(1, CH_CODE_FREQ); sq_d[0] = 32'hCAFE_0001;
    sq_w[1] = 0; sq_a[1] = ra(1, CH_CODE_FREQ);
    run_seq(2);
    check(sq_len[0] == 2, "posted write data phase");
    check(sq_len[1] > 7, $sformatf("read behind posted write stalls: %0d", sq_len[1]));
    check(sq_r[1] == 32'hCAFE_0001, "read after write returns new value");
    // pipelined burst of writes to every channel, then reads
    for (int n = 0; n < NCH; n++) begin
      sq_w[n] = 1; sq_a[n] = ra(n, CH_EPOCH_CHIPS); sq_d[n] = 32'(100 + n);
      sq_w[NCH + n] = 0; sq_a[NCH + n] = ra(n, CH_EPOCH_CHIPS);
    end
    run_seq(2 * NCH);
    for (int n = 0; n < NCH; n++)
      check(sq_r[NCH + n] == 32'(100 + n), $sformatf("channel %0d epoch length %0d", n, sq_r[NCH + n]));
    // global block and unmapped block
    wr(15, G_GEN_DELAY, 32'd77);
    rd(15, G_GEN_DELAY, v);
    check(v == 77, "global register read back");
    rd(5, CH_CARR_FREQ, v);
    check(v == 0, "unmapped block reads zero");
    rd(2, 7, v);
    check(v == 0, "unused channel word reads zero");
    // measurement epoch rate
    wr(15, G_ME_PERIOD, 32'd200);
    me_count = 0;
    repeat (2000) @(posedge clk);
    check(me_count == 10, $sformatf("measurement epochs %0d in 2000 clocks", me_count));
    wr(15, G_ME_PERIOD, 32'd0);
    // channel 2 on the generator with the PRN 1 code
    for (int w = 0; w < 32; w++) begin
      logic [31:0] d;
      for (int b = 0; b < 32; b++) d[b] = (w * 32 + b < 1023) ? ca_chip(1, w * 32 + b) : 1'b0;
      wr(2, CH_CODE_RAM + w, d);
    end
    wr(2, CH_CARR_FREQ, 0);
    wr(2, CH_CODE_FREQ, 32'(((64'd1023 << 32) + 64'd4874) / 64'd4875));
    wr(2, CH_EPOCH_CHIPS, 1023);
    best_p = -100000; best_dly = -1;
    for (int dly = 0; dly < 24; dly++) begin
      int c0;
      wr(2, CH_CTRL, 32'h100);
      wr(15, G_GEN_CTRL, 0);
      wr(15, G_GEN_DELAY, dly);
      wr(15, G_GEN_CTRL, 1);
      wr(2, CH_CTRL, 32'h101);
      c0 = ie_count[2];
      wait (ie_count[2] == c0 + 2);
      rd(2, CH_OBS_BASE + TAP_P, v);
      if ($signed(v) > best_p) begin best_p = $signed(v); best_dly = dly; end
    end
    $display("best Prompt %0d at generator delay %0d", best_p, best_dly);
    check(best_p > 4700 && best_p <= 4875, $sformatf("Prompt peak %0d", best_p));
    rd(2, CH_OBS_BASE + TAP_E, v);
    check($signed(v) < best_p, "Early below Prompt");
    rd(2, CH_OBS_BASE + NUM_TAPS + TAP_E, hwdata);
    check(hwdata == v, "Q equals I");
    rd(2, CH_STATUS, v);
    check(v[0] == 1'b1 && v[31:16] == 16'(ie_count[2]), $sformatf("status %h", v));
    rd(15, G_IE_STATUS, v);
    check(v[3:0] == 4'b0100, $sformatf("global epoch flags %b", v[3:0]));
    wr(2, CH_STATUS, 1);
    rd(2, CH_STATUS, v);
    check(v[0] == 1'b0, "epoch flag cleared");
    check(ie_count[0] == 0 && ie_count[1] == 0 && ie_count[3] == 0, "idle channels silent");
    rd(15, G_GEN_CTRL, v);
    check(v[1:0] == 2'b11, "generator running");
    check(resp_err == 0, "HRESP always OKAY");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
