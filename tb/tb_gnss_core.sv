// tb_gnss_core: the receiver's code-correlation test at the core's register
// interface, at full size (4875 samples and 1023 chips per 1 ms epoch, four
// channels, PRN 1). Channel 0 gets the PRN 1 code in its code RAM, the
// generator start delay is chosen so that the generator's code meets the
// channel's Prompt replica, and channel 1 is slaved to channel 0's input.
// The ten observables of the second epoch of both channels are compared with
// a sample-by-sample reference; the Prompt must carry the peak. Also checked:
// read and write latencies (2 and 4 clocks), the epoch flag and its
// write-one-to-clear, epoch counts, measurement-epoch latching, the receiver
// time and the generator's table-pass counter.
module tb_gnss_core;
  import gnss_pkg::*;
  import tb_ref_pkg::*;
  localparam int NCH = 4, LEN = 4875, D = 1;

  logic clk = 0, rst_n = 0, req = 0, we = 0, ack;
  logic [NCH:0] cs = 0;
  logic [5:0] word = 0;
  logic [31:0] wdata = 0, rdata;
  logic [NCH-1:0] ie;
  logic me;
  int checks = 0, failures = 0, cyc = 0;
  int ie_count [NCH];
  int me_count = 0;

  gnss_core #(.NUM_CH(NCH), .LUT_LEN(LEN), .CODE_LEN(1023), .PRN(1), .ACC_W(24),
              .MAX_SPACING(8), .ME_PERIOD(97500), .RD_LAT(2), .WR_LAT(4)) dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .we_i(we), .cs_i(cs), .word_i(word),
    .wdata_i(wdata), .ack_o(ack), .rdata_o(rdata), .ie_irq_o(ie), .me_irq_o(me));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int n = 0; n < NCH; n++) if (ie[n]) ie_count[n]++;
    if (me) me_count++;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 12) $display("FAIL %s", msg); end
  endtask

  // returns the edge that applied the access
  task automatic access(bit w, int blk, logic [5:0] wd, logic [31:0] d,
                        output logic [31:0] rd, output int edge_no);
    int lat;
    @(negedge clk);
    req = 1; we = w; cs = '0; cs[blk] = 1'b1; word = wd; wdata = d;
    edge_no = cyc + 1;
    @(negedge clk) req = 0;
    lat = 1;
    while (!ack) begin @(negedge clk); lat++; end
    rd = rdata;
    check(lat == (w ? 4 : 2), $sformatf("%s latency %0d", w ? "write" : "read", lat));
  endtask

  task automatic wr(int blk, logic [5:0] wd, logic [31:0] d);
    logic [31:0] rd; int e;
    access(1, blk, wd, d, rd, e);
  endtask

  task automatic rd(int blk, logic [5:0] wd, output logic [31:0] d);
    int e;
    access(0, blk, wd, 0, d, e);
  endtask

  // reference observables of epoch ep (0-based) of a channel whose input
  // sample s is generator entry s - 2D + off
  task automatic model(int ep, int off, output longint o [NUM_TAPS]);
    logic [31:0] f;
    int chips, e, lo, hi;
    f = 32'(((64'd1023 << 32) + 64'(LEN) - 1) / 64'(LEN));
    chips = 0; e = 0; lo = 0; hi = -1;
    for (int m = 0; e <= ep; m++) begin
      if ((((longint'(m) + 1) * f) >> 32) != ((longint'(m) * f) >> 32)) begin
        chips++;
        if (chips % 1023 == 0) begin
          if (e == ep - 1) lo = m + 2 * D + 1;
          if (e == ep) hi = m + 2 * D;
          e++;
        end
      end
    end
    foreach (o[k]) o[k] = 0;
    for (int s = lo; s <= hi; s++) begin
      int n, xin;
      n = s - 2 * D + off;
      xin = (n < 0) ? 1 : chip_sign(ca_chip(1, lut_chip(n % LEN, LEN)));
      for (int k = 0; k < NUM_TAPS; k++) begin
        int mm;
        mm = s - k * D;
        o[k] += xin * ((mm < 0) ? 1 : chip_sign(ca_chip(1, int'(((longint'(mm) * f) >> 32) % 1023))));
      end
    end
  endtask

  initial begin
    logic [31:0] v, t1, t2;
    longint exp0 [NUM_TAPS], exp1 [NUM_TAPS];
    int e_gen, e_c0, e_c1, delay;
    foreach (ie_count[n]) ie_count[n] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    // code RAM of channels 0 and 1 with PRN 1
    for (int ch = 0; ch < 2; ch++)
      for (int w = 0; w < 32; w++) begin
        logic [31:0] d;
        for (int b = 0; b < 32; b++) d[b] = (w * 32 + b < 1023) ? ca_chip(1, w * 32 + b) : 1'b0;
        wr(ch, CH_CODE_RAM + 6'(w), d);
      end
    rd(0, CH_CODE_FREQ, v);
    check(v == 32'(((64'd1023 << 32) + 64'(LEN) - 1) / 64'(LEN)), "default code rate");
    rd(0, CH_EPOCH_CHIPS, v);
    check(v == 1023, "default epoch length");
    wr(NCH, G_ME_PERIOD, 32'd3000);
    wr(0, CH_CTRL, 32'h0000_0000 | (D << 8));
    wr(1, CH_CTRL, 32'h0000_0002 | (D << 8));
    // generator first, then the channels; delay chosen from the write edges:
    // generator entry 0 follows edge e_gen+1+delay, the channel's Prompt
    // replica of sample 0 needs the input after edge e_c0+1+2D.
    begin
      logic [31:0] dummy;
      // the gap between the two write edges is fixed by the access latency
      delay = 5 + 2 * D;   // e_c0 - e_gen is 5 for back-to-back writes, checked below
      wr(NCH, G_GEN_DELAY, 32'(delay));
      access(1, NCH, G_GEN_CTRL, 32'd1, dummy, e_gen);
      access(1, 0, CH_CTRL, 32'h0000_0001 | (D << 8), dummy, e_c0);
      access(1, 1, CH_CTRL, 32'h0000_0003 | (D << 8), dummy, e_c1);
      check(e_c0 - e_gen + 2 * D == delay, $sformatf("alignment: gap %0d", e_c0 - e_gen));
    end
    // wait for the second epoch of both channels
    wait (ie_count[0] == 2);
    @(negedge clk);
    model(1, 0, exp0);
    for (int k = 0; k < NUM_TAPS; k++) begin
      rd(0, CH_OBS_BASE + 6'(k), v);
      check(longint'($signed(v)) == exp0[k], $sformatf("ch0 I tap %0d got %0d exp %0d", k, $signed(v), exp0[k]));
      rd(0, CH_OBS_BASE + 6'(NUM_TAPS + k), t1);
      check(t1 == v, "ch0 Q equals I at zero carrier");
    end
    check(exp0[TAP_P] > exp0[TAP_E] && exp0[TAP_E] > exp0[TAP_EE] &&
          exp0[TAP_P] > exp0[TAP_L] && exp0[TAP_L] > exp0[TAP_LL] && exp0[TAP_P] > 4700,
          $sformatf("correlation peak at Prompt (%0d %0d %0d %0d %0d)",
                    exp0[0], exp0[1], exp0[2], exp0[3], exp0[4]));
    $display("channel 0 epoch 2 observables EE..LL: %0d %0d %0d %0d %0d of %0d",
             exp0[0], exp0[1], exp0[2], exp0[3], exp0[4], LEN);
    wait (ie_count[1] == 2);
    @(negedge clk);
    model(1, (e_c1 - e_gen) - 1 - delay + 2 * D, exp1);
    for (int k = 0; k < NUM_TAPS; k++) begin
      rd(1, CH_OBS_BASE + 6'(k), v);
      check(longint'($signed(v)) == exp1[k], $sformatf("ch1 I tap %0d got %0d exp %0d", k, $signed(v), exp1[k]));
    end
    // status: flag, count, clear
    rd(0, CH_STATUS, v);
    check(v[0] && v[31:16] == 16'(ie_count[0]), $sformatf("status %h count %0d", v, ie_count[0]));
    rd(NCH, G_IE_STATUS, v);
    check(v[1:0] == 2'b11 && v[3:2] == 2'b00, "global epoch flags");
    wr(0, CH_STATUS, 32'd1);
    rd(0, CH_STATUS, v);
    check(!v[0], "flag cleared");
    // measurement epochs and time
    rd(NCH, G_TIME, t1);
    rd(NCH, G_TIME, t2);
    check(t2 - t1 == 3, $sformatf("time advanced %0d", t2 - t1));
    check(me_count >= 3, $sformatf("%0d measurement epochs", me_count));
    rd(0, CH_ME_CODE_PH, v);
    check(v != 0, "ME code phase latched");
    rd(NCH, G_GEN_CTRL, v);
    check(v[1:0] == 2'b11 && v[31:16] >= 1, $sformatf("generator status %h", v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
