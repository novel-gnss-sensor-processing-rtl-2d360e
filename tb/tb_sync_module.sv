// tb_sync_module: an AHB-Lite master drives the Sync Module, behind which a
// simple register model answers reads after 2 clocks and writes after 4.
// Checks: address decoding to one-hot chip selects and word offsets, read
// data, that a read's data phase lasts 7 clocks (2 to the core, 2 in the
// core, 2 back, 1 to complete), that a posted write's lasts 2 clocks, and
// that an access right behind a posted write (read or write) waits until the
// core is done, and that back-to-back writes all reach the core.
module tb_sync_module;
  localparam int NCH = 4;
  logic clk = 0, rst_n = 0;
  logic [31:0] haddr = 0, hwdata = 0, hrdata;
  logic [1:0] htrans = 0;
  logic hwrite = 0, hreadyout, hresp;
  logic req, we, ack = 0;
  logic [NCH:0] cs;
  logic [5:0] word;
  logic [31:0] cwdata, crdata = 0;
  int checks = 0, failures = 0;
  logic [31:0] mem [NCH+1][64];
  int core_writes = 0;

  sync_module #(.NUM_CH(NCH), .SYNC_STAGES(2)) dut (
    .hclk(clk), .hresetn(rst_n), .hsel(1'b1), .haddr, .htrans, .hwrite, .hsize(3'd2),
    .hburst(3'd0), .hprot(4'd3), .hmastlock(1'b0), .hready(hreadyout), .hwdata,
    .hreadyout, .hresp, .hrdata, .core_req_o(req), .core_we_o(we), .core_cs_o(cs),
    .core_word_o(word), .core_wdata_o(cwdata), .core_ack_i(ack), .core_rdata_i(crdata));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 12) $display("FAIL %s", msg); end
  endtask

  function automatic int blk_of(logic [NCH:0] c);
    for (int i = 0; i <= NCH; i++) if (c == (1 << i)) return i;
    return -1;
  endfunction

  // core model
  initial begin
    forever begin
      @(posedge clk);
      if (req) begin
        int b, lat;
        logic [5:0] w; logic isw; logic [31:0] d;
        b = blk_of(cs); w = word; isw = we; d = cwdata;
        check(b >= 0 || cs == 0, "chip select is one-hot");
        lat = isw ? 4 : 2;
        fork begin
          repeat (lat - 1) @(posedge clk);
          #1;
          if (isw && b >= 0) begin mem[b][w] = d; core_writes++; end
          crdata = (b >= 0) ? mem[b][w] : 32'h0;
          ack = 1;
          @(posedge clk); #1 ack = 0;
        end join_none
      end
    end
  end

  // AHB master: one transfer, returns number of data-phase clocks
  task automatic ahb(input bit wr, input logic [31:0] a, input logic [31:0] wd,
                     output logic [31:0] rd, output int dp);
    @(negedge clk);
    while (!hreadyout) @(negedge clk);
    haddr = a; hwrite = wr; htrans = 2'b10;
    @(posedge clk); #1;
    htrans = 2'b00; hwdata = wd;
    dp = 1;
    while (!hreadyout) begin @(posedge clk); #1 dp++; end
    rd = hrdata;
    @(posedge clk); #1;
  endtask

  function automatic logic [31:0] addr_of(int blk, int w);
    return 32'h0040_0000 | (32'(blk == NCH ? 15 : blk) << 12) | (32'(w) << 2);
  endfunction

  initial begin
    logic [31:0] rd, exp [NCH+1][64];
    int dp;
    for (int b = 0; b <= NCH; b++) for (int w = 0; w < 64; w++) begin
      mem[b][w] = 0; exp[b][w] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    check(hreadyout && !hresp, "idle ready");
    // writes to every block, then read back
    for (int i = 0; i < 40; i++) begin
      int b, w; logic [31:0] d;
      b = $urandom_range(0, NCH); w = $urandom_range(0, 63); d = $urandom;
      ahb(1, addr_of(b, w), d, rd, dp);
      check(dp == 2, $sformatf("posted write data phase %0d clocks", dp));
      exp[b][w] = d;
      repeat (8) @(posedge clk);  // let the posted write finish
      ahb(0, addr_of(b, w), 0, rd, dp);
      check(rd == d, $sformatf("read back blk %0d word %0d got %h exp %h", b, w, rd, d));
      check(dp == 7, $sformatf("read data phase %0d clocks", dp));
    end
    // write immediately followed by a read of the same register: must wait
    ahb(1, addr_of(2, 5), 32'hCAFE_F00D, rd, dp);
    ahb(0, addr_of(2, 5), 0, rd, dp);
    check(rd == 32'hCAFE_F00D, "read after posted write sees the new value");
    check(dp > 7, $sformatf("read behind posted write waited (%0d clocks)", dp));
    // back-to-back writes: each one after the first waits for the one before
    for (int i = 0; i < 4; i++) begin
      ahb(1, addr_of(i, 10 + i), 32'h5A00_0000 + 32'(i), rd, dp);
      if (i > 0) check(dp > 2, $sformatf("write behind posted write waited (%0d clocks)", dp));
    end
    for (int i = 0; i < 4; i++) begin
      ahb(0, addr_of(i, 10 + i), 0, rd, dp);
      check(rd == 32'h5A00_0000 + 32'(i), $sformatf("back-to-back write %0d landed: %h", i, rd));
    end
    // unmapped block reads zero and selects nothing
    ahb(0, 32'h0000_8000, 0, rd, dp);
    check(rd == 0, "unmapped block reads zero");
    check(core_writes == 45, $sformatf("%0d core writes", core_writes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
