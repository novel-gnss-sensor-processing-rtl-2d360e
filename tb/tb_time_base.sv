// tb_time_base: the time counter must advance by one per clock and the
// measurement-epoch strobe must come exactly every period clocks, for two
// periods including the 97500-sample (20 ms) default, and stop at period 0.
module tb_time_base;
  logic clk = 0, rst_n = 0;
  logic [31:0] period, tnow;
  logic me;
  int checks = 0, failures = 0;

  time_base dut (.clk_i(clk), .rst_ni(rst_n), .period_i(period), .time_o(tnow), .me_o(me));
  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  task automatic measure(int p, int n);
    int last, cnt;
    logic [31:0] t0;
    last = -1; cnt = 0;
    @(negedge clk) period = 32'(p);
    t0 = tnow;
    for (int c = 1; cnt < n && c < p * (n + 2); c++) begin
      @(posedge clk); #1;
      if (me) begin
        if (last >= 0) check(c - last == p, $sformatf("period %0d exp %0d", c - last, p));
        last = c; cnt++;
      end
    end
    check(cnt == n, $sformatf("%0d strobes for period %0d", cnt, p));
    check(tnow - t0 > 32'(p), "time counter advances");
  endtask

  initial begin
    int seen;
    period = 10;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    measure(37, 5);
    measure(97500, 3);
    @(negedge clk) period = 0;
    seen = 0;
    repeat (500) begin @(posedge clk); #1 if (me) seen++; end
    check(seen == 0, "no strobe at period 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
