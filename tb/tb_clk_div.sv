// tb_clk_div: checks the divide-by-8 GNSS Core clock: period of 8 source
// clocks, 50 % duty cycle, and output held low in reset.
module tb_clk_div;
  logic clk = 0, rst_n = 0, clk_o;
  int checks = 0, failures = 0;
  int edges_in = 0, last_rise = -1, high_cnt = 0, periods = 0;

  clk_div #(.DIV(8)) dut (.clk_i(clk), .rst_ni(rst_n), .clk_o);

  always #5 clk = ~clk;

  logic clk_o_d = 0;
  always @(posedge clk) begin
    edges_in++;
    if (rst_n) begin
      if (clk_o) high_cnt++;
      if (clk_o && !clk_o_d) begin
        if (last_rise >= 0) begin
          checks++;
          if (edges_in - last_rise != 8) begin
            failures++;
            $display("FAIL period %0d", edges_in - last_rise);
          end
          checks++;
          if (high_cnt != 5) begin
            failures++;
            $display("FAIL high time %0d", high_cnt);
          end
          periods++;
        end
        last_rise = edges_in;
        high_cnt = 1;
      end
    end
    clk_o_d = clk_o;
  end

  initial begin
    repeat (5) @(posedge clk);
    checks++;
    if (clk_o !== 1'b0) begin failures++; $display("FAIL output not low in reset"); end
    rst_n = 1;
    repeat (100) @(posedge clk);
    checks++;
    if (periods < 10) begin failures++; $display("FAIL only %0d periods", periods); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
