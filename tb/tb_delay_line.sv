// tb_delay_line: random code bits and epoch markers at every tap spacing
// from 1 to 4; each tap must be the input delayed by k*d+2 clocks and the
// epoch output the marker delayed by 2d+2 clocks.
module tb_delay_line;
  import gnss_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] sp;
  logic code = 0, ep = 0;
  logic [NUM_TAPS-1:0] taps;
  logic ep_o;
  int checks = 0, failures = 0;
  bit hist_c [$];
  bit hist_e [$];

  delay_line #(.MAX_SPACING(8)) dut (.clk_i(clk), .rst_ni(rst_n), .spacing_i(sp),
    .code_i(code), .epoch_i(ep), .taps_o(taps), .epoch_o(ep_o));
  always #5 clk = ~clk;

  initial begin
    sp = 1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int d = 1; d <= 4; d++) begin
      @(negedge clk) sp = 4'(d);
      hist_c.delete(); hist_e.delete();
      for (int t = 0; t < 300; t++) begin
        @(negedge clk);
        code = 1'($urandom); ep = ($urandom_range(0, 9) == 0);
        hist_c.push_front(code); hist_e.push_front(ep);
        @(posedge clk); #1;
        // hist[j] was driven j clocks before the current edge's input
        if (t >= 4 * d + 2) begin
          for (int k = 0; k < NUM_TAPS; k++) begin
            checks++;
            if (taps[k] != hist_c[k * d + 1]) begin
              failures++;
              if (failures < 10) $display("FAIL d=%0d tap %0d", d, k);
            end
          end
          checks++;
          if (ep_o != hist_e[2 * d + 1]) begin failures++; $display("FAIL d=%0d epoch", d); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
