// tb_carrier_gen: programs random carrier NCO words and compares the phase
// and the three-level cos/sin replica with a reference model clock by clock;
// also checks that zero frequency gives cos=+1, sin=0 and that disabling
// returns the phase to zero.
module tb_carrier_gen;
  logic clk = 0, rst_n = 0, en = 0;
  logic [31:0] freq = 0, phase;
  logic signed [1:0] c, s;
  int checks = 0, failures = 0;

  carrier_gen dut (.clk_i(clk), .rst_ni(rst_n), .enable_i(en), .freq_i(freq),
                   .phase_o(phase), .cos_o(c), .sin_o(s));
  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    logic [31:0] ref_ph, prev_ph;
    int ec, es;
    real ang;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    en <= 1; freq <= 0;
    repeat (5) @(posedge clk);
    #1 check(c == 1 && s == 0, "zero frequency replica");
    for (int t = 0; t < 4; t++) begin
      @(negedge clk);
      freq = $urandom;
      ref_ph = phase;
      repeat (300) begin
        @(posedge clk); #1;
        prev_ph = ref_ph;
        ref_ph = ref_ph + freq;
        check(phase == ref_ph, "phase accumulation");
        // replica reflects the phase of the previous clock
        ang = 2.0 * 3.14159265358979 * (real'(prev_ph[31:29]) / 8.0);
        ec = int'($rtoi($cos(ang) + (($cos(ang) >= 0) ? 0.5 : -0.5)));
        es = int'($rtoi($sin(ang) + (($sin(ang) >= 0) ? 0.5 : -0.5)));
        check(int'(c) == ec && int'(s) == es,
              $sformatf("bin %0d cos=%0d sin=%0d exp %0d %0d", prev_ph[31:29], c, s, ec, es));
      end
    end
    @(negedge clk) en = 0;
    @(posedge clk); #1 check(phase == 0, "disable clears phase");
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
