// tb_final_down_conv: random 3-bit I/Q samples and three-level carrier
// values; the registered output must equal the complex product of the
// sample and the conjugate carrier, computed here with plain integers.
module tb_final_down_conv;
  import gnss_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  iq_sample_t iq;
  logic signed [1:0] c, s;
  logic signed [4:0] io, qo;
  int checks = 0, failures = 0;

  final_down_conv dut (.clk_i(clk), .rst_ni(rst_n), .iq_i(iq), .cos_i(c), .sin_i(s),
                       .i_o(io), .q_o(qo));
  always #5 clk = ~clk;

  initial begin
    int li, lq, ci, si, ei, eq;
    iq = '0; c = 0; s = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (500) begin
      @(negedge clk);
      iq = iq_sample_t'($urandom);
      ci = $urandom_range(0, 2) - 1;
      si = $urandom_range(0, 2) - 1;
      c = 2'(ci); s = 2'(si);
      li = level(iq.i); lq = level(iq.q);
      ei = li * ci + lq * si;
      eq = lq * ci - li * si;
      @(posedge clk); #1;
      checks++;
      if (int'(io) != ei || int'(qo) != eq) begin
        failures++;
        $display("FAIL I=%0d Q=%0d c=%0d s=%0d -> %0d %0d exp %0d %0d", li, lq, ci, si, io, qo, ei, eq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
