// tb_input_selector: random samples on both inputs; the registered output
// must follow the selected source one clock later.
module tb_input_selector;
  import gnss_pkg::*;
  logic clk = 0, rst_n = 0;
  input_src_e sel;
  iq_sample_t gen, prev, out;
  int checks = 0, failures = 0;

  input_selector dut (.clk_i(clk), .rst_ni(rst_n), .sel_i(sel), .gen_iq_i(gen),
                      .prev_iq_i(prev), .iq_o(out));
  always #5 clk = ~clk;

  initial begin
    iq_sample_t exp;
    sel = SRC_GENERATOR; gen = '0; prev = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (200) begin
      @(negedge clk);
      sel  = input_src_e'($urandom_range(0, 1));
      gen  = iq_sample_t'($urandom);
      prev = iq_sample_t'($urandom);
      exp  = (sel == SRC_PREV_CHAN) ? prev : gen;
      @(posedge clk); #1;
      checks++;
      if (out != exp) begin failures++; $display("FAIL sel=%0d out=%h exp=%h", sel, out, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
