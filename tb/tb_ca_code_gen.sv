// tb_ca_code_gen: checks the built-in C/A signal generator at its full size
// (4875 samples per 1 ms pass, PRN 1): the start delay, every sample of two
// passes of the table against the independently generated C/A code, I equal
// to Q, the +/-1 levels, the wrap marker at the last entry, and the first ten
// chips of PRN 1 (octal 1440 in the GPS specification).
module tb_ca_code_gen;
  import gnss_pkg::*;
  import tb_ref_pkg::*;

  localparam int LEN = 4875;
  localparam int DELAY = 7;

  logic clk = 0, rst_n = 0, en = 0;
  iq_sample_t iq;
  logic wrap, running;
  int checks = 0, failures = 0;

  ca_code_gen #(.LUT_LEN(LEN), .CODE_LEN(1023), .PRN(1)) dut (
    .clk_i(clk), .rst_ni(rst_n), .enable_i(en), .delay_i(32'(DELAY)),
    .iq_o(iq), .wrap_o(wrap), .running_o(running));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    int first10;
    first10 = 0;
    for (int k = 0; k < 10; k++) first10 = (first10 << 1) | int'(ca_chip(1, k));
    check(first10 == 'o1440, $sformatf("reference PRN1 first chips %o", first10));

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    en <= 1;
    // the edge that first samples enable starts the delay; entry 0 follows DELAY edges later
    @(posedge clk);
    #1 check(!running, "running at enable");
    repeat (DELAY - 1) begin
      @(posedge clk);
      #1 check(!running, "running during start delay");
    end
    for (int n = 0; n < 2 * LEN; n++) begin
      int exp_lvl;
      @(posedge clk);
      #1;
      exp_lvl = chip_sign(ca_chip(1, lut_chip(n % LEN, LEN)));
      check(level(iq.i) == exp_lvl, $sformatf("sample %0d I=%0d exp %0d", n, level(iq.i), exp_lvl));
      check(iq.q == iq.i, $sformatf("sample %0d Q differs", n));
      check(wrap == ((n % LEN) == LEN - 1), $sformatf("sample %0d wrap=%b", n, wrap));
    end
    en <= 0;
    @(posedge clk);
    #1 check(!running && level(iq.i) == 1, "disable stops the generator");
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
