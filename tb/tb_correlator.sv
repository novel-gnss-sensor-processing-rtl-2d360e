// tb_correlator: random down-converted samples and code taps; at random dump
// points the ten observables must equal sums computed here, including the
// sample of the dump clock; a clear discards the running sums.
module tb_correlator;
  import gnss_pkg::*;
  localparam int W = 24;
  logic clk = 0, rst_n = 0, clr = 0, dump = 0;
  logic signed [4:0] ii = 0, qq = 0;
  logic [NUM_TAPS-1:0] cd = 0;
  logic signed [W-1:0] oi [NUM_TAPS];
  logic signed [W-1:0] oq [NUM_TAPS];
  logic valid;
  int checks = 0, failures = 0;
  int si [NUM_TAPS], sq [NUM_TAPS];
  int dumps = 0;

  correlator #(.ACC_W(W)) dut (.clk_i(clk), .rst_ni(rst_n), .clear_i(clr), .i_i(ii), .q_i(qq),
    .code_i(cd), .dump_i(dump), .obs_i_o(oi), .obs_q_o(oq), .obs_valid_o(valid));
  always #5 clk = ~clk;

  initial begin
    int ei [NUM_TAPS], eq [NUM_TAPS];
    bit do_check;
    foreach (si[k]) begin si[k] = 0; sq[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ii = 5'($urandom_range(0, 28) - 14);
      qq = 5'($urandom_range(0, 28) - 14);
      cd = NUM_TAPS'($urandom);
      dump = ($urandom_range(0, 199) == 0);
      clr = (t == 1500);
      do_check = 0;
      if (clr) begin
        foreach (si[k]) begin si[k] = 0; sq[k] = 0; end
      end else begin
        foreach (si[k]) begin
          si[k] += cd[k] ? -int'(ii) : int'(ii);
          sq[k] += cd[k] ? -int'(qq) : int'(qq);
        end
        if (dump) begin
          ei = si; eq = sq; do_check = 1;
          foreach (si[k]) begin si[k] = 0; sq[k] = 0; end
        end
      end
      @(posedge clk); #1;
      checks++;
      if (valid != do_check) begin failures++; $display("FAIL valid at %0d", t); end
      if (do_check) begin
        dumps++;
        foreach (ei[k]) begin
          checks += 2;
          if (int'(oi[k]) != ei[k] || int'(oq[k]) != eq[k]) begin
            failures++;
            $display("FAIL dump %0d tap %0d got %0d/%0d exp %0d/%0d", dumps, k, oi[k], oq[k], ei[k], eq[k]);
          end
        end
      end
    end
    checks++;
    if (dumps < 5) begin failures++; $display("FAIL too few dumps"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
