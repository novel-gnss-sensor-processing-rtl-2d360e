// tb_code_gen: loads a C/A code into the primary code RAM and runs the code
// NCO at the nominal 1.023 MHz / 4.875 MHz rate. Every output chip is compared
// with a reference NCO computed here; the epoch marker must fall on the last
// sample of every 1023-chip epoch (every 4875 samples), of every 4 ms
// tracking epoch (4092 chips, 19500 samples) and, with a shorter programmed
// epoch, every 100 chips.
module tb_code_gen;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic [31:0] freq;
  logic [gnss_pkg::EPOCH_W-1:0] ep_chips;
  logic we = 0; logic [4:0] waddr = 0; logic [31:0] wdata = 0;
  logic code, epoch;
  logic [31:0] phase; logic [9:0] chip;
  int checks = 0, failures = 0;

  code_gen #(.CODE_LEN(1023)) dut (.clk_i(clk), .rst_ni(rst_n), .enable_i(en), .freq_i(freq),
    .epoch_chips_i(ep_chips), .ram_we_i(we), .ram_addr_i(waddr), .ram_wdata_i(wdata),
    .code_o(code), .epoch_o(epoch), .phase_o(phase), .chip_o(chip));
  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  task automatic run(int epoch_len, int nsamp);
    longint acc;
    int rchip, ep_cnt, epochs, last_ep;
    bit rcarry, exp_ep;
    acc = 0; rchip = 0; ep_cnt = 0; epochs = 0; last_ep = -1;
    @(negedge clk);
    ep_chips = gnss_pkg::EPOCH_W'(epoch_len);
    en = 1;
    for (int n = 0; n < nsamp; n++) begin
      @(posedge clk); #1;
      // reference for sample n
      rcarry = ((acc + freq) >> 32) != 0;
      exp_ep = rcarry && (ep_cnt == epoch_len - 1);
      check(code == ca_chip(3, rchip), $sformatf("sample %0d chip %0d", n, rchip));
      check(epoch == exp_ep, $sformatf("sample %0d epoch=%b", n, epoch));
      if (epoch) begin
        if (epoch_len % 1023 == 0 && last_ep >= 0)
          check(n - last_ep == 4875 * (epoch_len / 1023), $sformatf("epoch length %0d", n - last_ep));
        last_ep = n; epochs++;
      end
      acc = (acc + freq) & 64'hFFFF_FFFF;
      if (rcarry) begin
        rchip = (rchip + 1) % 1023;
        ep_cnt = (ep_cnt + 1 == epoch_len) ? 0 : ep_cnt + 1;
      end
    end
    check(epochs >= 2, $sformatf("only %0d epochs", epochs));
    @(negedge clk) en = 0;
  endtask

  initial begin
    freq = 32'(((64'd1023 << 32) + 64'd4874) / 64'd4875);
    ep_chips = 1023;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    // load PRN 3
    for (int w = 0; w < 32; w++) begin
      @(negedge clk);
      we = 1; waddr = 5'(w);
      for (int b = 0; b < 32; b++) wdata[b] = (w * 32 + b < 1023) ? ca_chip(3, w * 32 + b) : 1'b0;
    end
    @(negedge clk) we = 0;
    run(1023, 3 * 4875 + 10);
    repeat (3) @(posedge clk);
    run(100, 2000);
    repeat (3) @(posedge clk);
    run(4092, 2 * 19500 + 10);   // 4 ms tracking epoch
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
