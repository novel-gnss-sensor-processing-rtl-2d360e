// tb_gnss_channel: one channel with random 3-bit I/Q input, a random carrier
// frequency, a random code in the code RAM, the nominal code rate, 60-chip
// epochs and a delay-line spacing of 2 samples. A sample-by-sample reference
// (carrier NCO, complex mixing, code NCO, E/P/L offsets, Prompt-aligned
// epochs) predicts all ten observables of epochs 2 to 5, which must match
// exactly; the measurement-epoch latches are checked against the reference
// NCO states, and the input selector's slaving path is exercised.
module tb_gnss_channel;
  import gnss_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 24, D = 2, EPC = 60, NS = 2000;

  logic clk = 0, rst_n = 0, we = 0, me = 0;
  logic [4:0] waddr = 0; logic [31:0] wdata = 0;
  chan_cfg_t cfg;
  iq_sample_t gen = '0, prev = '0, iq_o;
  logic signed [W-1:0] oi [NUM_TAPS];
  logic signed [W-1:0] oq [NUM_TAPS];
  logic ie;
  logic [9:0] me_chip; logic [31:0] me_code, me_carr;
  int checks = 0, failures = 0;
  int cyc = 0;
  bit code_bits [1023];
  iq_sample_t xs [NS];

  gnss_channel #(.CODE_LEN(1023), .ACC_W(W), .MAX_SPACING(8)) dut (
    .clk_i(clk), .rst_ni(rst_n), .cfg_i(cfg), .ram_we_i(we), .ram_addr_i(waddr),
    .ram_wdata_i(wdata), .gen_iq_i(gen), .prev_iq_i(prev), .me_i(me), .iq_o(iq_o),
    .obs_i_o(oi), .obs_q_o(oq), .ie_o(ie), .me_chip_o(me_chip),
    .me_code_phase_o(me_code), .me_carr_phase_o(me_carr));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 12) $display("FAIL %s", msg); end
  endtask

  function automatic int tbl_cos(logic [2:0] b);
    int t [8] = '{1, 1, 0, -1, -1, -1, 0, 1};
    return t[b];
  endfunction
  function automatic int tbl_sin(logic [2:0] b);
    int t [8] = '{0, 1, 1, 1, 0, -1, -1, -1};
    return t[b];
  endfunction

  // chip of code sample m (0 before the channel starts)
  function automatic bit code_at(int m, logic [31:0] f);
    if (m < 0) return 1'b0;
    return code_bits[int'(((longint'(m) * f) >> 32) % 1023)];
  endfunction

  initial begin
    logic [31:0] fcode, fcarr;
    int B, ep_end [$], e_obs;
    longint ei [NUM_TAPS], eq [NUM_TAPS];
    int me_edge;

    fcode = 32'(((64'd1023 << 32) + 64'd4874) / 64'd4875);
    fcarr = $urandom;
    for (int k = 0; k < 1023; k++) code_bits[k] = 1'($urandom);
    for (int s = 0; s < NS; s++) xs[s] = iq_sample_t'($urandom);
    cfg = '{enable: 1'b0, input_sel: SRC_GENERATOR, dl_spacing: 4'(D), carr_freq: fcarr,
            code_freq: fcode, epoch_chips: EPOCH_W'(EPC)};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int w = 0; w < 32; w++) begin
      @(negedge clk);
      we = 1; waddr = 5'(w);
      for (int b = 0; b < 32; b++) wdata[b] = (w * 32 + b < 1023) ? code_bits[w * 32 + b] : 1'b0;
    end
    @(negedge clk) we = 0;
    cfg.enable = 1;
    B = cyc + 1;   // edge that first samples enable
    me_edge = B + 777;
    // epoch ends (last code sample of each epoch), then shifted to the Prompt
    begin
      int chips = 0;
      for (int m = 0; m < NS; m++) begin
        if ((((longint'(m) + 1) * fcode) >> 32) != ((longint'(m) * fcode) >> 32)) begin
          chips++;
          if (chips % EPC == 0) ep_end.push_back(m + 2 * D);
        end
      end
    end
    e_obs = 0;
    fork
      // drive samples: x(s) is visible after edge B+s
      begin
        for (int s = 0; s < NS; s++) begin
          wait (cyc == B + s);
          @(negedge clk);
          gen = xs[s];
          me = (cyc + 1 == me_edge);
        end
      end
      // collect observables
      begin
        while (e_obs < 6) begin
          @(posedge clk); #1;
          if (ie) begin
            if (e_obs >= 1 && e_obs <= 4) begin
              int lo, hi;
              lo = ep_end[e_obs - 1] + 1; hi = ep_end[e_obs];
              foreach (ei[k]) begin ei[k] = 0; eq[k] = 0; end
              for (int s = lo; s <= hi; s++) begin
                int li, lq, c, sn, bi, bq;
                logic [31:0] ph;
                li = level(xs[s].i); lq = level(xs[s].q);
                ph = 32'((longint'(s) + 1) * fcarr);
                c = tbl_cos(ph[31:29]); sn = tbl_sin(ph[31:29]);
                bi = li * c + lq * sn; bq = lq * c - li * sn;
                for (int k = 0; k < NUM_TAPS; k++) begin
                  ei[k] += chip_sign(code_at(s - k * D, fcode)) * bi;
                  eq[k] += chip_sign(code_at(s - k * D, fcode)) * bq;
                end
              end
              for (int k = 0; k < NUM_TAPS; k++) begin
                check(longint'(oi[k]) == ei[k], $sformatf("epoch %0d I tap %0d got %0d exp %0d", e_obs, k, oi[k], ei[k]));
                check(longint'(oq[k]) == eq[k], $sformatf("epoch %0d Q tap %0d got %0d exp %0d", e_obs, k, oq[k], eq[k]));
              end
            end
            e_obs++;
          end
        end
      end
    join
    // measurement epoch latches
    check(me_code == 32'(longint'(me_edge - B) * fcode), "ME code phase");
    check(me_carr == 32'(longint'(me_edge - B) * fcarr), "ME carrier phase");
    check(me_chip == 10'((((longint'(me_edge - B)) * fcode) >> 32) % 1023), "ME chip");
    // slaving path
    @(negedge clk) cfg.input_sel = SRC_PREV_CHAN;
    repeat (50) begin
      @(negedge clk) prev = iq_sample_t'($urandom); gen = iq_sample_t'($urandom);
      @(posedge clk); #1 check(iq_o == prev, "slaved input");
    end
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
