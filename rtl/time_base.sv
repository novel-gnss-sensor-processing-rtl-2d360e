// time_base: time base generator shared by all channels.
//
// Keeps the receiver's hardware time as a free-running count of samples and
// raises the measurement epoch (ME) strobe every period_i samples (20 ms,
// 97500 samples at 4.875 MHz, by default in the register file). At the
// strobe every channel latches its code and carrier state as ME observables.
// That a common time base drives the channels and that ME events occur about
// every 20 ms follows the receiver; the counter form is this design's choice.
//
// Timing: me_o is a one-clock pulse; the first comes period_i clocks after
// reset. A period_i of 0 stops ME strobes.
module time_base (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic [31:0] period_i,
  output logic [31:0] time_o,
  output logic        me_o
);
  logic [31:0] time_q, me_cnt_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      time_q   <= '0;
      me_cnt_q <= '0;
      me_o     <= 1'b0;
    end else begin
      time_q <= time_q + 1'b1;
      if (period_i != 0 && me_cnt_q + 1 >= period_i) begin
        me_cnt_q <= '0;
        me_o     <= 1'b1;
      end else begin
        me_cnt_q <= me_cnt_q + 1'b1;
        me_o     <= 1'b0;
      end
    end
  end

  assign time_o = time_q;
endmodule
