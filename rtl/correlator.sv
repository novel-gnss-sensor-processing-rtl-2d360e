// correlator: correlator unit of a channel.
//
// Cross-correlates the down-converted input with the five code replicas. For
// each tap there is an in-phase and a quadrature accumulator that adds the
// input sample when the replica chip is 0 and subtracts it when the chip is 1.
// On the last sample of an integration epoch (dump_i) each accumulator's total,
// including that sample, is copied to the observables and the accumulator
// restarts from zero. With +/-1 inputs a perfectly aligned replica therefore
// yields one count per sample (4875 for a 1 ms epoch at 4.875 MHz).
// Integrate-and-dump over an epoch follows the receiver; the accumulator width
// (ACC_W, wrapping on overflow) and chip-to-sign mapping are this design's.
//
// Timing: obs_i_o/obs_q_o and obs_valid_o update one clock after dump_i.
module correlator
  import gnss_pkg::*;
#(
  parameter int unsigned ACC_W = 24
) (
  input  logic                    clk_i,
  input  logic                    rst_ni,
  input  logic                    clear_i,
  input  logic signed [4:0]       i_i,
  input  logic signed [4:0]       q_i,
  input  logic [NUM_TAPS-1:0]     code_i,
  input  logic                    dump_i,
  output logic signed [ACC_W-1:0] obs_i_o [NUM_TAPS],
  output logic signed [ACC_W-1:0] obs_q_o [NUM_TAPS],
  output logic                    obs_valid_o
);
  logic signed [ACC_W-1:0] acc_i_q [NUM_TAPS];
  logic signed [ACC_W-1:0] acc_q_q [NUM_TAPS];
  logic signed [ACC_W-1:0] sum_i   [NUM_TAPS];
  logic signed [ACC_W-1:0] sum_q   [NUM_TAPS];

  always_comb begin
    for (int k = 0; k < NUM_TAPS; k++) begin
      sum_i[k] = code_i[k] ? acc_i_q[k] - ACC_W'(i_i) : acc_i_q[k] + ACC_W'(i_i);
      sum_q[k] = code_i[k] ? acc_q_q[k] - ACC_W'(q_i) : acc_q_q[k] + ACC_W'(q_i);
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int k = 0; k < NUM_TAPS; k++) begin
        acc_i_q[k] <= '0;
        acc_q_q[k] <= '0;
        obs_i_o[k] <= '0;
        obs_q_o[k] <= '0;
      end
      obs_valid_o <= 1'b0;
    end else begin
      obs_valid_o <= dump_i && !clear_i;
      for (int k = 0; k < NUM_TAPS; k++) begin
        if (clear_i) begin
          acc_i_q[k] <= '0;
          acc_q_q[k] <= '0;
        end else if (dump_i) begin
          acc_i_q[k] <= '0;
          acc_q_q[k] <= '0;
          obs_i_o[k] <= sum_i[k];
          obs_q_o[k] <= sum_q[k];
        end else begin
          acc_i_q[k] <= sum_i[k];
          acc_q_q[k] <= sum_q[k];
        end
      end
    end
  end
endmodule
