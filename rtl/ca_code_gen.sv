// ca_code_gen: built-in GPS L1 C/A baseband signal generator.
//
// Instead of an RF front-end, the GNSS Core is fed from a look-up table holding
// one C/A code period sampled at the core clock: LUT_LEN samples (4875 =
// 4.875 MHz x 1 ms) over which the CODE_LEN = 1023 chips are spread, so that
// one pass of the table lasts exactly one 1 ms integration epoch and the
// signal has no phase drift between epochs. A sample counter steps through the
// table once per clock and wraps from the last entry to the first. The residual
// carrier is zero, so I and Q carry the same value; each is +1 or -1 in the
// 3-bit sample format. All of this follows the receiver's test set-up.
//
// This design's choices: the table is computed at elaboration from the GPS
// G1/G2 shift registers (PRN selects the satellite), entry n holds chip
// floor(n*CODE_LEN/LUT_LEN); chip value 0 is sent as +1 and 1 as -1; a start
// delay (in samples, counted after enable rises) lets software line the
// signal up with a channel's code; while disabled or waiting the output is +1.
//
// Timing: iq_o and wrap_o are registered. The first table entry appears on
// iq_o delay_i clocks after the clock edge that first samples enable_i high
// (at that edge itself for a delay of 0), then one entry per clock.
// wrap_o is high while iq_o shows the last entry of the table.
module ca_code_gen
  import gnss_pkg::*;
#(
  parameter int unsigned LUT_LEN  = 4875,
  parameter int unsigned CODE_LEN = 1023,
  parameter int unsigned PRN      = 1      // 1..32
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        enable_i,
  input  logic [31:0] delay_i,
  output iq_sample_t  iq_o,
  output logic        wrap_o,
  output logic        running_o
);
  localparam int unsigned IW = $clog2(LUT_LEN);

  // G2 output taps (stage numbers 1..10) for PRN 1..32.
  function automatic int unsigned g2_tap(int unsigned prn, bit second);
    int unsigned t1 [32] = '{2,3,4,5,1,2,1,2,3,2,3,5,6,7,8,9,1,2,3,4,5,6,1,4,5,6,7,8,1,2,3,4};
    int unsigned t2 [32] = '{6,7,8,9,9,10,8,9,10,3,4,6,7,8,9,10,4,5,6,7,8,9,3,6,7,8,9,10,6,7,8,9};
    return second ? t2[prn-1] : t1[prn-1];
  endfunction

  // One period of the C/A code; bit k is chip k.
  function automatic logic [1022:0] ca_code(int unsigned prn);
    logic [10:1] g1, g2;
    logic        f1, f2;
    logic [1022:0] code;
    g1 = '1;
    g2 = '1;
    for (int k = 0; k < 1023; k++) begin
      code[k] = g1[10] ^ g2[g2_tap(prn, 1'b0)] ^ g2[g2_tap(prn, 1'b1)];
      f1 = g1[3] ^ g1[10];
      f2 = g2[2] ^ g2[3] ^ g2[6] ^ g2[8] ^ g2[9] ^ g2[10];
      g1 = {g1[9:1], f1};
      g2 = {g2[9:1], f2};
    end
    return code;
  endfunction

  function automatic logic [LUT_LEN-1:0] build_lut();
    logic [1022:0] code;
    logic [LUT_LEN-1:0] lut;
    code = ca_code(PRN);
    for (int unsigned n = 0; n < LUT_LEN; n++)
      lut[n] = code[(n * CODE_LEN / LUT_LEN) % 1023];
    return lut;
  endfunction

  localparam logic [LUT_LEN-1:0] LUT = build_lut();

  logic [31:0]   wait_q;
  logic [IW-1:0] idx_q;
  logic          run_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wait_q <= '0;
      idx_q  <= '0;
      run_q  <= 1'b0;
      iq_o   <= '0;
      wrap_o <= 1'b0;
    end else if (!enable_i) begin
      wait_q <= '0;
      idx_q  <= '0;
      run_q  <= 1'b0;
      iq_o   <= '0;
      wrap_o <= 1'b0;
    end else if (!run_q && wait_q != delay_i) begin
      wait_q <= wait_q + 1'b1;
    end else begin
      run_q  <= 1'b1;
      // Chip 0 -> level +1 (word 000), chip 1 -> level -1 (word 111).
      iq_o   <= '{i: {3{LUT[idx_q]}}, q: {3{LUT[idx_q]}}};
      wrap_o <= (idx_q == IW'(LUT_LEN - 1));
      idx_q  <= (idx_q == IW'(LUT_LEN - 1)) ? '0 : idx_q + 1'b1;
    end
  end

  assign running_o = run_q;

  initial assert (PRN >= 1 && PRN <= 32) else $error("ca_code_gen: PRN out of range");
endmodule
