// clk_div: integer clock divider that makes the GNSS Core clock.
//
// The GNSS Core runs from a clock derived from an existing 39 MHz clock by a
// divide-by-8, giving 4.875 MHz on the FPGA prototype (58.5 MHz once scaled by
// the prototype-to-ASIC factor of 12). The division factor 8 is the one the
// receiver uses; the implementation (a counter that toggles the output every
// DIV/2 input cycles, giving a 50 % duty cycle) is this design's choice.
//
// Interface: clk_i is the source clock, rst_ni an active-low asynchronous
// reset that holds clk_o low. clk_o rises on the first clk_i edge after the
// counter has counted DIV/2 edges out of reset, and has period DIV clk_i cycles.
module clk_div #(
  parameter int unsigned DIV = 8   // even, >= 2
) (
  input  logic clk_i,
  input  logic rst_ni,
  output logic clk_o
);
  localparam int unsigned HALF = DIV / 2;
  localparam int unsigned CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt_q <= '0;
      clk_o <= 1'b0;
    end else if (cnt_q == CW'(HALF - 1)) begin
      cnt_q <= '0;
      clk_o <= ~clk_o;
    end else begin
      cnt_q <= cnt_q + 1'b1;
    end
  end

  initial assert (DIV >= 2 && DIV % 2 == 0) else $error("clk_div: DIV must be even");
endmodule
