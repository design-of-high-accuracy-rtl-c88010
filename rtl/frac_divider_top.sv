// frac_divider_top -- high-accuracy fractional clock divider.
//
// Divides the input clock i_clk (F_CLK_HZ) down to o_clk with an average
// frequency of F_OUT_HZ, for a ratio K = F_CLK_HZ / F_OUT_HZ that need not be
// an integer (default 40 MHz -> 220.805 kHz, K = 181.155). Each o_clk period
// is N = floor(K) or N+1 input cycles long; a division controller of ROUNDS
// nested rounds, each grouping M units of the round below, chooses between
// them so that the mix is spread evenly and the average ratio matches K to
// within one input cycle per M^ROUNDS output periods.
//
// The per-round coefficients (short sub-units per short unit, C_A) are
// derived at elaboration from the two frequencies with exact integer
// arithmetic (frac_div_pkg): each is the ceiling of the zero-error solution
// of that round. For the defaults they are 865, 978, 236 and 580, the
// published table for this divider. Deriving them in the RTL instead of
// typing them in is this design's choice.
//
// Ports:
//   i_clk, i_rst_n  input clock, synchronous active-low reset
//   o_clk           divided clock (registered, high for (N+1)/2 cycles of
//                   each period)
//   o_period_end    high in the last i_clk cycle of each o_clk period
//   o_long          1 while the current period is N+1 cycles long
//   o_unit_end[r]   high in the cycle that ends a unit of round r+1
//   o_unit_long[r]  1 while the current unit of round r+1 is a long one
// The status outputs are this design's addition for monitoring and test.
module frac_divider_top
  import frac_div_pkg::*;
#(
  parameter longint unsigned F_CLK_HZ = 40_000_000,  // input clock frequency
  parameter longint unsigned F_OUT_HZ = 220_805,     // target output frequency
  parameter int unsigned     M        = 1024,        // sub-units per round unit
  parameter int unsigned     ROUNDS   = 4            // rounds of the controller
) (
  input  logic              i_clk,
  input  logic              i_rst_n,
  output logic              o_clk,
  output logic              o_period_end,
  output logic              o_long,
  output logic [ROUNDS-1:0] o_unit_end,
  output logic [ROUNDS-1:0] o_unit_long
);

  localparam int unsigned N = div_int(F_CLK_HZ, F_OUT_HZ);

  logic long_sel;
  logic period_end;

  division_controller #(
    .F_CLK_HZ (F_CLK_HZ),
    .F_OUT_HZ (F_OUT_HZ),
    .M        (M),
    .ROUNDS   (ROUNDS)
  ) u_ctrl (
    .clk        (i_clk),
    .rst_n      (i_rst_n),
    .period_end (period_end),
    .long_sel   (long_sel),
    .unit_end   (o_unit_end),
    .unit_long  (o_unit_long)
  );

  dual_modulus_divider #(
    .N (N)
  ) u_div (
    .clk        (i_clk),
    .rst_n      (i_rst_n),
    .long_sel   (long_sel),
    .period_end (period_end),
    .clk_out    (o_clk)
  );

  assign o_period_end = period_end;
  assign o_long       = long_sel;

  initial begin
    assert (F_OUT_HZ > 0 && F_CLK_HZ / F_OUT_HZ >= 2)
      else $error("frac_divider_top: F_CLK_HZ / F_OUT_HZ must be at least 2");
    assert (F_CLK_HZ % F_OUT_HZ != 0)
      else $error("frac_divider_top: integer ratios need no fractional divider");
  end

endmodule
