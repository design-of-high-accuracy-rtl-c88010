// dual_modulus_divider -- the N / N+1 integer divider at the bottom of the
// fractional divider.
//
// One counter runs from 0 up to N-1 (short period) or N (long period) and
// then wraps, so each output period lasts N or N+1 input cycles; `long_sel`
// chooses which. The block diagram of the design draws an N divider and an
// N+1 divider side by side, both fed by the input clock and both driving the
// output clock, with the frequency division controller choosing between
// them; sharing one counter whose terminal count moves by one is this
// design's way to get that without glitches or phase jumps when the
// modulus changes.
//
// Interface and timing:
//   long_sel   is sampled in the last cycle of a period (when period_end is
//              high) and must hold for the whole period; the controller only
//              changes it on the clock edge that ends a period.
//   period_end is high, combinationally from the counter, during the last
//              input cycle of every period.
//   clk_out    is a register: high for the first HIGH_CYCLES = (N+1)/2 input
//              cycles of each period and low for the rest (N - HIGH_CYCLES
//              or N + 1 - HIGH_CYCLES cycles), one cycle behind the counter.
//              The duty cycle is this design's choice; only the period
//              lengths are specified.
// Reset is synchronous and active low; after it the counter starts a new
// period at 0.
module dual_modulus_divider #(
  parameter int unsigned N = 181  // integer part of the division ratio, >= 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic long_sel,
  output logic period_end,
  output logic clk_out
);

  localparam int unsigned CW          = $clog2(N + 1);
  localparam int unsigned HIGH_CYCLES = (N + 1) / 2;

  logic [CW-1:0] cnt;
  logic [CW-1:0] last;

  assign last       = long_sel ? CW'(N) : CW'(N - 1);
  assign period_end = (cnt == last);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else begin
      cnt     <= period_end ? '0 : cnt + 1'b1;
      clk_out <= (cnt < CW'(HIGH_CYCLES));
    end
  end

  // The counter never passes the longest terminal count.
  a_cnt_range : assert property (@(posedge clk) disable iff (!rst_n) cnt <= CW'(N));

  initial begin
    assert (N >= 2) else $error("dual_modulus_divider: N must be at least 2");
  end

endmodule
