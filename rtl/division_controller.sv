// division_controller -- the frequency division controller: decides, for
// every output period, whether the dual-modulus divider counts N or N+1.
//
// It is a chain of ROUNDS round_sequencer instances. Round 1 builds units of
// M output periods; round r builds units of M round-(r-1) units, so the
// highest round spans M^ROUNDS output periods, after which the whole pattern
// repeats exactly. The highest round always builds short units (C_A of the
// round below short, M - C_A long); each lower round is told by the round
// above whether its current unit is short or long. The kind of the current
// round-1 sub-unit is the N / N+1 choice.
//
// Interface and timing:
//   period_end  strobe from the divider: the current output period ends with
//               this cycle. All rounds advance on that clock edge; the end
//               of a unit ripples combinationally upward through `done`.
//   long_sel    1 = current period is N+1 cycles. Combinational from the
//               round registers; it changes only on edges where period_end
//               was high.
//   unit_end[r] high in the cycle that ends a unit of round r+1 (observation).
//   unit_long[r] 1 when the current unit of round r+1 is a long one. The
//               highest round only builds short units, so its bit is a
//               constant 0, kept so the vector has one bit per round.
// The coefficient of round r+1, the number of short sub-units in one of its
// short units, is computed at elaboration from F_CLK_HZ and F_OUT_HZ by
// frac_div_pkg::coeff_short; for the defaults the four rounds get 865, 978,
// 236 and 580. Using the highest round's short unit as the repeating
// pattern is this design's choice.
module division_controller
  import frac_div_pkg::*;
#(
  parameter longint unsigned F_CLK_HZ = 40_000_000,  // input clock frequency
  parameter longint unsigned F_OUT_HZ = 220_805,     // target output frequency
  parameter int unsigned     M        = 1024,        // sub-units per unit
  parameter int unsigned     ROUNDS   = 4            // number of rounds
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              period_end,
  output logic              long_sel,
  output logic [ROUNDS-1:0] unit_end,
  output logic [ROUNDS-1:0] unit_long
);

  unit_kind_e kind       [ROUNDS+1];  // kind[r]: unit of round r+1 (kind[ROUNDS]: fixed)
  logic       child_done [ROUNDS+1];  // child_done[r]: sub-unit of round r+1 ends
  unit_kind_e child_kind [ROUNDS];

  assign kind[ROUNDS]  = UNIT_SHORT;
  assign child_done[0] = period_end;

  for (genvar r = 0; r < ROUNDS; r++) begin : g_round
    round_sequencer #(
      .M   (M),
      .C_A (coeff_short(F_CLK_HZ, F_OUT_HZ, M, r + 1))
    ) u_round (
      .clk        (clk),
      .rst_n      (rst_n),
      .kind       (kind[r+1]),
      .child_done (child_done[r]),
      .child_kind (child_kind[r]),
      .done       (child_done[r+1])
    );
    assign kind[r]      = child_kind[r];
    assign unit_end[r]  = child_done[r+1];
    assign unit_long[r] = (kind[r+1] == UNIT_LONG);
  end

  assign long_sel = (kind[0] == UNIT_LONG);

endmodule
