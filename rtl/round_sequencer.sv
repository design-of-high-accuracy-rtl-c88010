// round_sequencer -- one round of the frequency division controller.
//
// A unit of this round is made of M sub-units of the round below. A short
// unit holds C_A short and M - C_A long sub-units; a long unit holds one
// short sub-unit fewer and one long sub-unit more (C_A - 1 and M - C_A + 1).
// Short and long sub-units are not issued in two blocks, which would cause a
// large phase wander, but spread out: with major = the more numerous kind,
// minor = the other, y = int(major/minor) and R = major % minor, the unit is
// `minor` groups of (y majors then 1 minor), followed by R majors. The group
// and run counts are constants for each unit kind, worked out at elaboration
// by frac_div_pkg, so the hardware is three counters and comparators.
//
// Interface and timing:
//   kind        kind of the unit being built, from the round above (or a
//               constant for the highest round). It must only change on the
//               clock edge on which `done` is high.
//   child_done  one-cycle strobe: the current sub-unit ends with this cycle.
//   child_kind  kind of the current sub-unit, combinational from the state
//               and `kind`; it changes only on an edge where child_done = 1.
//   done        combinational: child_done on the last (M-th) sub-unit, i.e.
//               this unit ends with this cycle. The counters then restart.
// Reset (synchronous, active low) starts a fresh unit. The counting scheme
// follows the interleaving rule y = int(major/minor), R = major % minor; the
// counter structure and the handshake are this design's own.
module round_sequencer
  import frac_div_pkg::*;
#(
  parameter int unsigned M   = 1024,  // sub-units per unit
  parameter int unsigned C_A = 865    // short sub-units in a short unit, 1..M
) (
  input  logic       clk,
  input  logic       rst_n,
  input  unit_kind_e kind,
  input  logic       child_done,
  output unit_kind_e child_kind,
  output logic       done
);

  localparam int unsigned MW = $clog2(M + 1);

  // Per-kind constants: index 0 = short unit, 1 = long unit.
  localparam unit_kind_e  MAJOR_S = major_kind(M, C_A, UNIT_SHORT);
  localparam unit_kind_e  MAJOR_L = major_kind(M, C_A, UNIT_LONG);
  localparam int unsigned MINOR_S = n_minor(M, C_A, UNIT_SHORT);
  localparam int unsigned MINOR_L = n_minor(M, C_A, UNIT_LONG);
  localparam int unsigned Y_S     = run_len(M, C_A, UNIT_SHORT);
  localparam int unsigned Y_L     = run_len(M, C_A, UNIT_LONG);

  logic [MW-1:0] cnt;   // sub-units finished in this unit
  logic [MW-1:0] grp;   // (y majors + 1 minor) groups finished
  logic [MW-1:0] pos;   // majors issued in the current group

  unit_kind_e    major;
  logic [MW-1:0] minor_cnt;
  logic [MW-1:0] y;
  logic          in_tail;
  logic          is_minor;
  logic          last;

  always_comb begin
    if (kind == UNIT_LONG) begin
      major     = MAJOR_L;
      minor_cnt = MW'(MINOR_L);
      y         = MW'(Y_L);
    end else begin
      major     = MAJOR_S;
      minor_cnt = MW'(MINOR_S);
      y         = MW'(Y_S);
    end
  end

  assign in_tail    = (grp == minor_cnt);
  assign is_minor   = !in_tail && (pos == y);
  assign child_kind = is_minor ? unit_kind_e'(~major) : major;
  assign last       = (cnt == MW'(M - 1));
  assign done       = child_done && last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      grp <= '0;
      pos <= '0;
    end else if (child_done) begin
      if (last) begin
        cnt <= '0;
        grp <= '0;
        pos <= '0;
      end else begin
        cnt <= cnt + 1'b1;
        if (is_minor) begin
          grp <= grp + 1'b1;
          pos <= '0;
        end else if (!in_tail) begin
          pos <= pos + 1'b1;
        end
      end
    end
  end

  // Every group has been issued by the time the last sub-unit ends (the
  // last one is either in the tail or, when R = 0, the last group's minor),
  // so the unit holds exactly the intended numbers of short and long
  // sub-units.
  a_groups_complete : assert property (@(posedge clk) disable iff (!rst_n)
    done |-> (in_tail || (is_minor && grp == minor_cnt - 1'b1)));

  initial begin
    assert (C_A >= 1 && C_A <= M) else $error("round_sequencer: C_A must be in 1..M");
  end

endmodule
