// tb_frac_divider_full -- the divider at its default parameters
// (40 MHz -> 220.805 kHz, M = 1024, 4 rounds) run through one complete
// round-2 unit: 1 048 576 output periods, about 190 million input cycles.
//
// The full repeating pattern of the default divider is 1024^4 output periods
// (about 58 days of 40 MHz clock), far beyond simulation, so this test stops
// after the first round-2 unit. That unit is a long one (977 short and 47
// long round-1 units), because round 3 starts with its majority kind, long.
// It checks, against the published coefficients (865, 978, 236, 580):
//   - every output period is 181 or 182 input cycles, i.e. o_clk rising
//     edges 4525 ns or 4550 ns apart, and its kind matches the reference
//     sequence (worked out by position as in the other testbenches);
//   - each round-1 unit is 185 503 cycles (short) or 185 504 (long), and
//     the long round-2 unit is made of 977 short and 47 long ones;
//   - the round-2 unit lasts exactly 977 x 185 503 + 47 x 185 504 input
//     cycles, which is within one input cycle of 1024^2 x K.
module tb_frac_divider_full;

  localparam longint      F_CLK = 40_000_000;
  localparam longint      F_OUT = 220_805;
  localparam int unsigned M     = 1024;
  localparam int unsigned N     = 181;
  localparam int unsigned C1    = 865;
  localparam int unsigned C2    = 978;
  localparam int unsigned C3    = 236;
  localparam int unsigned C4    = 580;
  localparam int unsigned WATCHDOG = 190_100_000;  // input cycles

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       o_clk, o_period_end, o_long;
  logic [3:0] o_unit_end, o_unit_long;

  always #12.5ns clk = ~clk;

  frac_divider_top dut (
    .i_clk        (clk),
    .i_rst_n      (rst_n),
    .o_clk        (o_clk),
    .o_period_end (o_period_end),
    .o_long       (o_long),
    .o_unit_end   (o_unit_end),
    .o_unit_long  (o_unit_long)
  );

  int unsigned checks = 0;
  int unsigned failures = 0;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  function automatic bit sub_long(int unsigned c_a, bit lng, int unsigned k);
    int unsigned s, l, mn, y;
    bit mj_long, is_minor;
    s = lng ? c_a - 1 : c_a;
    l = M - s;
    mj_long = l > s;
    mn = mj_long ? s : l;
    y = (mn == 0) ? M : (M - mn) / mn;
    is_minor = (mn != 0) && (k / (y + 1) < mn) && (k % (y + 1) == y);
    return is_minor ? !mj_long : mj_long;
  endfunction

  longint      cyc = 0;          // input cycles since reset
  longint      p = 0;            // output periods finished
  longint      period_start = 0;
  longint      unit1_start = 0;
  int unsigned n_short = 0, n_long = 0;
  int unsigned u1_short = 0, u1_long = 0, u2_done = 0;
  longint      u2_cycles = 0;    // input cycles when the round-2 unit ended
  bit          active = 1'b0;
  bit          u1_kind = 1'b0;   // kind of the current round-1 unit (reference)
  // The round-2 unit simulated is the first sub-unit of the first round-3
  // unit, which is itself the first sub-unit of the short round-4 unit.
  // Round 3 has more long sub-units than short ones (236 of 1024 short), so
  // its first sub-unit is a long one.
  bit          u2_kind = 1'b0;

  always @(posedge clk) begin
    bit exp_long;
    if (active) begin
      cyc++;
      if (o_period_end) begin
        u1_kind  = sub_long(C2, u2_kind, int'(p / longint'(M)));
        exp_long = sub_long(C1, u1_kind, int'(p % longint'(M)));
        check(o_long == exp_long, "period kind");
        check(cyc - period_start == longint'(N) + longint'(exp_long), "period length");
        if (o_long) n_long++; else n_short++;
        period_start = cyc;
        p++;
        check(o_unit_end[0] == (p % longint'(M) == 0), "round-1 unit end");
        if (p % longint'(M) == 0) begin
          check(o_unit_long[0] == u1_kind, "round-1 unit kind");
          check(cyc - unit1_start == 64'd185503 + longint'(u1_kind), "round-1 unit length");
          if (u1_kind) u1_long++; else u1_short++;
          unit1_start = cyc;
        end
        if (o_unit_end[1]) begin
          u2_done++;
          u2_cycles = cyc;
        end
      end
    end
  end

  function automatic bit close_to(realtime a, realtime b);
    return (a - b < 1ps) && (b - a < 1ps);
  endfunction

  // o_clk rising edges are 181 or 182 input clock periods apart.
  realtime last_rise = -1.0;
  int unsigned n_rise_short = 0, n_rise_long = 0;
  always @(posedge o_clk) begin
    if (last_rise >= 0.0) begin
      // Compared within 1 ps: time literals need not be exact reals.
      if (close_to($realtime - last_rise, 4525ns)) n_rise_short++;
      else if (close_to($realtime - last_rise, 4550ns)) n_rise_long++;
      else check(1'b0, "o_clk period");
    end
    last_rise = $realtime;
  end

  longint diff;

  initial begin
    u2_kind = sub_long(C3, sub_long(C4, 1'b0, 0), 0);
    check(u2_kind == 1'b1, "reference: first round-2 unit is long");
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n  = 1'b1;
    active = 1'b1;
    wait (u2_done == 1);
    @(posedge clk);
    check(p == longint'(M) * M, "round-2 unit holds M*M periods");
    check(u1_short == C2 - 1 && u1_long == M - C2 + 1, "round-1 units in the round-2 unit");
    check(u2_cycles == 64'd977 * 185503 + 64'd47 * 185504, "round-2 unit length");
    // (actual - ideal) duration in units of 1/(F_CLK*F_OUT) s; one input
    // cycle is F_OUT units.
    diff = u2_cycles * F_OUT - longint'(M) * longint'(M) * F_CLK;
    check(diff < F_OUT && -diff < F_OUT, "round-2 unit accuracy");
    check(diff == 64'sd50795, "round-2 unit error is the table's 5.75 ns");
    check(n_short > 0 && n_long > 0, "both period lengths used");
    check(n_rise_short + n_rise_long + 1 >= n_short + n_long - 1, "o_clk edges counted");
    checks += n_rise_short + n_rise_long;
    $display("%0d periods (%0d of 181, %0d of 182 cycles) in %0d input cycles",
             p, n_short, n_long, u2_cycles);
    $display("round-1 units: %0d short, %0d long; average ratio %0.9f",
             u1_short, u1_long, real'(u2_cycles) / real'(p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
