// tb_top_check -- one frac_divider_top instance with an end-to-end checker,
// used by tb_frac_divider_top.
//
// Every input cycle it compares the divider's outputs with a reference:
//   - the N / N+1 choice of output period p and the kind of every enclosing
//     round unit, computed top-down from the digits of p in base M with
//     coefficients worked out here in floating point from the frequencies;
//   - o_period_end on the last cycle of each period, o_unit_end[r] when
//     p+1 is a multiple of M^(r+1);
//   - the o_clk waveform: high on cycles 1 .. (N+1)/2 of each period;
//   - the time between o_clk rising edges, N or N+1 input clock periods
//     (4525 ns and 4550 ns for the default ratio on a 40 MHz clock);
//   - over every complete top-level pattern, the exact number of input
//     cycles, and that it is within one input cycle of M^ROUNDS * K.
// It counts how often each mechanism happened (short and long periods, the
// end of a unit and a long unit in every round, a complete pattern, a
// reset) and raises `finished` once PATTERNS patterns have been checked.
// The testbench pulses rst_n low once in the middle of the second pattern.
module tb_top_check
  import frac_div_pkg::*;
#(
  parameter longint unsigned F_CLK_HZ = 40_000_000,
  parameter longint unsigned F_OUT_HZ = 220_805,
  parameter int unsigned     M        = 8,
  parameter int unsigned     ROUNDS   = 3,
  parameter int unsigned     PATTERNS = 3
) (
  input  logic        clk,
  output logic        finished,
  output int unsigned checks,
  output int unsigned failures
);

  localparam int unsigned N    = int'(F_CLK_HZ / F_OUT_HZ);
  localparam int unsigned HIGH = (N + 1) / 2;

  logic              rst_n = 1'b0;
  logic              o_clk;
  logic              o_period_end;
  logic              o_long;
  logic [ROUNDS-1:0] o_unit_end;
  logic [ROUNDS-1:0] o_unit_long;

  frac_divider_top #(
    .F_CLK_HZ (F_CLK_HZ),
    .F_OUT_HZ (F_OUT_HZ),
    .M        (M),
    .ROUNDS   (ROUNDS)
  ) dut (
    .i_clk        (clk),
    .i_rst_n      (rst_n),
    .o_clk        (o_clk),
    .o_period_end (o_period_end),
    .o_long       (o_long),
    .o_unit_end   (o_unit_end),
    .o_unit_long  (o_unit_long)
  );

  // ---------------------------------------------------------------- reference
  int unsigned C_A [ROUNDS];
  longint      t_short [ROUNDS+1];   // input cycles in a short unit of round r
  longint      span_of [ROUNDS+1];   // M^r

  initial begin
    real t_clk_s, t_out_s, ea, eb, c;
    finished = 1'b0;
    checks   = 0;
    failures = 0;
    t_clk_s = 1.0 / real'(F_CLK_HZ);
    t_out_s = 1.0 / real'(F_OUT_HZ);
    ea = t_out_s - real'(N) * t_clk_s;
    eb = ea - t_clk_s;
    t_short[0] = N;
    span_of[0] = 1;
    for (int r = 0; r < int'(ROUNDS); r++) begin
      c = $ceil(real'(M) * (-eb) / t_clk_s);
      C_A[r] = int'(c);
      ea = c * ea + (real'(M) - c) * eb;
      eb = ea - t_clk_s;
      // A long unit is one input cycle longer than a short one.
      t_short[r+1] = longint'(C_A[r]) * t_short[r] +
                     longint'(M - C_A[r]) * (t_short[r] + 1);
      span_of[r+1] = span_of[r] * M;
    end
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t (M=%0d ROUNDS=%0d)", what, $time, M, ROUNDS);
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

  function automatic void ref_kinds(longint p, output bit kinds [ROUNDS+1]);
    bit t;
    t = 1'b0;
    kinds[ROUNDS] = t;
    for (int r = int'(ROUNDS); r >= 1; r--) begin
      t = sub_long(C_A[r-1], t, int'((p / span_of[r-1]) % M));
      kinds[r-1] = t;
    end
  endfunction

  // ---------------------------------------------------------------- checker
  longint      p = 0;            // output period index within the pattern
  int unsigned len = 0;          // cycles elapsed in the current period
  longint      pat_cycles = 0;   // cycles elapsed in the current pattern
  int unsigned patterns = 0;
  bit          active = 1'b0;
  bit          o_clk_d = 1'b0;
  realtime     last_rise = -1.0;
  realtime     last_edge = 0.0;
  realtime     t_clk = 0.0;        // measured input clock period
  realtime     t_out_short = 0.0, t_out_long = 0.0;

  // Mechanism counters.
  int unsigned n_short = 0, n_long = 0, n_resets = 0;
  int unsigned unit_ends [ROUNDS];
  int unsigned long_units [ROUNDS];

  always @(posedge clk) begin
    bit kinds [ROUNDS+1];
    t_clk = $realtime - last_edge;
    last_edge = $realtime;
    if (active && !finished) begin
      ref_kinds(p, kinds);
      check(o_long == kinds[0], "o_long");
      for (int r = 0; r < int'(ROUNDS); r++) begin
        check(o_unit_long[r] == kinds[r+1], "o_unit_long");
        check(o_unit_end[r] == (o_period_end && ((p + 1) % span_of[r+1] == 0)), "o_unit_end");
        if (o_unit_end[r]) begin
          unit_ends[r]++;
          if (o_unit_long[r]) long_units[r]++;
        end
      end
      check(o_clk == (len >= 1 && len <= HIGH), "o_clk waveform");
      check(o_period_end == (len + 1 == N + int'(kinds[0])), "o_period_end");
      // Rising-edge spacing in time, N or N+1 input clock periods.
      if (o_clk && !o_clk_d) begin
        if (last_rise >= 0.0) begin
          if ($realtime - last_rise == real'(N) * t_clk) t_out_short = $realtime - last_rise;
          else if ($realtime - last_rise == real'(N + 1) * t_clk) t_out_long = $realtime - last_rise;
          else check(1'b0, "o_clk period");
          checks++;
        end
        last_rise = $realtime;
      end
      o_clk_d = o_clk;
      pat_cycles++;
      if (o_period_end) begin
        if (o_long) n_long++; else n_short++;
        len = 0;
        p++;
        if (p == span_of[ROUNDS]) begin
          // A complete pattern: exact length and accuracy against M^R * K.
          check(pat_cycles == t_short[ROUNDS], "pattern length");
          check(pat_cycles * longint'(F_OUT_HZ) - span_of[ROUNDS] * longint'(F_CLK_HZ)
                  < longint'(F_OUT_HZ) &&
                span_of[ROUNDS] * longint'(F_CLK_HZ) - pat_cycles * longint'(F_OUT_HZ)
                  < longint'(F_OUT_HZ), "pattern accuracy");
          $display("M=%0d ROUNDS=%0d: pattern of %0d periods in %0d cycles (K*M^R = %0.6f)",
                   M, ROUNDS, p, pat_cycles,
                   real'(F_CLK_HZ) / real'(F_OUT_HZ) * real'(span_of[ROUNDS]));
          p = 0;
          pat_cycles = 0;
          patterns++;
        end
      end else begin
        len++;
      end
    end
  end

  initial begin
    for (int r = 0; r < int'(ROUNDS); r++) begin
      unit_ends[r]  = 0;
      long_units[r] = 0;
    end
    repeat (3) @(posedge clk);
    // Release reset between clock edges so the reference starts in step.
    @(negedge clk);
    rst_n  = 1'b1;
    active = 1'b1;
    // Reset once in the middle of the second pattern; the pattern restarts.
    wait (patterns == 1 && p == span_of[ROUNDS] / 2);
    @(negedge clk);
    rst_n = 1'b0;
    active = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    n_resets++;
    p = 0;
    len = 0;
    pat_cycles = 0;
    o_clk_d = 1'b0;
    last_rise = -1.0;
    active = 1'b1;
    wait (patterns == PATTERNS);
    check(n_short > 0, "short periods happened");
    check(n_long > 0, "long periods happened");
    check(n_resets > 0, "reset happened");
    for (int r = 0; r < int'(ROUNDS); r++) begin
      check(unit_ends[r] > 0, "unit end happened");
      check(r == int'(ROUNDS) - 1 || long_units[r] > 0, "long unit happened");
      $display("  round %0d: C_A=%0d, %0d units ended, %0d of them long",
               r + 1, C_A[r], unit_ends[r], long_units[r]);
    end
    $display("  %0d short and %0d long periods, %0d resets, %0d patterns",
             n_short, n_long, n_resets, patterns);
    $display("  o_clk periods: short %0t, long %0t", t_out_short, t_out_long);
    finished = 1'b1;
  end

endmodule
