// tb_ctrl_check -- one division_controller instance with its reference
// checker, used by tb_division_controller.
//
// Strobes period_end at random intervals and, every cycle, compares
// long_sel, unit_long and unit_end with a top-down reference: the highest
// round's unit is short, and the kind of the sub-unit at position k of a
// unit follows from k alone (minor exactly when k / (y+1) < minor and
// k % (y+1) == y). The per-round coefficients of the reference are worked
// out here in floating point from the two frequencies (zero-error count of
// short sub-units, rounded up), independently of the integer arithmetic in
// the design. Raises `finished` after PERIODS output periods.
module tb_ctrl_check
  import frac_div_pkg::*;
#(
  parameter longint unsigned F_CLK_HZ = 1000,
  parameter longint unsigned F_OUT_HZ = 73,
  parameter int unsigned     M        = 8,
  parameter int unsigned     ROUNDS   = 3,
  parameter longint          PERIODS  = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        finished,
  output int unsigned checks,
  output int unsigned failures
);

  logic              period_end = 1'b0;
  logic              long_sel;
  logic [ROUNDS-1:0] unit_end;
  logic [ROUNDS-1:0] unit_long;

  division_controller #(
    .F_CLK_HZ (F_CLK_HZ),
    .F_OUT_HZ (F_OUT_HZ),
    .M        (M),
    .ROUNDS   (ROUNDS)
  ) dut (
    .clk        (clk),
    .rst_n      (rst_n),
    .period_end (period_end),
    .long_sel   (long_sel),
    .unit_end   (unit_end),
    .unit_long  (unit_long)
  );

  // Reference coefficients: C_A[r] for round r+1.
  int unsigned C_A [ROUNDS];

  initial begin
    real t_clk, t_out, ea, eb, c;
    finished = 1'b0;
    checks   = 0;
    failures = 0;
    t_clk = 1.0 / real'(F_CLK_HZ);
    t_out = 1.0 / real'(F_OUT_HZ);
    ea = t_out - real'(F_CLK_HZ / F_OUT_HZ) * t_clk;
    eb = ea - t_clk;
    for (int r = 0; r < int'(ROUNDS); r++) begin
      c = $ceil(real'(M) * (-eb) / t_clk);
      C_A[r] = int'(c);
      ea = c * ea + (real'(M) - c) * eb;
      eb = ea - t_clk;
    end
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t (M=%0d)", what, $time, M);
    end
  endfunction

  // Kind of sub-unit k inside a unit of kind `lng` with coefficient c_a.
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

  // kinds[r]: kind of the round-r unit holding period p (kinds[0]: period p).
  function automatic void ref_kinds(longint p, output bit kinds [ROUNDS+1]);
    longint span;
    bit     t;
    t = 1'b0;
    kinds[ROUNDS] = t;
    span = 1;
    for (int r = 1; r < int'(ROUNDS); r++) span *= M;
    for (int r = int'(ROUNDS); r >= 1; r--) begin
      t = sub_long(C_A[r-1], t, int'((p / span) % M));
      kinds[r-1] = t;
      span /= M;
    end
  endfunction

  longint      p = 0;
  int unsigned n_long = 0;

  always @(posedge clk) begin
    bit     kinds [ROUNDS+1];
    longint span;
    if (rst_n && !finished) begin
      ref_kinds(p, kinds);
      check(long_sel == kinds[0], "long_sel");
      for (int r = 0; r < int'(ROUNDS); r++) begin
        check(unit_long[r] == kinds[r+1], "unit_long");
      end
      span = 1;
      for (int r = 0; r < int'(ROUNDS); r++) begin
        span *= M;
        check(unit_end[r] == (period_end && ((p + 1) % span == 0)), "unit_end");
      end
      if (period_end) begin
        if (long_sel) n_long++;
        p++;
        if (p == PERIODS) begin
          finished = 1'b1;
          check(n_long > 0 && n_long < p, "both moduli used");
          $display("M=%0d ROUNDS=%0d: %0d periods, %0d long", M, ROUNDS, p, n_long);
        end
      end
      period_end <= ($urandom_range(0, 3) == 0);
    end
  end

endmodule
