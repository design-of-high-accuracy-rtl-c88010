// tb_frac_divider_top -- end-to-end test of the fractional divider.
//
// Runs three divider configurations side by side on a 40 MHz (25 ns) input
// clock, each through tb_top_check, which compares every output period,
// every round boundary and the o_clk waveform with a reference model and
// checks the exact length and accuracy of each complete repeating pattern:
//   a) 40 MHz -> 220.805 kHz (K = 181.155), M = 8, 3 rounds: 512-period
//      pattern, every round of a multi-round controller exercised;
//   b) 40 MHz -> 220.805 kHz, M = 1024, 1 round: the first round of the
//      default divider on its own (865 periods of 181 cycles and 159 of
//      182, 185 503 cycles per 1024 periods);
//   c) 1000 Hz -> 73 Hz (K = 13.699), M = 16, 2 rounds: a different ratio
//      where the long periods outnumber the short ones in some rounds.
// Each configuration also sees one reset in the middle of a pattern.
module tb_frac_divider_top;

  logic clk = 1'b0;
  always #12.5ns clk = ~clk;

  int unsigned checks = 0;
  int unsigned failures = 0;

  logic [2:0]  finished;
  int unsigned sub_checks [3];
  int unsigned sub_failures [3];

  tb_top_check #(
    .F_CLK_HZ (40_000_000), .F_OUT_HZ (220_805), .M (8), .ROUNDS (3), .PATTERNS (3)
  ) u_a (
    .clk (clk), .finished (finished[0]), .checks (sub_checks[0]), .failures (sub_failures[0])
  );

  tb_top_check #(
    .F_CLK_HZ (40_000_000), .F_OUT_HZ (220_805), .M (1024), .ROUNDS (1), .PATTERNS (3)
  ) u_b (
    .clk (clk), .finished (finished[1]), .checks (sub_checks[1]), .failures (sub_failures[1])
  );

  tb_top_check #(
    .F_CLK_HZ (1000), .F_OUT_HZ (73), .M (16), .ROUNDS (2), .PATTERNS (3)
  ) u_c (
    .clk (clk), .finished (finished[2]), .checks (sub_checks[2]), .failures (sub_failures[2])
  );

  function automatic void report();
    checks   = sub_checks[0] + sub_checks[1] + sub_checks[2];
    failures += sub_failures[0] + sub_failures[1] + sub_failures[2];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin
    wait (&finished);
    // The first-round unit of the default divider must be exactly the
    // published 865 x 181 + 159 x 182 cycles.
    checks++;
    if (u_b.C_A[0] != 865 || u_b.t_short[1] != 64'd185503) begin
      failures++;
      $display("FAIL round-1 unit: C_A=%0d, %0d cycles", u_b.C_A[0], u_b.t_short[1]);
    end
    report();
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    report();
    $finish;
  end

endmodule
