// tb_division_controller -- self-checking test of the multi-round controller.
//
// Two instances: a small one (1000 Hz -> 73 Hz, M = 8, 3 rounds) run over
// three complete repetitions of its 512-period pattern, and one with the
// default parameters (40 MHz -> 220.805 kHz, M = 1024, 4 rounds) run over
// the first few round-1 units; the reference coefficients of the latter
// must equal the published table 865, 978, 236, 580. period_end is strobed at random intervals. For
// output period p the expected N / N+1 choice is computed top-down by
// digits of p in base M: the highest round's unit is short; in a unit of
// kind t with s short and l long sub-units the sub-unit at position k is
// the minor kind exactly when k / (y+1) < minor and k % (y+1) == y. The
// testbench checks long_sel for every period, unit_end of every round
// against p+1 being a multiple of M^r, and unit_long against the same
// top-down reference.
module tb_division_controller;
  import frac_div_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0;
  int unsigned failures = 0;
  localparam int unsigned TABLE2 [4] = '{865, 978, 236, 580};

  logic [1:0]  finished;
  int unsigned sub_checks [2];
  int unsigned sub_failures [2];

  tb_ctrl_check #(
    .F_CLK_HZ (1000), .F_OUT_HZ (73), .M (8), .ROUNDS (3), .PERIODS (3 * 512)
  ) u_small (
    .clk (clk), .rst_n (rst_n), .finished (finished[0]),
    .checks (sub_checks[0]), .failures (sub_failures[0])
  );

  tb_ctrl_check #(
    .F_CLK_HZ (40_000_000), .F_OUT_HZ (220_805), .M (1024), .ROUNDS (4), .PERIODS (5000)
  ) u_full (
    .clk (clk), .rst_n (rst_n), .finished (finished[1]),
    .checks (sub_checks[1]), .failures (sub_failures[1])
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (&finished);
    @(posedge clk);
    checks   = sub_checks[0] + sub_checks[1];
    failures = sub_failures[0] + sub_failures[1];
    // The default configuration must reproduce the published table.
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (u_full.C_A[r] != TABLE2[r]) begin
        failures++;
        $display("FAIL round %0d coefficient %0d, expected %0d", r + 1, u_full.C_A[r], TABLE2[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    checks   = sub_checks[0] + sub_checks[1];
    failures = sub_failures[0] + sub_failures[1] + 1;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
