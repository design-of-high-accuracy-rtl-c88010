// tb_dual_modulus_divider -- self-checking test of the N / N+1 divider.
//
// Picks a random modulus (N or N+1) at the start of every period, the way
// the controller does, and checks against a count kept by the testbench:
// period_end falls exactly on the N-th or (N+1)-th cycle of each period,
// the distance between rising edges of clk_out equals the chosen length of
// that period, and clk_out stays high for (N+1)/2 cycles. Also checks that
// reset restarts a period. Runs PERIODS periods at the default N = 181.
module tb_dual_modulus_divider;

  localparam int unsigned N       = 181;
  localparam int unsigned PERIODS = 3000;
  localparam int unsigned HIGH    = (N + 1) / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic long_sel = 1'b0;
  logic period_end;
  logic clk_out;

  int unsigned checks = 0;
  int unsigned failures = 0;

  dual_modulus_divider #(.N(N)) dut (
    .clk        (clk),
    .rst_n      (rst_n),
    .long_sel   (long_sel),
    .period_end (period_end),
    .clk_out    (clk_out)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference bookkeeping.
  int unsigned len = 0;           // cycles elapsed in the current period
  int unsigned periods = 0;
  int unsigned n_long = 0, n_short = 0;
  bit          sel_q[$];          // length choice of every period begun
  longint      cyc = 0;
  longint      last_rise = -1;
  longint      high_start = 0;
  bit          clk_out_d = 1'b0;
  bit          running = 1'b0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (running) begin
      // period_end must be high in exactly the last cycle of the period.
      if (len + 1 == N + int'(long_sel)) begin
        check(period_end == 1'b1, "period_end missing on last cycle");
        if (long_sel) n_long++; else n_short++;
        periods++;
        len <= 0;
        long_sel <= 1'($urandom_range(0, 1));
      end else begin
        check(period_end == 1'b0, "period_end early");
        len <= len + 1;
      end
      // clk_out: rises one cycle after each period starts.
      clk_out_d <= clk_out;
      if (clk_out && !clk_out_d) begin
        if (last_rise >= 0) begin
          check(cyc - last_rise == longint'(N) + longint'(sel_q[0]),
                "clk_out rise spacing");
          void'(sel_q.pop_front());
        end
        last_rise  <= cyc;
        high_start <= cyc;
      end
      if (!clk_out && clk_out_d) begin
        check(cyc - high_start == longint'(HIGH), "clk_out high time");
      end
    end else begin
      // Held in reset: the reference restarts with the divider.
      len       <= 0;
      long_sel  <= 1'b1;
      last_rise <= -1;
      clk_out_d <= 1'b0;
      sel_q.delete();
    end
  end

  // Record the length chosen for every period as it starts.
  always @(posedge clk) begin
    if (running && (len == 0)) sel_q.push_back(long_sel);
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    running <= 1'b1;
    wait (periods == PERIODS / 2);
    // Reset in the middle of a period restarts the count.
    @(posedge clk);
    rst_n <= 1'b0;
    running <= 1'b0;
    @(posedge clk);
    @(posedge clk);
    check(period_end == (N == 1), "period_end after reset");
    rst_n <= 1'b1;
    running <= 1'b1;
    wait (periods == PERIODS);
    @(posedge clk);
    check(n_long > PERIODS / 4 && n_short > PERIODS / 4, "both moduli exercised");
    $display("periods: %0d short, %0d long", n_short, n_long);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (PERIODS * (N + 1) + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
