// tb_round_sequencer -- self-checking test of one controller round.
//
// Six instances are driven independently: the four coefficients of the
// 40 MHz / 181.155 table with M = 1024 (865, 978, 236, 580), plus two small
// cases, M = 8 with C_A = 6 (a short unit divides evenly, R = 0) and M = 5
// with C_A = 5 (a short unit has no long sub-unit at all). Each instance
// gets a random unit kind at the start of every unit and child_done strobes
// at random intervals. For every sub-unit the child_kind is compared with a
// reference worked out by position: sub-unit k of a unit is a minor one
// exactly when g = k / (y+1) < minor and k % (y+1) == y. The testbench also
// checks that `done` comes with the M-th sub-unit and only then, and that
// each unit holds the right numbers of short and long sub-units.
module tb_round_sequencer;
  import frac_div_pkg::*;

  localparam int NI = 6;
  localparam int unsigned MS  [NI] = '{1024, 1024, 1024, 1024, 8, 5};
  localparam int unsigned CAS [NI] = '{865, 978, 236, 580, 6, 5};
  localparam int UNITS = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int unsigned checks = 0;
  int unsigned failures = 0;
  int unsigned units_done [NI];
  int unsigned long_units [NI];

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  for (genvar i = 0; i < NI; i++) begin : g_inst
    localparam int unsigned M   = MS[i];
    localparam int unsigned C_A = CAS[i];

    unit_kind_e kind = UNIT_SHORT;
    logic       child_done = 1'b0;
    unit_kind_e child_kind;
    logic       done;

    round_sequencer #(.M(M), .C_A(C_A)) dut (
      .clk        (clk),
      .rst_n      (rst_n),
      .kind       (kind),
      .child_done (child_done),
      .child_kind (child_kind),
      .done       (done)
    );

    // Reference of the unit now being built.
    int unsigned k = 0;          // sub-units finished in this unit
    int unsigned ns = 0, nl = 0; // short / long sub-units seen
    int unsigned exp_s, exp_l, mn, mj_n, y;
    bit          mj_long;

    always_comb begin
      exp_s   = (kind == UNIT_LONG) ? C_A - 1 : C_A;
      exp_l   = M - exp_s;
      mj_long = exp_l > exp_s;
      mn      = mj_long ? exp_s : exp_l;
      mj_n    = M - mn;
      y       = (mn == 0) ? M : mj_n / mn;
    end

    function automatic bit ref_is_long(int unsigned pos);
      bit is_minor;
      is_minor = (mn != 0) && (pos / (y + 1) < mn) && (pos % (y + 1) == y);
      return is_minor ? !mj_long : mj_long;
    endfunction

    always @(posedge clk) begin
      if (rst_n) begin
        check((child_kind == UNIT_LONG) == ref_is_long(k), "child_kind");
        if (child_done) begin
          if (child_kind == UNIT_LONG) nl++; else ns++;
          if (k == M - 1) begin
            check(done == 1'b1, "done missing on last sub-unit");
            check(ns == exp_s && nl == exp_l, "short/long totals");
            k  = 0;
            ns = 0;
            nl = 0;
            units_done[i]++;
            if (kind == UNIT_LONG) long_units[i]++;
            kind <= unit_kind_e'($urandom_range(0, 1));
          end else begin
            check(done == 1'b0, "done early");
            k++;
          end
        end else begin
          check(done == 1'b0, "done without child_done");
        end
        child_done <= ($urandom_range(0, 2) != 0);
      end
    end
  end

  initial begin
    for (int i = 0; i < NI; i++) begin
      units_done[i] = 0;
      long_units[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (units_done[0] >= UNITS && units_done[1] >= UNITS && units_done[2] >= UNITS &&
          units_done[3] >= UNITS && units_done[4] >= 40 * UNITS && units_done[5] >= 40 * UNITS);
    @(posedge clk);
    for (int i = 0; i < NI; i++) begin
      check(long_units[i] > 0 && long_units[i] < units_done[i], "both unit kinds exercised");
      $display("instance %0d: %0d units, %0d long", i, units_done[i], long_units[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
