// Frequency sweep of a monitored critical path: the highest clock
// frequency without a timing warning (Fmax_sensor) against the highest
// frequency without a timing error (Fmax), for both detection windows.
//
// The full-size monitoring system is instantiated with its defaults. The
// critical path ending at endpoint 0 is modelled here: every cycle it
// launches a new value at the flip-flop clock edge (clk_dff, 231 ps after
// the leaf clock) which reaches d[0] PathDelay ps later; 1780 ps is used,
// the minimum period of the validated block's monitored paths in nominal
// conditions. For each clock period T, from PathDelay+150 ps down to
// PathDelay-10 ps in 1 ps steps (T = PathDelay itself is skipped, since the
// data would change exactly at the clock edge), four launches are made and
// the testbench records
//   - a timing error: the endpoint flip-flop did not capture the launched
//     value at the next clock edge;
//   - a timing warning: the sensor of endpoint 0 pulled its qn low.
// Endpoint 0 shares a two-input sensor, so its effective window runs from
// 60 ps to 3 ps before clk_dff with DW1 and from 111 ps before to 54 ps
// after it with DW2 (the clock-tree cell and two-input sensor timings).
// Hence the expected smallest error-free period is PathDelay+1 and the
// smallest warning-free periods are PathDelay+61 (DW1) and PathDelay+112
// (DW2): the warning always comes before the error, at about 97% and 94%
// of Fmax.
module tb_fmax_sensor_sweep;
  timeunit 1ps;
  timeprecision 1ps;
  import tsm_pkg::*;

  localparam int NEp       = 50;
  localparam int NSens     = 19;
  localparam int LeafToDff = 231;
  localparam int PathDelay = 1780;
  localparam int IdlePeriod = 4000;

  logic             clk_leaf;
  dw_sel_e          dw_sel;
  logic             sensor_sel;
  logic             rn;
  logic [NEp-1:0]   d;
  logic [NEp-1:0]   q;
  logic [NSens-1:0] qn;

  slack_monitor_system dut (
    .clk_leaf   (clk_leaf),
    .dw_sel     (dw_sel),
    .sensor_sel (sensor_sel),
    .rn         (rn),
    .d          (d),
    .q          (q),
    .qn         (qn)
  );

  int checks = 0;
  int failures = 0;
  int n_warn_only = 0;   // periods with a warning and no error
  int n_error = 0;       // periods with a timing error
  int n_quiet = 0;       // periods with neither

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // The critical path: the value launched at a clock edge reaches d[0]
  // PathDelay later.
  task automatic launch(input logic v);
    fork
      begin
        #(LeafToDff + PathDelay);
        d[0] = v;
      end
    join_none
  endtask

  // One leaf clock period of length t.
  task automatic clock_period(input int t);
    clk_leaf = 1'b1;
    #(t / 2);
    clk_leaf = 1'b0;
    #(t - t / 2);
  endtask

  // Runs four launches at period t; reports whether a warning and an error
  // occurred.
  task automatic run_period(input int t, output bit warned, output bit errored);
    logic v;
    logic launched [4];
    errored = 1'b0;
    // Quiet, slow cycles with the latches reset.
    rn = 1'b0;
    clock_period(IdlePeriod);
    rn = 1'b1;
    clock_period(IdlePeriod);
    v = d[0];
    for (int c = 0; c <= 4; c++) begin
      clk_leaf = 1'b1;
      if (c < 4) begin
        v = ~v;
        launched[c] = v;
        launch(v);
      end
      if (c > 0) begin
        #(LeafToDff + 1);
        if (q[0] !== launched[c - 1]) errored = 1'b1;
        #(t / 2 - LeafToDff - 1);
      end else begin
        #(t / 2);
      end
      clk_leaf = 1'b0;
      #(t - t / 2);
    end
    // Let the last transitions and warnings settle.
    clock_period(IdlePeriod);
    warned = !qn[0];
    // Bring the flip-flop back in line with d for the next period.
    clock_period(IdlePeriod);
  endtask

  task automatic sweep(input dw_sel_e mode, input int exp_nowarn, input int exp_noerr);
    bit warned, errored;
    int min_noerr, min_nowarn;
    bit err_seen, warn_seen;
    dw_sel     = mode;
    min_noerr  = 0;
    min_nowarn = 0;
    err_seen   = 1'b0;
    warn_seen  = 1'b0;
    for (int t = PathDelay + 150; t >= PathDelay - 10; t--) begin
      if (t == PathDelay) continue;
      run_period(t, warned, errored);
      if (errored) n_error++;
      else if (warned) n_warn_only++;
      else n_quiet++;
      // Expected outcome for this period, from the window bounds above.
      check($sformatf("%s T=%0d error=%0d", mode.name(), t, errored), errored == (t < PathDelay));
      if (errored) err_seen = 1'b1;
      if (warned)  warn_seen = 1'b1;
      if (!err_seen)  min_noerr = t;
      if (!warn_seen) min_nowarn = t;
    end
    $display("%s: Fmax period %0d ps, Fmax_sensor period %0d ps, Fmax_sensor/Fmax = %0d.%0d%%",
             mode.name(), min_noerr, min_nowarn, (1000 * min_noerr / min_nowarn) / 10,
             (1000 * min_noerr / min_nowarn) % 10);
    check($sformatf("%s smallest error-free period %0d, expected %0d", mode.name(), min_noerr,
                    exp_noerr), min_noerr == exp_noerr);
    check($sformatf("%s smallest warning-free period %0d, expected %0d", mode.name(),
                    min_nowarn, exp_nowarn), min_nowarn == exp_nowarn);
    check($sformatf("%s warning anticipates the error", mode.name()), min_nowarn > min_noerr);
  endtask

  initial begin
    clk_leaf   = 1'b0;
    dw_sel     = DW1;
    sensor_sel = 1'b1;
    rn         = 1'b1;
    d          = '0;
    #(IdlePeriod);
    clock_period(IdlePeriod);
    clock_period(IdlePeriod);
    sweep(DW1, PathDelay + 61, PathDelay + 1);
    sweep(DW2, PathDelay + 112, PathDelay + 1);
    check("periods with a warning but no error seen", n_warn_only > 0);
    check("periods with a timing error seen", n_error > 0);
    check("quiet periods seen", n_quiet > 0);
    $display("periods: quiet=%0d warning_only=%0d error=%0d", n_quiet, n_warn_only, n_error);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(64'd100_000_000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
