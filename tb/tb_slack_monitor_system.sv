// End-to-end testbench of the timing-slack monitoring system, at its
// default size (50 monitored endpoints, 19 sensors, 11 clock-tree cells).
//
// A 500 MHz leaf clock runs throughout. Each test step lets one endpoint's
// data arrive at a chosen offset from its flip-flop's clock edge (clk_dff,
// 231 ps after the leaf clock) and then checks, against values worked out
// here:
//   - the flip-flop: a new value arriving before the edge is captured, one
//     arriving after it is captured a cycle late (a timing error);
//   - the warnings: only the sensor that watches that endpoint, found by
//     the in-order endpoint grouping, pulls its qn low, and only when the
//     arrival lies in the effective detection window of the selected
//     clock-tree cell setting (30 ps before the edge is inside both windows;
//     90 ps before is inside only the wide DW2 window; 600 ps before is
//     outside both);
//   - a disabled sensor never warns, and rn clears every warning.
// Counted mechanisms, each of which must occur: narrow-window warnings,
// wide-window-only warnings (window switch), misses of early data, timing
// errors, late data flagged by the wide window (which reaches past the
// clock edge), disabled sensors, warnings of a second endpoint on a shared
// sensor, and resets.
module tb_slack_monitor_system;
  timeunit 1ps;
  timeprecision 1ps;
  import tsm_pkg::*;

  localparam int  NEp   = 50;
  localparam int  NSens = 19;
  localparam time Period = 2000;
  localparam int  LeafToDff = 231;

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

  // Mechanism counters.
  int n_warn_dw1, n_warn_dw2_only, n_early_miss, n_timing_error;
  int n_disabled, n_shared, n_reset, n_error_flagged;
  bit sensor_warned_before [NSens];

  initial begin
    clk_leaf = 1'b0;
    forever #(Period / 2) clk_leaf = ~clk_leaf;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Sensor watching endpoint e: endpoints are dealt to sensors in order,
  // in groups whose boundaries are floor(s*NEp/NSens).
  function automatic int sensor_of(input int e);
    for (int s = 0; s < NSens; s++)
      if (e >= (s * NEp) / NSens && e < ((s + 1) * NEp) / NSens) return s;
    return -1;
  endfunction

  // One step: endpoint e's data toggles `ofs` ps from its clock edge.
  task automatic step(input int e, input int ofs, input dw_sel_e mode, input bit enable,
                      input bit exp_warn);
    logic [NSens-1:0] exp_qn;
    logic             new_val;
    int               s;
    int               wait_ps;
    s          = sensor_of(e);
    dw_sel     = mode;
    sensor_sel = enable;
    // The leaf edge after the next one is the target; the wait is positive
    // for any offset above -(Period + LeafToDff).
    wait_ps = int'(Period) + LeafToDff + ofs;
    @(posedge clk_leaf);
    #(wait_ps);
    new_val = ~d[e];
    d[e]    = new_val;
    // Just after the flip-flop clock edge of this cycle.
    if (ofs < 0) #(-ofs + 5);
    else         #(5);
    if (ofs < 0) begin
      check($sformatf("ep%0d ofs=%0d captured", e, ofs), q[e] == new_val);
    end else begin
      check($sformatf("ep%0d ofs=%0d old value kept (error)", e, ofs), q[e] == ~new_val);
      @(posedge clk_leaf);
      #(LeafToDff + 5);
      check($sformatf("ep%0d ofs=%0d captured one cycle late", e, ofs), q[e] == new_val);
      n_timing_error++;
    end
    // Warnings have settled well within a few hundred ps.
    #(800);
    exp_qn = '1;
    if (exp_warn) exp_qn[s] = 1'b0;
    check($sformatf("ep%0d ofs=%0d %s sel=%0d: qn=%b expected %b", e, ofs, mode.name(), enable,
                    qn, exp_qn), qn == exp_qn);
    if (exp_warn) begin
      if (mode == DW1) n_warn_dw1++;
      if (sensor_warned_before[s]) n_shared++;
      sensor_warned_before[s] = 1'b1;
      // Clear the warning: rn low for 700 ps, away from any window.
      rn = 1'b0;
      #(700);
      rn = 1'b1;
      #(200);
      check($sformatf("ep%0d: reset clears qn", e), qn == '1);
      n_reset++;
    end
    sensor_sel = 1'b1;
  endtask

  initial begin
    dw_sel     = DW1;
    sensor_sel = 1'b1;
    rn         = 1'b1;
    d          = '0;
    n_warn_dw1 = 0; n_warn_dw2_only = 0; n_early_miss = 0; n_timing_error = 0;
    n_disabled = 0; n_shared = 0; n_reset = 0; n_error_flagged = 0;
    foreach (sensor_warned_before[s]) sensor_warned_before[s] = 1'b0;
    // Settle: the flip-flops load d, the latches are reset.
    rn = 1'b0;
    repeat (3) @(posedge clk_leaf);
    rn = 1'b1;
    #(Period);
    check("flip-flops loaded", q == d);
    check("no warning after reset", qn == '1);

    // Every endpoint, narrow window: data 30 ps before the edge warns.
    for (int e = 0; e < NEp; e++) step(e, -30, DW1, 1'b1, 1'b1);

    // Window switch: 90 ps before the edge is outside DW1, inside DW2.
    for (int e = 0; e < NEp; e += 7) begin
      step(e, -90, DW1, 1'b1, 1'b0);
      step(e, -90, DW2, 1'b1, 1'b1);
      n_warn_dw2_only++;
    end
    dw_sel = DW1;

    // Early data (ample slack) never warns.
    for (int e = 3; e < NEp; e += 11) begin
      step(e, -600, DW1, 1'b1, 1'b0);
      step(e, -600, DW2, 1'b1, 1'b0);
      n_early_miss++;
    end

    // Late data: a timing error, after the narrow window has closed.
    for (int e = 5; e < NEp; e += 13) step(e, 20, DW1, 1'b1, 1'b0);

    // The wide window reaches past the clock edge: the same late data is
    // flagged, as an error rather than a warning.
    for (int e = 6; e < NEp; e += 13) begin
      step(e, 20, DW2, 1'b1, 1'b1);
      n_error_flagged++;
    end
    dw_sel = DW1;

    // Disabled sensors stay silent.
    for (int e = 1; e < NEp; e += 9) begin
      step(e, -30, DW1, 1'b0, 1'b0);
      n_disabled++;
    end

    check("narrow-window warnings seen", n_warn_dw1 > 0);
    check("wide-window-only warnings seen", n_warn_dw2_only > 0);
    check("early data misses seen", n_early_miss > 0);
    check("timing errors seen", n_timing_error > 0);
    check("disabled sensors seen", n_disabled > 0);
    check("shared-sensor warnings seen", n_shared > 0);
    check("resets seen", n_reset > 0);
    check("late data flagged by the wide window seen", n_error_flagged > 0);
    $display("mechanisms: dw1_warn=%0d dw2_only_warn=%0d early_miss=%0d timing_error=%0d disabled=%0d shared=%0d reset=%0d error_flagged=%0d",
             n_warn_dw1, n_warn_dw2_only, n_early_miss, n_timing_error, n_disabled, n_shared,
             n_reset, n_error_flagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(Period * 20000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
