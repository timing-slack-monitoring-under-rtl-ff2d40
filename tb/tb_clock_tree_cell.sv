// Self-checking testbench of the clock-tree cell model.
//
// Drives a 500 MHz leaf clock (2 ns period) and measures, for both
// detection-window settings, every edge the cell produces: the delay from
// the leaf clock to clk_dff (rising and falling), the delay from the leaf
// clock to the rising edge of cp, the cp pulse width, the resulting
// CP(rise)-to-CLK_DFF and CP(fall)-to-CLK_DFF offsets, and that exactly one
// cp pulse comes per clock period (none on the falling edge). Expected
// values are the characterised mean timings of the programmable cell,
// written here as literals.
module tb_clock_tree_cell;
  timeunit 1ps;
  timeprecision 1ps;
  import tsm_pkg::*;

  localparam time Period = 2000;

  logic    clk_leaf;
  dw_sel_e dw_sel;
  logic    clk_dff, cp;

  int checks = 0;
  int failures = 0;

  clock_tree_cell dut (
    .clk_leaf (clk_leaf),
    .dw_sel   (dw_sel),
    .clk_dff  (clk_dff),
    .cp       (cp)
  );

  time t_leaf_r, t_leaf_f, t_dff_r, t_dff_f, t_cp_r, t_cp_f;
  int  cp_pulses;

  always @(posedge clk_leaf) t_leaf_r = $time;
  always @(negedge clk_leaf) t_leaf_f = $time;
  always @(posedge clk_dff)  t_dff_r  = $time;
  always @(negedge clk_dff)  t_dff_f  = $time;
  always @(posedge cp) begin
    t_cp_r = $time;
    cp_pulses++;
  end
  always @(negedge cp) t_cp_f = $time;

  task automatic check_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d ps, expected %0d ps", what, got, exp);
    end
  endtask

  // Runs n leaf clock periods.
  task automatic run_cycles(input int n);
    repeat (n) begin
      clk_leaf = 1'b1;
      #(Period / 2);
      clk_leaf = 1'b0;
      #(Period / 2);
    end
  endtask

  task automatic measure(input dw_sel_e sel, input longint exp_leaf_cp, input longint exp_dw);
    dw_sel = sel;
    run_cycles(2);  // let the new setting settle
    cp_pulses = 0;
    run_cycles(3);
    check_eq($sformatf("%s pulses in 3 periods", sel.name()), cp_pulses, 3);
    check_eq($sformatf("%s CLK_LEAF->CLK_DFF rise", sel.name()),
             longint'(t_dff_r) - longint'(t_leaf_r), 231);
    check_eq($sformatf("%s CLK_LEAF->CLK_DFF fall", sel.name()),
             longint'(t_dff_f) - longint'(t_leaf_f), 231);
    check_eq($sformatf("%s CLK_LEAF->CP", sel.name()),
             longint'(t_cp_r) - longint'(t_leaf_r), exp_leaf_cp);
    check_eq($sformatf("%s dw", sel.name()), longint'(t_cp_f) - longint'(t_cp_r), exp_dw);
    // CP rises before CLK_DFF and falls after it.
    check_eq($sformatf("%s CP(rise)-to-CLK_DFF", sel.name()),
             longint'(t_dff_r) - longint'(t_cp_r), 231 - exp_leaf_cp);
    check_eq($sformatf("%s CP(fall)-to-CLK_DFF", sel.name()),
             longint'(t_dff_r) - longint'(t_cp_f), 231 - exp_leaf_cp - exp_dw);
    checks++;
    if (!(t_cp_r < t_dff_r && t_cp_f > t_dff_r)) begin
      failures++;
      $display("FAIL %s: CP pulse does not straddle the CLK_DFF rising edge", sel.name());
    end
  endtask

  initial begin
    clk_leaf  = 1'b0;
    dw_sel    = DW1;
    cp_pulses = 0;
    #(Period);
    measure(DW1, 224, 106);
    measure(DW2, 173, 214);
    measure(DW1, 224, 106);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(Period * 100);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
