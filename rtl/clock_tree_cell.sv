// Behavioural model of the programmable clock-tree cell (CC), a custom
// standard cell placed at a clock-tree leaf in front of monitored
// flip-flops. It is an analog-timed cell, not synthesizable logic: it is
// written with delays and only meant for simulation.
//
// Function: from the leaf clock CLK_LEAF the cell produces
//   - clk_dff, the flip-flop clock, CLK_LEAF delayed by LeafToClkDff;
//   - cp, a positive pulse of width dw launched on every rising edge of
//     CLK_LEAF, which opens the detection window of the timing-slack
//     sensors. Its rising edge comes a few ps before (dw1) or some tens of
//     ps before (dw2) the rising edge of clk_dff, and it ends after it.
//
// Structure (as in the cell's schematic): an input buffer gives node n1;
// delay D1 drives clk_dff; the pulse generator is a delay D2 with an
// inverting output (n2) and a two-input NAND of n1 and n2, so n3 is low
// for D2 after each rising edge of n1; an inverting delay D3 turns the low
// pulse on n3 into the high pulse on cp. D2 therefore sets the pulse width
// dw and D1/D3 set the position of the pulse relative to clk_dff. The
// programmable cell has two settings of D2/D3, chosen by dw_sel.
//
// Timing: the end-to-end delays (CLK_LEAF to clk_dff 231 ps, CLK_LEAF to
// cp 224/173 ps, dw 106/214 ps) are the characterised mean values of the
// programmable cell. How they split into buffer, NAND, D1, D2 and D3 is
// not published; the 20 ps buffer and 10 ps NAND delays are this model's
// choice, and D1/D3 follow from them. All delays are transport delays.
module clock_tree_cell
  import tsm_pkg::*;
#(
  parameter ps_t LeafToClkDff = CcLeafToClkDff,
  parameter ps_t LeafToCpDw1  = CcLeafToCpDw1,
  parameter ps_t LeafToCpDw2  = CcLeafToCpDw2,
  parameter ps_t Dw1          = CcDw1,
  parameter ps_t Dw2          = CcDw2,
  parameter ps_t BufDelay     = 20,
  parameter ps_t NandDelay    = 10
) (
  input  logic    clk_leaf,  // clock from the clock-tree leaf
  input  dw_sel_e dw_sel,    // detection window: DW1 narrow, DW2 wide
  output logic    clk_dff,   // clock of the monitored flip-flops
  output logic    cp         // detection pulse for the sensors
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam ps_t D1    = LeafToClkDff - BufDelay;
  localparam ps_t D3Dw1 = LeafToCpDw1 - BufDelay - NandDelay;
  localparam ps_t D3Dw2 = LeafToCpDw2 - BufDelay - NandDelay;

  logic n1, n2, n3;

  initial begin
    n1      = 1'b0;
    n2      = 1'b1;
    n3      = 1'b1;
    clk_dff = 1'b0;
    cp      = 1'b0;
  end

  // Transport delays: every input edge is forwarded after its delay, so
  // an edge that arrives while an earlier one is still in flight is kept.
  task automatic set_n1(input logic v, input ps_t dly);
    fork begin #(dly); n1 = v; end join_none
  endtask
  task automatic set_clk_dff(input logic v, input ps_t dly);
    fork begin #(dly); clk_dff = v; end join_none
  endtask
  task automatic set_n2(input logic v, input ps_t dly);
    fork begin #(dly); n2 = v; end join_none
  endtask
  task automatic set_n3(input logic v, input ps_t dly);
    fork begin #(dly); n3 = v; end join_none
  endtask
  task automatic set_cp(input logic v, input ps_t dly);
    fork begin #(dly); cp = v; end join_none
  endtask

  // Delays D2 and D3 of the selected window.
  ps_t d2, d3;
  assign d2 = (dw_sel == DW2) ? Dw2 : Dw1;
  assign d3 = (dw_sel == DW2) ? D3Dw2 : D3Dw1;

  // Input buffer.
  always @(clk_leaf) set_n1(clk_leaf, BufDelay);

  // Clock path: delay D1.
  always @(n1) set_clk_dff(n1, D1);

  // Pulse generator: inverting delay D2 and a two-input NAND.
  always @(n1) set_n2(~n1, d2);
  always @(n1 or n2) set_n3(~(n1 & n2), NandDelay);

  // Inverting delay D3 to the CP output.
  always @(n3) set_cp(~n3, d3);

endmodule
