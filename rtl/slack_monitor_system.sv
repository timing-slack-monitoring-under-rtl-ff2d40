// Timing-slack monitoring system of a processor block: the monitored
// endpoint flip-flops of its critical paths, the sensors that watch their
// D inputs and the clock-tree cells that clock them and time the sensors.
//
// Idea: instead of detecting timing errors after the fact, the D input of
// each critically timed flip-flop is watched during a short detection
// window that ends just before the flip-flop's setup window. A data
// transition inside that window means the path has almost no slack left;
// the sensor latches a warning that a voltage/frequency controller can
// act on before any real error occurs.
//
// Organisation (default sizes are those of the validated DSP block):
//   - N_EP monitored endpoints (50). Endpoint e has a flip-flop that
//     captures d[e] on the rising edge of its group's clk_dff.
//   - N_SENS sensors (19). Close endpoints share a sensor, at most four per
//     sensor. Endpoints are dealt to sensors in order: sensor s watches
//     endpoints floor(s*N_EP/N_SENS) up to floor((s+1)*N_EP/N_SENS)-1, so
//     with the defaults sensors watch two or three endpoints each.
//   - N_CC clock-tree cells (11). One cell serves several sensors and the
//     flip-flops of their endpoints: sensor s uses cell
//     floor(s*N_CC/N_SENS). Each cell turns the common leaf clock into
//     clk_dff for its flip-flops and the CP pulse for its sensors.
// How endpoints are grouped on sensors and sensors on cells in silicon
// follows placement, which is not published; the in-order split is this
// design's choice. The clock tree in front of the cells is modelled as
// ideal (all cells see clk_leaf at the same time).
//
// Interface: dw_sel selects the detection window of all cells (narrow DW1
// or wide DW2); sensor_sel enables all sensors; rn resets all warning
// latches (active low). qn[s] is sensor s's active-low warning. q holds the
// endpoint flip-flop outputs; the flip-flops have no reset, like datapath
// registers.
//
// Timing: the flip-flops sample d on clk_dff, 231 ps after clk_leaf. A
// transition on d[e] in the effective window just before that edge
// (50 to 57 ps wide with DW1 and 157 to 165 ps with DW2, depending on how
// many inputs the sensor has)
// pulls qn low a few hundred ps later. The cells and sensors are
// behavioural models with delays; only the flip-flops are synthesizable.
module slack_monitor_system
  import tsm_pkg::*;
#(
  parameter int unsigned N_EP   = 50,
  parameter int unsigned N_SENS = 19,
  parameter int unsigned N_CC   = 11
) (
  input  logic              clk_leaf,    // leaf clock, before the CC cells
  input  dw_sel_e           dw_sel,      // detection window of all CC cells
  input  logic              sensor_sel,  // enable of all sensors
  input  logic              rn,          // active-low reset of warnings
  input  logic [N_EP-1:0]   d,           // endpoint data (critical path ends)
  output logic [N_EP-1:0]   q,           // endpoint flip-flop outputs
  output logic [N_SENS-1:0] qn           // active-low warning per sensor
);
  timeunit 1ps;
  timeprecision 1ps;

  // First endpoint of sensor s (s = N_SENS gives N_EP).
  function automatic int unsigned ep_first(int unsigned s);
    return (s * N_EP) / N_SENS;
  endfunction

  // Clock-tree cell of sensor s.
  function automatic int unsigned cc_of_sens(int unsigned s);
    return (s * N_CC) / N_SENS;
  endfunction

  // Largest group handled by one sensor.
  localparam int unsigned MaxGroup = (N_EP + N_SENS - 1) / N_SENS;

  if (N_SENS > N_EP || N_CC > N_SENS || MaxGroup > MaxSensorInputs) begin : g_bad_cfg
    $error("slack_monitor_system: each sensor needs 1..%0d endpoints, each CC at least one sensor",
           MaxSensorInputs);
  end

  logic [N_CC-1:0] clk_dff;
  logic [N_CC-1:0] cp;

  for (genvar c = 0; c < N_CC; c++) begin : g_cc
    clock_tree_cell u_cc (
      .clk_leaf (clk_leaf),
      .dw_sel   (dw_sel),
      .clk_dff  (clk_dff[c]),
      .cp       (cp[c])
    );
  end

  for (genvar s = 0; s < N_SENS; s++) begin : g_sens
    localparam int unsigned First = ep_first(s);
    localparam int unsigned Count = ep_first(s + 1) - ep_first(s);
    localparam int unsigned Cell  = cc_of_sens(s);

    slack_sensor #(
      .N_IN (Count)
    ) u_sensor (
      .in_d (d[First +: Count]),
      .cp   (cp[Cell]),
      .sel  (sensor_sel),
      .rn   (rn),
      .qn   (qn[s])
    );

    // The monitored flip-flops of this sensor, clocked by the same cell.
    logic [Count-1:0] q_grp;
    always_ff @(posedge clk_dff[Cell]) q_grp <= d[First +: Count];
    assign q[First +: Count] = q_grp;
  end

endmodule
