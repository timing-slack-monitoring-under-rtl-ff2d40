// Behavioural model of the multi-input timing-slack sensor, a custom
// transistor-level standard cell. It is not synthesizable logic: it is
// written with delays and only meant for simulation.
//
// Function: each input in_d[i] is the D input of a monitored flip-flop.
// In silicon, every input has a transition detector (an inverter chain
// and two transistor stacks, one for rising and one for falling inputs)
// that briefly opens a discharge path from node C to ground; the path
// also runs through a transistor gated by CP and one gated by sel. When a
// transition's short conduction interval overlaps the CP pulse long
// enough, node C discharges and the weak-feedback latch on C drives QN
// low: a timing warning. All detectors share node C, the tail transistors
// and the latch, so qn is the OR of warnings of all inputs (active low).
// An active-low rn recharges node C and returns qn high.
//
// The model reduces this to characterised timings. A transition on input
// i at time t is detected when sel is high, rn is high and
//     t_cp_rise - InCpRise  <=  t  <=  t_cp_fall - InCpFall,
// the effective detection window whose width is dw + InCpRise - InCpFall.
// A transition too early for this window (the conduction interval ends
// before CP has discharged C) or too late (CP falls before C is fully
// discharged) is not detected. A detected transition drives qn low
// InQnRise/InQnFall after the input edge, for a rising/falling input.
// A low pulse on rn of at least RnMinLow resets the latch and qn rises
// RnQn after rn fell; a shorter pulse leaves the latch as it was. While rn
// is low no warning is latched. qn starts high.
//
// Which timing applies to which edge follows the published waveform of
// the detection window (In_A-to-CP_r measured from the CP rising edge back
// to the start of the window, In_A-to-CP_f from the CP falling edge back
// to its end). Defaults are the characterised figures for N_IN detectors
// sharing one latch. The characterised minimum CP high time (about
// 165 ps) is not enforced: the narrow window of the programmable clock-tree
// cell (106 ps) is shorter and is still meant to detect transitions.
// Every time is an integer number of picoseconds.
module slack_sensor
  import tsm_pkg::*;
#(
  parameter int unsigned N_IN     = MaxSensorInputs,
  parameter ps_t         InCpRise = SensInCpRise[N_IN],
  parameter ps_t         InCpFall = SensInCpFall[N_IN],
  parameter ps_t         InQnRise = SensInQnRise[N_IN],
  parameter ps_t         InQnFall = SensInQnFall[N_IN],
  parameter ps_t         RnQn     = SensRnQn[N_IN],
  parameter ps_t         RnMinLow = SensRnMinLow[N_IN]
) (
  input  logic [N_IN-1:0] in_d,  // monitored flip-flop D inputs
  input  logic            cp,    // detection pulse from the clock-tree cell
  input  logic            sel,   // sensor enable (tail transistor T6)
  input  logic            rn,    // active-low latch reset
  output logic            qn     // active-low timing warning
);
  timeunit 1ps;
  timeprecision 1ps;

  if (InCpRise > InCpFall || InQnRise <= InCpFall || InQnFall <= InCpFall) begin : g_bad_timing
    $error("slack_sensor: needs InCpRise <= InCpFall < InQnRise, InQnFall");
  end

  time t_cp_rise;
  time t_cp_fall;
  time t_rn_fall;
  int unsigned rn_epoch;

  initial begin
    qn        = 1'b1;
    t_cp_rise = '0;
    t_cp_fall = '0;
    t_rn_fall = '0;
    rn_epoch  = 0;
  end

  always @(posedge cp) t_cp_rise = $time;
  always @(negedge cp) t_cp_fall = $time;

  // Follows one input transition. The decision is taken 1 ps after the
  // edge plus InCpFall, when every CP edge up to that instant is known: the
  // CP pulse must have lasted at least until the edge plus InCpFall and
  // must have risen no later than the edge plus InCpRise; together these
  // are the window condition above. The warning then appears on qn at the
  // input edge plus In_A-to-QN.
  task automatic follow_edge(input logic rising);
    fork
      begin
        time         t_in;
        int unsigned epoch;
        t_in  = $time;
        epoch = rn_epoch;
        #(InCpFall + 1);
        // The recorded edge times, not the level of cp, tell whether the
        // pulse is still on, so a CP edge at this very instant is harmless.
        if (sel && rn && (t_cp_rise > t_cp_fall || t_cp_fall >= t_in + time'(InCpFall)) &&
            t_cp_rise <= t_in + time'(InCpRise)) begin
          if (rising) #(InQnRise - InCpFall - 1);
          else        #(InQnFall - InCpFall - 1);
          if (rn && epoch == rn_epoch) qn = 1'b0;
        end
      end
    join_none
  endtask

  // One transition detector per input; all share node C and the latch.
  for (genvar i = 0; i < N_IN; i++) begin : g_det
    always @(in_d[i]) follow_edge(in_d[i]);
  end

  // Reset: rn low for RnMinLow or more recharges node C.
  always @(negedge rn) begin
    rn_epoch++;
    t_rn_fall = $time;
    fork
      begin
        int unsigned epoch;
        epoch = rn_epoch;
        #(RnMinLow);
        if (!rn && epoch == rn_epoch) begin
          #(RnQn - RnMinLow);
          if (epoch == rn_epoch) qn = 1'b1;
        end
      end
    join_none
  end

  // A second fall of rn before the first reset finished restarts it; a
  // rise of rn ends the reset pulse, and its length decides above.
  always @(posedge rn) if ($time - t_rn_fall < time'(RnMinLow)) rn_epoch++;

endmodule
