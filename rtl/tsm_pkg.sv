// Shared timing constants of the timing-slack monitoring cells.
//
// The monitoring system is built from two library cells: a transition
// sensor and a clock-tree cell (CC) that produces the sensor's detection
// pulse CP. Both are modelled behaviourally with delays in picoseconds,
// and the numbers below are their characterised timings in a 45 nm low
// power process.
//
// Sensor tables are indexed by the number of transition detectors that
// share one output latch (1 to 4). They hold the worst-process figures at
// 1.05 V / 125 C: In_A-to-QN for a rising and a falling input, RN-to-QN,
// the minimum CP high and RN low pulse widths, and In_A-to-CP for the
// rising and falling CP edge. The clock-tree cell constants are the
// Monte Carlo mean values of a programmable CC at 1.1 V / 25 C for its two
// detection windows. The internal split of the CC delays (buffer and NAND
// delays) is this design's own choice; only the end-to-end figures are
// characterised ones.
package tsm_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  // Largest number of transition detectors sharing one latch.
  localparam int unsigned MaxSensorInputs = 4;

  typedef int unsigned ps_t;
  typedef ps_t sensor_table_t[1:MaxSensorInputs];

  // Sensor timings (ps), index = number of inputs.
  localparam sensor_table_t SensInQnRise  = '{156, 263, 278, 295};
  localparam sensor_table_t SensInQnFall  = '{203, 302, 322, 359};
  localparam sensor_table_t SensRnQn      = '{221, 404, 531, 573};
  localparam sensor_table_t SensCpMinHigh = '{165, 163, 167, 164};
  localparam sensor_table_t SensRnMinLow  = '{165, 215, 280, 320};
  localparam sensor_table_t SensInCpRise  = '{ 63,  53,  54,  48};
  localparam sensor_table_t SensInCpFall  = '{ 98, 102, 110, 105};

  // Programmable clock-tree cell timings (ps), mean values.
  localparam ps_t CcLeafToClkDff = 231;  // same for both windows
  localparam ps_t CcLeafToCpDw1  = 224;
  localparam ps_t CcLeafToCpDw2  = 173;
  localparam ps_t CcDw1          = 106;
  localparam ps_t CcDw2          = 214;

  // Detection-window selection of a programmable clock-tree cell.
  typedef enum logic {
    DW1 = 1'b0,  // narrow window, smaller timing margin
    DW2 = 1'b1   // wide window, larger timing margin
  } dw_sel_e;

endpackage
