// Self-checking testbench of the timing-slack sensor model.
//
// Two sensors share cp, sel and rn: a four-input one (the largest sharing
// of one latch) and a one-input one, each with its default, characterised
// timings. The testbench generates the CP pulse itself and places single
// input transitions at chosen offsets from the CP rising edge. For each it
// computes independently whether the transition lies in the effective
// detection window [-InCpRise, dw - InCpFall] (relative to the CP rising
// edge) and when QN must fall (In_A-to-QN after the input edge, rising or
// falling), then checks the sensor's QN and the exact fall time. Covered:
// detection before and during CP, the too-early and too-late cases, both
// window widths (106 and 214 ps), both input directions, every input of the
// four-input sensor, the disabled sensor, a warning held across cycles,
// reset timing (RN-to-QN) and a reset pulse shorter than the minimum.
module tb_slack_sensor;
  timeunit 1ps;
  timeprecision 1ps;

  logic [3:0] in4;
  logic [0:0] in1;
  logic       cp, sel, rn;
  logic       qn4, qn1;

  int checks = 0;
  int failures = 0;

  slack_sensor #(.N_IN(4)) dut4 (.in_d(in4), .cp(cp), .sel(sel), .rn(rn), .qn(qn4));
  slack_sensor #(.N_IN(1)) dut1 (.in_d(in1), .cp(cp), .sel(sel), .rn(rn), .qn(qn1));

  // Expected characterised timings, by sensor (0: four inputs, 1: one input).
  localparam int ExpInCpR [2] = '{48, 63};
  localparam int ExpInCpF [2] = '{105, 98};
  localparam int ExpInQnR [2] = '{295, 156};
  localparam int ExpInQnF [2] = '{359, 203};
  localparam int ExpRnQn  [2] = '{573, 221};
  localparam int ExpRnMin [2] = '{320, 165};

  time t_qn4_fall, t_qn1_fall, t_qn4_rise, t_qn1_rise;
  always @(negedge qn4) t_qn4_fall = $time;
  always @(negedge qn1) t_qn1_fall = $time;
  always @(posedge qn4) t_qn4_rise = $time;
  always @(posedge qn1) t_qn1_rise = $time;

  int detections, misses;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Full reset of both latches, then a check that QN is high.
  task automatic reset_all();
    rn = 1'b0;
    #(700);
    rn = 1'b1;
    #(100);
    check("reset_all: qn4 high", qn4 == 1'b1);
    check("reset_all: qn1 high", qn1 == 1'b1);
  endtask

  // One CP pulse of width dw, with input `idx` of sensor `s` toggled at
  // offset `ofs` from the CP rising edge. Checks detection and QN timing.
  task automatic scenario(input int s, input int idx, input int ofs, input int dw,
                          input bit enable);
    time t_cp, t_in;
    bit  rising, exp_hit, got_hit;
    int  exp_delay;
    sel  = enable;
    t_cp = $time + 1000;
    t_in = time'(longint'(t_cp) + ofs);
    fork
      begin
        #(1000);
        cp = 1'b1;
        #(dw);
        cp = 1'b0;
      end
      begin
        #(1000 + ofs);
        if (s == 0) begin
          rising   = ~in4[idx];
          in4[idx] = ~in4[idx];
        end else begin
          rising = ~in1[0];
          in1[0] = ~in1[0];
        end
      end
    join
    #(1000);
    exp_hit   = enable && ofs >= -ExpInCpR[s] && ofs <= dw - ExpInCpF[s];
    exp_delay = rising ? ExpInQnR[s] : ExpInQnF[s];
    got_hit   = (s == 0) ? !qn4 : !qn1;
    check($sformatf("sensor%0d in%0d ofs=%0d dw=%0d sel=%0d: detection=%0d", s, idx, ofs,
                    dw, enable, exp_hit), got_hit == exp_hit);
    if (exp_hit) begin
      detections++;
      check($sformatf("sensor%0d ofs=%0d: In-to-QN %0d ps", s, ofs, exp_delay),
            ((s == 0) ? t_qn4_fall : t_qn1_fall) == t_in + time'(exp_delay));
      reset_all();
    end else begin
      misses++;
    end
    sel = 1'b1;
  endtask

  initial begin
    in4 = '0;
    in1 = '0;
    cp  = 1'b0;
    sel = 1'b1;
    rn  = 1'b1;
    detections = 0;
    misses = 0;
    t_qn4_fall = 0; t_qn1_fall = 0; t_qn4_rise = 0; t_qn1_rise = 0;
    #(100);
    reset_all();

    // Four-input sensor, narrow window (dw = 106: window [-48, +1]).
    scenario(0, 0, -40, 106, 1);   // before CP, inside window
    scenario(0, 1, -47, 106, 1);   // near the start edge
    scenario(0, 2, -49, 106, 1);   // just too early
    scenario(0, 3,   0, 106, 1);   // at the CP edge
    scenario(0, 0,   1, 106, 1);   // last detectable instant
    scenario(0, 1,   3, 106, 1);   // too late
    scenario(0, 2, -200, 106, 1);  // far too early
    // Wide window (dw = 214: window [-48, +109]).
    scenario(0, 3,  60, 214, 1);   // during CP
    scenario(0, 0, 109, 214, 1);
    scenario(0, 1, 112, 214, 1);   // too late: CP ends before C discharges
    scenario(0, 2, 150, 214, 1);
    scenario(0, 3, -20, 214, 0);   // sensor disabled
    // One-input sensor (window [-63, dw-98]).
    scenario(1, 0, -60, 106, 1);
    scenario(1, 0, -65, 106, 1);
    scenario(1, 0,   8, 106, 1);
    scenario(1, 0,   9, 106, 1);
    scenario(1, 0, 116, 214, 1);

    // A warning stays latched over later quiet CP pulses.
    scenario(0, 0, -10, 106, 1);   // detects, then reset_all inside
    fork
      begin #(1000); cp = 1'b1; #(106); cp = 1'b0; end
      begin #(990); in4[1] = ~in4[1]; end
    join
    repeat (3) begin
      #(900); cp = 1'b1; #(106); cp = 1'b0;
    end
    #(500);
    check("warning held over quiet cycles", qn4 == 1'b0);

    // A reset pulse shorter than the minimum leaves the warning latched.
    rn = 1'b0;
    #(ExpRnMin[0] - 50);
    rn = 1'b1;
    #(1000);
    check("short RN keeps qn4 low", qn4 == 1'b0);

    // A full reset returns QN high RN-to-QN after RN falls.
    rn = 1'b0;
    fork begin : rn_pulse #(1000); end join
    check("RN-to-QN (4 inputs)", t_qn4_rise == $time - 1000 + time'(ExpRnQn[0]));
    rn = 1'b1;
    #(200);
    check("qn4 high after reset", qn4 == 1'b1);

    // RN-to-QN of the one-input sensor.
    fork
      begin #(1000); cp = 1'b1; #(106); cp = 1'b0; end
      begin #(980); in1[0] = ~in1[0]; end
    join
    #(500);
    check("qn1 warned", qn1 == 1'b0);
    rn = 1'b0;
    #(400);
    rn = 1'b1;
    check("RN-to-QN (1 input)", t_qn1_rise == $time - 400 + time'(ExpRnQn[1]));

    // No warning is latched while RN is low.
    #(500);
    rn = 1'b0;
    fork
      begin #(1000); cp = 1'b1; #(106); cp = 1'b0; end
      begin #(990); in4[2] = ~in4[2]; end
    join
    #(600);
    rn = 1'b1;
    #(200);
    check("no warning while RN low", qn4 == 1'b1);

    check("detections seen", detections >= 8);
    check("misses seen", misses >= 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(200_000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
