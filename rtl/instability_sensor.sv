// instability_sensor: detects whether a signal was unstable during an
// observation interval.
//
// Two set-reset flags record which logic levels have appeared on `sense`
// since `reset` was released: seen_one is set while sense is 1, seen_zero
// while sense is 0. If both levels appeared, the signal was unstable, and the
// NAND of the flags, instability_sensed_n, drops to 0. While reset is 1 both
// flags are cleared and instability_sensed_n is 1.
//
// Timing: the observation interval starts at the falling edge of reset and
// lasts until the next rising edge. Any pulse on sense inside the interval is
// caught, however short, because the flags are level-sensitive and never wait
// for a clock. Pulses while reset is 1 are ignored.
//
// The two-flag principle and the active-low NAND output follow the sensor the
// scan cell is designed with. That sensor keeps its flags on precharged
// dynamic nodes; here they are ordinary set-reset latches (reset dominant),
// which is this design's choice. The flags are deliberately latches.
module instability_sensor (
  input  logic reset,                // 1 = clear flags, 0 = observe
  input  logic sense,                // signal under observation
  output logic instability_sensed_n  // 0 = both levels seen since reset fell
);
  timeunit 1ns;
  timeprecision 1ps;

  logic seen_one;
  logic seen_zero;

  always_latch begin
    if (reset)      seen_one = 1'b0;
    else if (sense) seen_one = 1'b1;
  end

  always_latch begin
    if (reset)       seen_zero = 1'b0;
    else if (!sense) seen_zero = 1'b1;
  end

  assign instability_sensed_n = ~(seen_one & seen_zero);
endmodule
