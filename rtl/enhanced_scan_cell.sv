// enhanced_scan_cell: scan cell for delay fault testing with a built-in
// instability sensor.
//
// The cell combines the hazard-free scan register cell (hazard_free_src with
// its observation multiplexer enabled) and an instability sensor that watches
// sys_in. Only two control lines are needed, clock and sel:
//   - sel=1: scan_in goes to the master latch, the scan slave passes master
//     data, the system slave holds sys_out, the sensor is held in reset.
//   - sel=0: sys_in goes to the master latch, the scan slave passes the
//     sensor's active-low result, the system slave follows the master while
//     clock=0, and the sensor watches sys_in.
// The falling edge of sel therefore does both timing-critical things at once:
// with clock=0 it moves the master's bit to sys_out (launching the transition
// into the circuit under test) and it arms the sensor. The rising clock edge
// then freezes the sensor's result in the scan slave (0 = sys_in was unstable,
// 1 = stable) for shifting out with sel=1.
//
// Structure and control follow the cell's circuit diagram and test procedure;
// the circuit is modelled with ideal latches, so any pulse on sys_in inside
// the observation interval is caught regardless of its width.
module enhanced_scan_cell (
  input  logic clock,
  input  logic sel,      // 1 = scan / sensor reset, 0 = system / sense
  input  logic sys_in,   // circuit-under-test output observed by this cell
  input  logic scan_in,
  output logic scan_out,
  output logic sys_out   // circuit-under-test input driven by this cell
);
  timeunit 1ns;
  timeprecision 1ps;

  logic instability_sensed_n;

  instability_sensor u_sensor (
    .reset               (sel),
    .sense               (sys_in),
    .instability_sensed_n(instability_sensed_n)
  );

  hazard_free_src #(.OBS_MUX(1'b1)) u_src (
    .clock   (clock),
    .sel     (sel),
    .sys_in  (sys_in),
    .scan_in (scan_in),
    .obs_in  (instability_sensed_n),
    .scan_out(scan_out),
    .sys_out (sys_out)
  );
endmodule
