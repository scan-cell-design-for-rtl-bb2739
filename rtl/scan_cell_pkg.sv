// scan_cell_pkg: names for the two levels of the select line that every
// scan cell in the scan path shares.
//
// sel = 1 (SEL_SCAN):   the master latch takes scan data, the scan slave passes
//                        master data, the system slave holds and the
//                        instability sensor is held in reset.
// sel = 0 (SEL_SYSTEM): the master latch takes system data, the scan slave
//                        passes the instability sensor's result, the system
//                        slave follows the master while the clock is low and
//                        the instability sensor watches its input.
// The meaning of each level follows the cell's circuit diagram and its test
// procedure; the package itself is only a naming convenience.
package scan_cell_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic {
    SEL_SYSTEM = 1'b0,
    SEL_SCAN   = 1'b1
  } sel_e;
endpackage
