// d_latch: level-sensitive D latch, the memory element the scan cells are
// built from (master latch M, scan slave S' and system slave S).
//
// While en is 1 the latch is transparent (q follows d); while en is 0 it
// holds the value d had when en fell. There is no reset: the cell's test
// procedure initialises every latch by clocking data into it.
// The inferred latch is intentional; the scan cells rely on level-sensitive
// storage so that the master and the two slaves are never open together.
// Some lint tools report that they find no latch in this single guarded
// assignment; synthesis infers exactly one latch bit from it.
module d_latch (
  input  logic en,  // 1 = transparent, 0 = hold
  input  logic d,
  output logic q
);
  timeunit 1ns;
  timeprecision 1ps;

  always_latch begin
    if (en) q = d;
  end
endmodule
