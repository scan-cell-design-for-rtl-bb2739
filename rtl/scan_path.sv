// scan_path: a scan register of N_CELLS enhanced scan cells for delay fault
// testing of the combinational logic between sys_out and sys_in.
//
// The cells are chained: scan_in feeds cell 0, cell i's scan_out feeds cell
// i+1, and cell N_CELLS-1 drives scan_out. Cell i drives sys_out[i] (a circuit
// input) and observes sys_in[i] (a circuit output). All cells share clock and
// sel; no other control line exists.
//
// A delay fault test runs as follows (each step is a level change on the
// inputs, not a clocked command):
//   1. sel=1; shift the initial vector in, one bit per clock pulse, the bit
//      for cell N_CELLS-1 first. sys_out does not move while sel=1.
//   2. With clock=0, pulse sel to 0: sys_out takes the initial vector.
//   3. sel=1; shift the final vector in; sys_out still shows the initial one.
//   4. With clock=0, drop sel to 0: sys_out takes the final vector and the
//      transitions start through the circuit.
//   5. Raise sel to reset the instability sensors; drop it again at the time
//      the circuit should have settled, which arms the sensors.
//   6. Raise clock at the end of the observation time: every cell stores its
//      sensor result (0 = unstable, 1 = stable). scan_out now shows cell
//      N_CELLS-1's result.
//   7. sel=1; each further clock pulse brings the next cell's result out, the
//      new bit being valid after the falling edge.
//   8. Capture the settled circuit outputs with clock=1, sel=0, clock=0, then
//      sel=1 and shift them out the same way (cell N_CELLS-1 first).
// The chain and this procedure follow the design's description; the number of
// cells is a free parameter of this implementation.
module scan_path #(
  parameter int unsigned N_CELLS = 8
) (
  input  logic               clock,
  input  logic               sel,
  input  logic               scan_in,
  output logic               scan_out,
  input  logic [N_CELLS-1:0] sys_in,
  output logic [N_CELLS-1:0] sys_out
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [N_CELLS:0] chain;  // chain[i] is cell i's scan input

  assign chain[0] = scan_in;

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    enhanced_scan_cell u_cell (
      .clock   (clock),
      .sel     (sel),
      .sys_in  (sys_in[i]),
      .scan_in (chain[i]),
      .scan_out(chain[i+1]),
      .sys_out (sys_out[i])
    );
  end

  assign scan_out = chain[N_CELLS];
endmodule
