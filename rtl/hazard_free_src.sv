// hazard_free_src: race- and hazard-free scan register cell.
//
// A D flip-flop (master latch M and scan slave S') carries the scan path, and
// an extra system slave S holds the value seen by the circuit under test, so
// shifting never disturbs the system side.
//   - An input multiplexer picks sys_in (sel=0) or scan_in (sel=1).
//   - M is transparent while clock=1 and keeps the multiplexer's value from
//     the falling clock edge.
//   - S' is transparent while clock=0 and closes on the rising edge; it drives
//     scan_out.
//   - S is transparent only while clock=0 and sel=0; it drives sys_out. While
//     sel=1 it holds, so the shifted data never reaches sys_out.
// Data moves one cell along the scan path per clock pulse (M loads on the high
// phase, S' on the low phase), with one clock and one select line and no extra
// control signals.
//
// When OBS_MUX is 1 a second multiplexer sits in front of S': with sel=1 S'
// takes M as above, with sel=0 it takes obs_in instead. The enhanced scan cell
// uses this to load its instability sensor's result into the scan path on the
// rising clock edge. With OBS_MUX=0 (the plain cell) obs_in is not used and
// lint tools report it as an unused input; the port stays so that both
// configurations share one interface. Making this multiplexer a parameter of
// the plain cell, rather than a second copy of the cell, is this design's
// choice.
//
// Latch enables follow the cell's diagram; the level polarity of the clock
// phases follows the cell's test procedure (M samples on the falling edge, S'
// on the rising edge). The latches are intentional.
module hazard_free_src
  import scan_cell_pkg::*;
#(
  parameter bit OBS_MUX = 1'b0  // 1 = S' can load obs_in while sel=0
) (
  input  logic clock,
  input  logic sel,      // 1 = scan, 0 = system
  input  logic sys_in,
  input  logic scan_in,
  input  logic obs_in,   // observation data for S' (OBS_MUX=1 only)
  output logic scan_out,
  output logic sys_out
);
  timeunit 1ns;
  timeprecision 1ps;

  logic m_d, m_q, sp_d;

  // Input multiplexer, sampled by M on the falling clock edge.
  assign m_d = (sel == SEL_SCAN) ? scan_in : sys_in;

  d_latch u_master (.en(clock), .d(m_d), .q(m_q));

  // Scan slave multiplexer, sampled by S' on the rising clock edge.
  if (OBS_MUX) begin : g_obs_mux
    assign sp_d = (sel == SEL_SCAN) ? m_q : obs_in;
  end else begin : g_no_obs_mux
    assign sp_d = m_q;
  end

  d_latch u_scan_slave (.en(~clock), .d(sp_d), .q(scan_out));

  // System slave: guarded by sel so it never loads during scanning.
  d_latch u_sys_slave (.en(~clock & (sel == SEL_SYSTEM)), .d(m_q), .q(sys_out));
endmodule
