// tb_hazard_free_src: self-checking test of the hazard-free scan register cell
// (plain configuration, no observation multiplexer).
//
// Directed part: shifting with sel=1 (scan_out follows one pulse later,
// sys_out never moves), transfer to sys_out with a short sel=0 pulse while
// clock=0, and capture of sys_in with clock=1, sel=0, clock=0.
// Random part: random single-signal changes on clock, sel, sys_in and scan_in,
// compared after each change against a reference of the three storage
// elements written from the cell's rules: M follows the selected input while
// clock=1, S' follows M while clock=0, S follows M while clock=0 and sel=0.
module tb_hazard_free_src;
  timeunit 1ns;
  timeprecision 1ps;

  logic clock, sel, sys_in, scan_in;
  logic scan_out, sys_out;
  int checks = 0, failures = 0;
  logic ref_m, ref_sp, ref_s;

  hazard_free_src dut (
    .clock(clock), .sel(sel), .sys_in(sys_in), .scan_in(scan_in),
    .obs_in(1'b0), .scan_out(scan_out), .sys_out(sys_out)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(input logic exp_scan, input logic exp_sys, input string what);
    checks++;
    if (scan_out !== exp_scan || sys_out !== exp_sys) begin
      failures++;
      $display("FAIL %s: scan_out=%b sys_out=%b expected %b %b at %0t",
               what, scan_out, sys_out, exp_scan, exp_sys, $time);
    end
  endtask

  // Apply one set of inputs, update the reference, wait, compare.
  task automatic step(input logic c, input logic s, input logic si, input logic sci);
    clock = c; sel = s; sys_in = si; scan_in = sci;
    if (c)       ref_m  = s ? sci : si;
    if (!c)      ref_sp = ref_m;
    if (!c && !s) ref_s = ref_m;
    #1;
    expect_out(ref_sp, ref_s, "reference");
  endtask

  initial begin
    // Initialise every latch.
    clock = 1; sel = 1; sys_in = 0; scan_in = 0; #1;
    clock = 0; #1;
    sel = 0; #1;
    sel = 1; #1;
    ref_m = 0; ref_sp = 0; ref_s = 0;
    expect_out(0, 0, "init");

    // Shift a 1 in: sys_out must stay 0.
    scan_in = 1;
    clock = 1; #1;
    expect_out(0, 0, "clock high holds S'");
    clock = 0; #1;
    expect_out(1, 0, "shift 1, system slave holds");
    scan_in = 0;
    clock = 1; #1; clock = 0; #1;
    expect_out(0, 0, "shift 0");
    scan_in = 1;
    clock = 1; #1; clock = 0; #1;
    expect_out(1, 0, "shift 1 again");
    // Make it available to the system with a short sel=0 pulse.
    sel = 0; #0.5;
    expect_out(1, 1, "sel pulse transfers M to S");
    sel = 1; #1;
    expect_out(1, 1, "S holds after sel rises");
    // Shift a 0 in: sys_out keeps 1.
    scan_in = 0; sys_in = 1;
    clock = 1; #1; clock = 0; #1;
    expect_out(0, 1, "shift does not disturb sys_out");
    // Capture sys_in: clock=1, sel=0, clock=0.
    sys_in = 1;
    clock = 1; #1; sel = 0; #1; clock = 0; #1;
    expect_out(1, 1, "captured sys_in");
    sys_in = 0; #1;
    expect_out(1, 1, "M closed after falling edge");
    sel = 1; #1;
    ref_m = 1; ref_sp = 1; ref_s = 1;

    // Random walk.
    for (int n = 0; n < 2000; n++) begin
      logic c, s, si, sci;
      c = clock; s = sel; si = sys_in; sci = scan_in;
      case ($urandom_range(0, 3))
        0: c   = ~c;
        1: s   = ~s;
        2: si  = ~si;
        default: sci = ~sci;
      endcase
      step(c, s, si, sci);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
