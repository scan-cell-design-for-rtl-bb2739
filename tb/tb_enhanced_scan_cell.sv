// tb_enhanced_scan_cell: self-checking test of one enhanced scan cell.
//
// Directed part: one delay fault test as the cell is meant to be used
// (initial bit, final bit, launch, sensor reset and arming, sensor capture on
// the rising clock edge, shift-out, capture of the settled sys_in), once with
// a stable sys_in, once with a glitch after arming, once with a late
// transition and once with a glitch while the sensor is in reset.
// Random part: random single-signal changes compared after each change with a
// reference of the cell's state (M, S', S and the two sensor flags) written
// from the cell's rules.
module tb_enhanced_scan_cell;
  timeunit 1ns;
  timeprecision 1ps;

  logic clock, sel, sys_in, scan_in;
  logic scan_out, sys_out;
  int checks = 0, failures = 0;
  logic ref_m, ref_sp, ref_s;
  bit ref_one, ref_zero;

  enhanced_scan_cell dut (
    .clock(clock), .sel(sel), .sys_in(sys_in), .scan_in(scan_in),
    .scan_out(scan_out), .sys_out(sys_out)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  // One delay fault test on a single cell. kind: 0 stable, 1 glitch after
  // arming, 2 late transition, 3 glitch during sensor reset.
  task automatic delay_test(input logic v_init, input logic v_final, input int kind);
    logic y_old, y_new;
    y_old = ~v_init;  // the circuit under test is modelled as an inverter
    y_new = ~v_final;
    // Shift in the initial bit and apply it.
    sel = 1; scan_in = v_init;
    clock = 1; #1; clock = 0; #1;
    sel = 0; #0.5; sel = 1; #1;
    check_bit(sys_out, v_init, "initial bit applied");
    sys_in = y_old; #1;
    // Shift in the final bit; sys_out must hold.
    scan_in = v_final;
    clock = 1; #1;
    check_bit(sys_out, v_init, "sys_out holds while clock high");
    clock = 0; #1;
    check_bit(sys_out, v_init, "sys_out holds after shift");
    check_bit(scan_out, v_final, "final bit in scan slave");
    // Launch.
    sel = 0; #0.2;
    check_bit(sys_out, v_final, "final bit launched");
    if (kind == 2) #1; else begin sys_in = y_new; #1; end
    // Reset the sensor, with a glitch on sys_in for kind 3.
    sel = 1; #1;
    if (kind == 3) begin sys_in = ~sys_in; #1.5; sys_in = ~sys_in; end
    #1;
    // Arm the sensor.
    sel = 0; #1;
    if (kind == 1) begin sys_in = ~sys_in; #1.3; sys_in = ~sys_in; end
    if (kind == 2) sys_in = y_new;
    #2;
    // Capture the sensor on the rising clock edge.
    clock = 1; #0.5;
    check_bit(scan_out,
              !((kind == 1) || (kind == 2 && y_old != y_new)),
              "sensor result captured");
    sys_in = ~sys_in; #0.5; sys_in = ~sys_in;
    sel = 1; #1;
    check_bit(scan_out,
              !((kind == 1) || (kind == 2 && y_old != y_new)),
              "sensor result held for shift-out");
    clock = 0; #1;
    // Capture the settled sys_in: clock=1, sel=0, clock=0, then sel=1.
    clock = 1; #1; sel = 0; #1; clock = 0; #1; sel = 1; #1;
    check_bit(scan_out, y_new, "settled sys_in captured");
  endtask

  task automatic step(input logic c, input logic s, input logic si, input logic sci);
    clock = c; sel = s; sys_in = si; scan_in = sci;
    if (s) begin ref_one = 0; ref_zero = 0; end
    else if (si) ref_one = 1;
    else ref_zero = 1;
    if (c)        ref_m  = s ? sci : si;
    if (!c)       ref_sp = s ? ref_m : !(ref_one && ref_zero);
    if (!c && !s) ref_s  = ref_m;
    #1;
    check_bit(scan_out, ref_sp, "reference scan_out");
    check_bit(sys_out, ref_s, "reference sys_out");
  endtask

  initial begin
    clock = 1; sel = 1; sys_in = 0; scan_in = 0; #1;
    clock = 0; #1; sel = 0; #1; sel = 1; #1;

    for (int kind = 0; kind < 4; kind++)
      for (int v = 0; v < 4; v++)
        delay_test(v[1], v[0], kind);

    // Bring the reference in line: clock=0, sel=1, M known.
    sel = 1; scan_in = 0; clock = 1; #1; clock = 0; #1;
    ref_m = 0; ref_sp = 0; ref_s = sys_out; ref_one = 0; ref_zero = 0;
    for (int n = 0; n < 3000; n++) begin
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
