// tb_scan_path: end-to-end delay fault tests on the full scan path at its
// default size.
//
// The testbench plays both the tester and the circuit under test. The
// circuit's steady-state function is y = x ^ rotr(x, 1) ^ 1010..10; after each
// launch every output bit follows one of four timing behaviours chosen at
// random per bit and round:
//   0 settles early (before the sensors are armed)       -> stable
//   1 settles late (after arming; unstable if it changes) -> delay fault
//   2 settles early, then glitches for 1.5 ns after arming -> unstable
//   3 settles early, glitches while the sensors are reset  -> stable
// Each round runs the whole test procedure: shift in the initial vector and
// apply it, shift in the final vector while the circuit keeps the initial one,
// launch with the falling edge of sel, reset and arm the sensors, capture the
// sensor results with the rising clock edge and shift them out, then capture
// the settled circuit outputs and shift those out. Every bit read from
// scan_out and every value on sys_out is compared with the expectation. The
// number of times each mechanism happened is counted, and a mechanism that
// never happened is a failure.
module tb_scan_path;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 8;       // the scan path's default length
  localparam int ROUNDS = 40;

  logic         clock, sel, scan_in, scan_out;
  logic [N-1:0] sys_in, sys_out;

  int checks = 0, failures = 0;
  int n_shift = 0, n_hold = 0, n_launch = 0, n_early_glitch_ignored = 0;
  int n_glitch_caught = 0, n_late_caught = 0, n_stable = 0, n_capture = 0;

  scan_path dut (
    .clock(clock), .sel(sel), .scan_in(scan_in), .scan_out(scan_out),
    .sys_in(sys_in), .sys_out(sys_out)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] cut_f(input logic [N-1:0] x);
    return x ^ {x[0], x[N-1:1]} ^ {(N / 2){2'b10}};
  endfunction

  task automatic check_vec(input logic [N-1:0] got, input logic [N-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  // Shift vec in with sel=1, cell N-1's bit first; sys_out must stay at held.
  task automatic shift_in(input logic [N-1:0] vec, input logic [N-1:0] held);
    sel = 1;
    for (int k = N - 1; k >= 0; k--) begin
      scan_in = vec[k];
      clock = 1; #1;
      check_vec(sys_out, held, "sys_out held while clock high");
      clock = 0; #1;
      check_vec(sys_out, held, "sys_out held after shift");
      n_shift++;
      n_hold += 2;
    end
  endtask

  // Read N bits: the first is already on scan_out (clock=1 on entry), the rest
  // come one per clock pulse, valid after the falling edge. Ends with clock=1.
  task automatic shift_out_after_rise(output logic [N-1:0] vec);
    vec[N-1] = scan_out;
    for (int k = N - 2; k >= 0; k--) begin
      clock = 0; #1;
      vec[k] = scan_out;
      clock = 1; #1;
    end
  endtask

  // Read N bits when the first was loaded by a falling edge (clock=0 on entry).
  task automatic shift_out_after_fall(output logic [N-1:0] vec);
    vec[N-1] = scan_out;
    for (int k = N - 2; k >= 0; k--) begin
      clock = 1; #1;
      clock = 0; #1;
      vec[k] = scan_out;
    end
  endtask

  // Value of circuit output bit i at tick t (0.5 ns) after the launch.
  function automatic logic cut_bit(input int kind, input logic y_old, input logic y_new, input int t);
    case (kind)
      0: return (t < 2) ? y_old : y_new;
      1: return (t < 18) ? y_old : y_new;
      2: return (t < 2) ? y_old : ((t >= 16 && t < 19) ? ~y_new : y_new);
      default: return (t < 2) ? y_old : ((t >= 6 && t < 9) ? ~y_new : y_new);
    endcase
  endfunction

  initial begin
    logic [N-1:0] x0, x1, y0, y1, held, exp_sense, got;
    int kind [N];

    // Bring every latch to a known value: capture 0s, apply them.
    clock = 0; sel = 1; scan_in = 0; sys_in = '0; #1;
    clock = 1; #1; sel = 0; #1; clock = 0; #1; sel = 1; #1;
    held = '0;
    check_vec(sys_out, held, "initialised");

    for (int r = 0; r < ROUNDS; r++) begin
      x0 = N'($urandom);
      x1 = N'($urandom);
      y0 = cut_f(x0);
      y1 = cut_f(x1);
      for (int i = 0; i < N; i++) kind[i] = $urandom_range(0, 3);

      // Initial vector: shift in, apply with a short sel=0 pulse.
      shift_in(x0, held);
      sel = 0; #0.5;
      check_vec(sys_out, x0, "initial vector applied");
      sel = 1; #0.5;
      held = x0;
      sys_in = y0; #1;

      // Final vector: shift in while the circuit keeps the initial vector.
      shift_in(x1, held);

      // Launch at tick 0, sensor reset ticks 4..11, armed from tick 12,
      // sensor results captured by the rising clock edge at tick 24.
      exp_sense = '1;
      for (int i = 0; i < N; i++)
        if (kind[i] == 2 || (kind[i] == 1 && y0[i] != y1[i])) exp_sense[i] = 1'b0;
      for (int t = 0; t < 24; t++) begin
        if (t == 0)  sel = 0;
        if (t == 4)  sel = 1;
        if (t == 12) sel = 0;
        for (int i = 0; i < N; i++) sys_in[i] = cut_bit(kind[i], y0[i], y1[i], t);
        #0.5;
        if (t == 1) begin
          check_vec(sys_out, x1, "final vector launched");
          n_launch++;
        end
      end
      check_vec(sys_out, x1, "final vector held during observation");
      clock = 1; #0.5;
      sel = 1; #0.5;
      shift_out_after_rise(got);
      check_vec(got, exp_sense, "instability results");
      for (int i = 0; i < N; i++) begin
        if (got[i] == 1'b0 && kind[i] == 2) n_glitch_caught++;
        if (got[i] == 1'b0 && kind[i] == 1) n_late_caught++;
        if (got[i] == 1'b1) n_stable++;
        if (got[i] == 1'b1 && kind[i] == 3) n_early_glitch_ignored++;
      end

      // Capture the settled outputs (clock is 1 here): sel=0, clock=0, sel=1.
      sel = 0; #1;
      clock = 0; #1;
      check_vec(sys_out, y1, "system mode loads captured outputs");
      sel = 1; #1;
      shift_out_after_fall(got);
      check_vec(got, y1, "settled circuit outputs");
      n_capture++;
      held = y1;
    end

    $display("mechanisms: shift=%0d hold=%0d launch=%0d glitch_caught=%0d late_caught=%0d stable=%0d early_glitch_ignored=%0d capture=%0d",
             n_shift, n_hold, n_launch, n_glitch_caught, n_late_caught, n_stable,
             n_early_glitch_ignored, n_capture);
    checks++; if (n_shift == 0)                failures++;
    checks++; if (n_hold == 0)                 failures++;
    checks++; if (n_launch == 0)               failures++;
    checks++; if (n_glitch_caught == 0)        failures++;
    checks++; if (n_late_caught == 0)          failures++;
    checks++; if (n_stable == 0)               failures++;
    checks++; if (n_early_glitch_ignored == 0) failures++;
    checks++; if (n_capture == 0)              failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
