// tb_instability_sensor: self-checking test of the instability sensor.
//
// Directed part: stable input, a short negative glitch, a short positive
// glitch, pulses during reset (must be ignored) and reset clearing a detected
// instability. Random part: random reset and sense sequences with random
// pulse widths, compared against a reference that tracks which levels the
// testbench itself applied since reset fell.
module tb_instability_sensor;
  timeunit 1ns;
  timeprecision 1ps;

  logic reset, sense, inst_n;
  int checks = 0, failures = 0;
  bit ref_one, ref_zero;

  instability_sensor dut (.reset(reset), .sense(sense), .instability_sensed_n(inst_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp, input string what);
    checks++;
    if (inst_n !== exp) begin
      failures++;
      $display("FAIL %s: instability_sensed_n=%b expected %b at %0t", what, inst_n, exp, $time);
    end
  endtask

  // Reference: which levels were applied while reset was low.
  task automatic apply(input logic r, input logic s, input realtime dt);
    reset = r;
    sense = s;
    if (r) begin
      ref_one  = 0;
      ref_zero = 0;
    end else if (s) ref_one = 1;
    else            ref_zero = 1;
    #(dt);
  endtask

  initial begin
    // Stable high input: no instability.
    apply(1, 1, 2);
    check(1, "during reset");
    apply(0, 1, 10);
    check(1, "stable high");
    // Negative glitch of 1.3 ns.
    apply(0, 0, 1.3);
    apply(0, 1, 2);
    check(0, "negative glitch");
    // The result stays until reset.
    apply(0, 1, 5);
    check(0, "result held");
    apply(1, 1, 2);
    check(1, "cleared by reset");
    // Pulses during reset are ignored.
    apply(1, 0, 1);
    apply(1, 1, 1);
    apply(1, 0, 1);
    check(1, "pulses during reset");
    apply(0, 0, 10);
    check(1, "stable low after reset");
    // Positive glitch of 1.5 ns.
    apply(0, 1, 1.5);
    apply(0, 0, 2);
    check(0, "positive glitch");
    apply(1, 0, 2);
    check(1, "cleared again");

    // Random sequences.
    for (int n = 0; n < 400; n++) begin
      logic r, s;
      r = ($urandom_range(0, 5) == 0);
      s = 1'($urandom);
      apply(r, s, 0.1 * $urandom_range(1, 30));
      check(!(ref_one && ref_zero), "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
