// tb_phase_detect: self-checking testbench for the input phase completion
// detector and gate-phase state of the PL gate.
//
// Each round delivers one token, in the current gate phase, on each of the
// four LEDR inputs and on the feedback input, in random order.  Between
// arrivals the gate phase must not move; after the last one it must toggle.
// Changing both rails of an input (a value change without a phase change)
// must never cause a firing.  The feedback outputs must track the gate
// phase, and reset must return the gate to even.
module tb_phase_detect;
  import pl_pkg::*;

  ledr_t a, b, c, d;
  logic  fi, r;
  logic  gate_phase, fo, fo_b;

  int checks = 0;
  int failures = 0;

  phase_detect dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int value_only_changes = 0;

  initial begin
    logic ph;
    int   order [5];
    int   tmp, j;

    // Reset with the inputs odd: the gate must stay even and not fire.
    a = ledr_encode(1'b0, PH_ODD); b = a; c = a; d = a; fi = PH_ODD;
    r = 1'b1;
    #5;
    check(gate_phase == PH_EVEN, "gate phase not even in reset");
    r = 1'b0;
    #5;
    check(gate_phase == PH_EVEN, "fired on odd inputs after reset");
    check(fo == 1'b1 && fo_b == 1'b0, "feedback outputs wrong after reset");
    ph = PH_EVEN;

    for (int n = 0; n < 100; n++) begin
      for (int i = 0; i < 5; i++) order[i] = i;
      for (int i = 4; i > 0; i--) begin
        j = $urandom_range(i, 0);
        tmp = order[i]; order[i] = order[j]; order[j] = tmp;
      end
      for (int k = 0; k < 5; k++) begin
        // A value change that keeps the phase flips both rails.
        if ($urandom_range(3, 0) == 0) begin
          a.v ^= 1'b1; a.t ^= 1'b1;
          value_only_changes++;
          #1;
        end
        check(gate_phase == ph, "fired before the input set was complete");
        case (order[k])
          0: a = ledr_encode(1'($urandom), ph);
          1: b = ledr_encode(1'($urandom), ph);
          2: c = ledr_encode(1'($urandom), ph);
          3: d = ledr_encode(1'($urandom), ph);
          default: fi = ph;
        endcase
        #($urandom_range(4, 1));
      end
      ph = ~ph;
      check(gate_phase == ph, "gate phase did not toggle on a complete set");
      check(fo == ~ph && fo_b == ph, "feedback outputs do not follow the gate phase");
    end
    check(value_only_changes > 0, "no value-only change applied");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
