// tb_pl_output: self-checking testbench for the output latching and phase
// encoding stage.
//
// The gate phase is toggled by the testbench, standing in for the phase
// detector.  After each toggle the stage must latch v = new_v and a timing
// rail that puts the output pair in the phase opposite to the gate phase,
// then drop its enable.  While the gate phase is steady, changes of new_v
// must not reach the output.  Reset must load (v_rbit, t_rbit) and keep the
// enable low; t_b must always be the complement of t.
module tb_pl_output;
  import pl_pkg::*;

  logic new_v, gate_phase, r, v_rbit, t_rbit;
  logic v, t, t_b, enable;

  int checks = 0;
  int failures = 0;

  pl_output dut (.*);

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

  initial begin
    logic v_ref;

    for (int rv = 0; rv < 2; rv++) begin
      v_rbit = 1'(rv);
      t_rbit = ~v_rbit;
      gate_phase = PH_EVEN;
      new_v = ~v_rbit;
      r = 1'b1;
      #2;
      check(v == v_rbit && t == t_rbit, "reset values not loaded");
      check(enable == 1'b0, "enable high in reset");
      check((v ^ t) == PH_ODD, "reset output not odd");
      r = 1'b0;
      #2;
      check(v == v_rbit && t == t_rbit, "output changed at reset release");
      v_ref = v_rbit;

      for (int n = 0; n < 200; n++) begin
        // new_v wanders while the gate waits for its inputs.
        for (int k = 0; k < 3; k++) begin
          new_v = 1'($urandom);
          #1;
          check(v == v_ref, "output followed new_v without a firing");
          check(enable == 1'b0, "enable high between firings");
        end
        gate_phase = ~gate_phase;
        #1;
        v_ref = new_v;
        check(v == v_ref, "value not latched on firing");
        check((v ^ t) == ~gate_phase, "output phase not opposite to gate phase");
        check(t_b == ~t, "t_b not the complement of t");
        check(enable == 1'b0, "enable did not fall after latching");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
