// tb_pl_counter2: end-to-end testbench for the phased logic 2-bit counter.
//
// The testbench plays the part of the wiring between the four gates: every
// net is a transport delay whose length is drawn at random for each token,
// within a range that changes from run to run.  Against a reference model
// of the clocked counter it checks, after every firing of each gate, the
// value that gate produced (G1 -> q0, G3 -> q1, G2 -> ~q0, G4 -> q0 ^ q1 of
// the previous count), and that no gate ever gets more than one firing ahead
// of a neighbour.  It counts, and requires at least once each:
//   - reset to the count 0 with all gates even
//   - G1 held back by the feedback net from G4 after its data input arrived
//   - a stall: one net held, the whole netlist stops, then resumes correctly
//   - both LUT configurations, with fewer LUT output changes in G4 (the only
//     gate with two data inputs, hence transient LUT changes) under "A"
//   - several delay ranges giving the same count sequence.
// It also prints LUT and control firings per count and the switched
// capacitance they imply, at 1.05 pF per LUT4 output change and 0.20 pF per
// gate phase change (0.25 um estimates for an FPGA LUT4 and for the gate's
// control logic).
module tb_pl_counter2;
  import pl_pkg::*;

  logic  r, protect;
  ledr_t n1_o, n2_o, n3_o, n4_o;
  logic  fb_o;
  ledr_t g1_a_i, g2_a_i, g3_a_i, g4_a_i, g4_b_i;
  logic  g1_fi_i;
  logic  q0, q1;
  logic [3:0] gate_phase, enable;

  pl_counter2 dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- wiring
  int  dmin = 1, dmax = 5;
  bit  hold_n4 = 1'b0;
  bit  slow_fb = 1'b0;

  function automatic int dly();
    return $urandom_range(dmax, dmin);
  endfunction

  always @(n1_o) begin automatic int d1 = dly(); automatic int d2 = dly();
    g2_a_i <= #(d1) n1_o;
    g4_a_i <= #(d2) n1_o;
  end
  always @(n2_o) begin automatic int d = dly(); g1_a_i <= #(d) n2_o; end
  always @(n3_o) begin automatic int d = dly(); g4_b_i <= #(d) n3_o; end
  always @(n4_o or hold_n4) begin
    automatic int d = dly();
    if (!hold_n4) g3_a_i <= #(d) n4_o;
  end
  always @(fb_o) begin
    automatic int d = slow_fb ? dly() + 3 * dmax : dly();
    g1_fi_i <= #(d) fb_o;
  end

  // ------------------------------------------------------- firing monitors
  int fires [4];
  int lut_changes [4];
  int fb_waits = 0;
  logic [3:0] ph_prev;
  logic [3:0] lut_prev;
  bit  run_checks = 1'b0;

  // Expected value produced by the k-th firing (k >= 1) of each gate.
  function automatic logic expected(int g, int k);
    case (g)
      0: return logic'(k & 1);                         // q0 after k counts
      1: return ~logic'((k - 1) & 1);                  // ~q0 of count k-1
      2: return logic'((k >> 1) & 1);                  // q1 after k counts
      default: return logic'(((k - 1) & 1) ^ (((k - 1) >> 1) & 1));
    endcase
  endfunction

  function automatic logic value_of(int g);
    case (g)
      0: return n1_o.v;
      1: return n2_o.v;
      2: return n3_o.v;
      default: return n4_o.v;
    endcase
  endfunction

  for (genvar g = 0; g < 4; g++) begin : g_mon
    always @(gate_phase[g]) begin
      if (!r && gate_phase[g] != ph_prev[g]) begin
        fires[g]++;
        if (run_checks) begin
          automatic int k = fires[g];
          #1;
          check(value_of(g) == expected(g, k),
                $sformatf("gate G%0d firing %0d produced %0b", g + 1, k, value_of(g)));
        end
      end
      ph_prev[g] = gate_phase[g];
    end
  end

  always @(dut.g1.new_v) if (!r && dut.g1.new_v != lut_prev[0]) begin lut_changes[0]++; lut_prev[0] = dut.g1.new_v; end
  always @(dut.g2.new_v) if (!r && dut.g2.new_v != lut_prev[1]) begin lut_changes[1]++; lut_prev[1] = dut.g2.new_v; end
  always @(dut.g3.new_v) if (!r && dut.g3.new_v != lut_prev[2]) begin lut_changes[2]++; lut_prev[2] = dut.g3.new_v; end
  always @(dut.g4.new_v) if (!r && dut.g4.new_v != lut_prev[3]) begin lut_changes[3]++; lut_prev[3] = dut.g4.new_v; end

  // G1 has its data token but still waits for the feedback from G4.
  always @(g1_a_i or g1_fi_i) begin
    if (!r && ledr_phase(g1_a_i) == gate_phase[0] && g1_fi_i != gate_phase[0])
      fb_waits++;
  end

  // No gate may run more than one firing ahead of a neighbour.
  always @(gate_phase) begin
    if (!r && run_checks) begin
      check(fires[0] - fires[1] <= 1 && fires[1] - fires[0] <= 1, "G1/G2 out of step");
      check(fires[0] - fires[3] <= 1 && fires[3] - fires[0] <= 1, "G1/G4 out of step");
      check(fires[2] - fires[3] <= 1 && fires[3] - fires[2] <= 1, "G3/G4 out of step");
    end
  end

  // Watchdog.
  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- runs
  int resets_seen = 0, stalls_seen = 0, runs_a = 0, runs_b = 0, delay_sets = 0;
  int lut4_a = 0, lut4_b = 0, fire4_a = 0, fire4_b = 0;

  task automatic do_reset();
    run_checks = 1'b0;
    r = 1'b1;
    #(4 * dmax + 20);
    // The nets settle to their reset tokens through the wiring delays.
    check(q0 == 1'b0 && q1 == 1'b0, "counter not 0 in reset");
    check(gate_phase == 4'b0000, "gate phases not even in reset");
    check(ledr_phase(n1_o) == PH_EVEN && ledr_phase(n3_o) == PH_EVEN,
          "inverted-phase nets do not carry a token after reset");
    check(ledr_phase(n2_o) == PH_ODD && ledr_phase(n4_o) == PH_ODD && fb_o == PH_ODD,
          "plain nets not odd after reset");
    resets_seen++;
    for (int g = 0; g < 4; g++) begin
      fires[g] = 0;
      lut_changes[g] = 0;
    end
    ph_prev  = gate_phase;
    lut_prev = {dut.g4.new_v, dut.g3.new_v, dut.g2.new_v, dut.g1.new_v};
    run_checks = 1'b1;
    r = 1'b0;
  endtask

  // Let the counter run until G3 has fired `n` times.
  task automatic run_counts(int n);
    int guard = 0;
    while (fires[2] < n && guard < n * 100) begin
      #(dmax);
      guard++;
    end
    check(fires[2] >= n, "counter stopped");
  endtask

  initial begin
    r = 1'b1;
    protect = 1'b0;
    hold_n4 = 1'b0;
    g1_a_i = '0; g2_a_i = '0; g3_a_i = '0; g4_a_i = '0; g4_b_i = '0; g1_fi_i = 1'b0;

    for (int run = 0; run < 6; run++) begin
      protect = run[0];
      case (run / 2)
        0: begin dmin = 1; dmax = 3;  end
        1: begin dmin = 2; dmax = 40; end
        default: begin dmin = 5; dmax = 12; end
      endcase
      slow_fb = (run >= 2);
      delay_sets++;
      do_reset();
      run_counts(40);
      #(6 * dmax);
      if (protect) begin
        runs_a++; lut4_a += lut_changes[3]; fire4_a += fires[3];
        check(lut_changes[3] <= fires[3], "protected G4 LUT changed more often than G4 fired");
      end else begin
        runs_b++; lut4_b += lut_changes[3]; fire4_b += fires[3];
      end
      begin
        automatic int luts = 0, ctrl = 0;
        for (int g = 0; g < 4; g++) begin
          luts += lut_changes[g];
          ctrl += fires[g];
        end
        $display("run %0d: per count %0.2f LUT changes, %0.2f phase changes, %0.2f pF switched",
                 run, real'(luts) / fires[2], real'(ctrl) / fires[2],
                 (1.05 * luts + 0.20 * ctrl) / fires[2]);
      end
      $display("run %0d protect=%0b delays %0d..%0d: control firings %0d %0d %0d %0d, LUT changes %0d %0d %0d %0d",
               run, protect, dmin, dmax, fires[0], fires[1], fires[2], fires[3],
               lut_changes[0], lut_changes[1], lut_changes[2], lut_changes[3]);

      // Stall: hold net n4 (G4 -> G3); everything must stop, then resume.
      if (run == 3) begin
        int f_before [4];
        hold_n4 = 1'b1;
        #(20 * dmax);
        f_before = fires;
        #(20 * dmax);
        check(f_before == fires, "netlist kept firing with a net held");
        hold_n4 = 1'b0;
        g3_a_i <= #(dmin) n4_o;
        run_counts(fires[2] + 8);
        stalls_seen++;
      end
    end

    $display("mechanisms: resets=%0d fb_waits=%0d stalls=%0d runs_A=%0d runs_B=%0d delay_sets=%0d",
             resets_seen, fb_waits, stalls_seen, runs_a, runs_b, delay_sets);
    $display("G4 LUT changes per firing: A=%0d/%0d B=%0d/%0d", lut4_a, fire4_a, lut4_b, fire4_b);
    check(resets_seen > 0, "reset never exercised");
    check(fb_waits > 0, "feedback net never held G1 back");
    check(stalls_seen > 0, "stall never exercised");
    check(runs_a > 0 && runs_b > 0, "a LUT configuration never ran");
    check(lut4_a < lut4_b, "protected LUT did not filter transient changes");
    check(delay_sets > 1, "only one delay range used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
