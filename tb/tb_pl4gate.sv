// tb_pl4gate: self-checking testbench for the four-input phased logic gate.
//
// The gate has no clock, so the testbench drives LEDR tokens with delays
// between them and checks the gate against a reference model kept here:
// the gate phase toggles only once every input (and the feedback input)
// carries the gate phase, the output token then holds init[{d,c,b,a}] in the
// phase opposite to the new gate phase, the feedback outputs follow the gate
// phase, and the inverted-timing output carries the gate phase.  It also
// checks reset values, that a late feedback input holds the gate back, and
// the difference between the protected ("A") and unprotected ("B") LUT:
// with protect = 1 the LUT output may not move while tokens are arriving.
module tb_pl4gate;
  import pl_pkg::*;

  ledr_t       a, b, c, d;
  logic        fi, r;
  logic [15:0] init;
  logic        protect, v_rbit, t_rbit;
  ledr_t       y, y_inv;
  logic        fo, fo_b, gate_phase, enable;

  int checks = 0;
  int failures = 0;

  pl4gate dut (
    .a(a), .b(b), .c(c), .d(d), .fi(fi), .r(r), .init(init),
    .protect(protect), .v_rbit(v_rbit), .t_rbit(t_rbit),
    .y(y), .y_inv(y_inv), .fo(fo), .fo_b(fo_b),
    .gate_phase(gate_phase), .enable(enable)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Count changes of the LUT output: "LUT firings".
  int lut_firings = 0;
  logic new_v_prev = 1'b0;
  always @(dut.new_v) begin
    if (!r && dut.new_v != new_v_prev) lut_firings++;
    new_v_prev = dut.new_v;
  end

  // Watchdog.
  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic ph_ref;      // reference gate phase
  logic out_ref;     // reference output value

  // Deliver one complete set of tokens in random order with random gaps.
  // Returns the number of LUT output changes seen before the last arrival.
  task automatic send_round(input logic [3:0] vals, input bit hold_fi,
                            input bit is_protected);
    int order [5];
    int tmp, j;
    logic [3:0] idx;
    logic       fire_seen;
    for (int i = 0; i < 5; i++) order[i] = i;
    for (int i = 4; i > 0; i--) begin
      j = $urandom_range(i, 0);
      tmp = order[i]; order[i] = order[j]; order[j] = tmp;
    end
    if (hold_fi) begin
      // put the feedback last
      for (int i = 0; i < 5; i++) if (order[i] == 4) begin
        order[i] = order[4]; order[4] = 4;
      end
    end
    idx = {d.v, c.v, b.v, a.v};
    for (int k = 0; k < 5; k++) begin
      #($urandom_range(50, 10));
      // Nothing may fire before the set is complete.
      check(gate_phase == ph_ref, "gate fired before all inputs arrived");
      check(y == ledr_encode(out_ref, ~ph_ref), "output moved before firing");
      if (is_protected)
        check(dut.new_v == init[idx], "protected LUT switched early");
      case (order[k])
        0: a = ledr_encode(vals[0], ph_ref);
        1: b = ledr_encode(vals[1], ph_ref);
        2: c = ledr_encode(vals[2], ph_ref);
        3: d = ledr_encode(vals[3], ph_ref);
        default: fi = ph_ref;
      endcase
      #1;
      if (!is_protected)
        check(dut.new_v == init[{d.v, c.v, b.v, a.v}], "unprotected LUT does not follow inputs");
    end
    #10;
    out_ref = init[vals];
    ph_ref  = ~ph_ref;
    check(gate_phase == ph_ref, "gate phase did not toggle");
    check(y == ledr_encode(out_ref, ~ph_ref), "wrong output token");
    check(ledr_phase(y_inv) == ph_ref && y_inv.v == out_ref, "wrong inverted-phase output");
    check(fo == ~ph_ref && fo_b == ph_ref, "wrong feedback outputs");
    check(enable == 1'b0, "enable left high");
  endtask

  initial begin
    logic [3:0] vals;
    int lut_before, lut_a, lut_b;
    int fires_a = 0, fires_b = 0;

    // Reset with the output value 1.
    init    = 16'h6996;       // 4-input XOR
    protect = 1'b0;
    v_rbit  = 1'b1;
    t_rbit  = 1'b0;
    a = '0; b = '0; c = '0; d = '0; fi = 1'b0;
    r = 1'b1;
    #50;
    check(gate_phase == PH_EVEN, "gate phase not even in reset");
    check(y.v == 1'b1 && y.t == 1'b0, "reset output not (v_rbit,t_rbit)");
    check(ledr_phase(y) == PH_ODD, "reset output not odd");
    check(enable == 1'b0, "enable high in reset");
    r = 1'b0;
    #50;

    // Inputs in reset are all even: the gate sees a complete set and fires.
    ph_ref  = PH_ODD;
    out_ref = init[4'b0000];
    check(gate_phase == ph_ref, "gate did not fire on even reset inputs");
    check(y == ledr_encode(out_ref, PH_EVEN), "first output token wrong");

    // Unprotected ("B") configuration, random values and orders.
    for (int n = 0; n < 40; n++) begin
      vals = 4'($urandom);
      if (n % 8 == 0) init = 16'($urandom);
      #20;
      send_round(vals, n % 5 == 0, 1'b0);
      fires_b++;
    end
    lut_b = lut_firings;

    // Protected ("A") configuration.
    protect = 1'b1;
    lut_before = lut_firings;
    for (int n = 0; n < 40; n++) begin
      vals = 4'($urandom);
      if (n % 8 == 0) begin
        // change the function only while the gate is idle
        init = 16'($urandom);
        #10;
      end
      #20;
      send_round(vals, n % 3 == 0, 1'b1);
      fires_a++;
    end
    lut_a = lut_firings - lut_before;
    $display("LUT firings: B=%0d over %0d rounds, A=%0d over %0d rounds",
             lut_b, fires_b, lut_a, fires_a);
    check(lut_a <= fires_a + 5, "protected LUT switched more than once per firing");

    // Reset again with output value 0.
    r = 1'b1; v_rbit = 1'b0; t_rbit = 1'b1;
    a = '0; b = '0; c = '0; d = '0; fi = 1'b1;
    #30;
    check(y.v == 1'b0 && y.t == 1'b1 && gate_phase == PH_EVEN, "second reset");
    r = 1'b0;
    #30;
    check(gate_phase == PH_EVEN, "fired while feedback input odd");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
