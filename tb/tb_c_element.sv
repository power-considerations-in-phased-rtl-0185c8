// tb_c_element: self-checking testbench for the Muller C-element, used here
// at its default width of four inputs, as a feedback concentrator (Cgate4).
//
// Random input changes are applied one at a time; a reference model sets
// its state when all inputs are 1, clears it when all are 0 and otherwise
// holds.  A second phase models four feedback nets that each toggle once per
// cycle in random order: the output must toggle exactly once per cycle,
// after the last of the four.  Reset forces the state to its reset value.
module tb_c_element;

  localparam int unsigned N = 4;   // the module's default width

  logic [N-1:0] in;
  logic         r;
  logic         z;

  int checks = 0;
  int failures = 0;

  c_element dut (.in(in), .r(r), .z(z));

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
    logic z_ref;
    int   order [N];
    int   tmp, j;

    in = '1;
    r  = 1'b1;
    #5;
    check(z == 1'b0, "reset value not 0");
    r = 1'b0;
    #5;
    z_ref = 1'b1;
    check(z == z_ref, "did not set on all ones after reset");

    // Random single-bit changes.
    for (int n = 0; n < 400; n++) begin
      in[$urandom_range(N - 1, 0)] ^= 1'b1;
      #2;
      if (&in)  z_ref = 1'b1;
      if (~|in) z_ref = 1'b0;
      check(z == z_ref, $sformatf("state wrong for inputs %b", in));
    end

    // Feedback concentration: all nets toggle once per cycle.
    in = '0;
    #2;
    z_ref = 1'b0;
    check(z == z_ref, "did not clear on all zeros");
    for (int cyc = 0; cyc < 30; cyc++) begin
      for (int i = 0; i < N; i++) order[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        j = $urandom_range(i, 0);
        tmp = order[i]; order[i] = order[j]; order[j] = tmp;
      end
      for (int k = 0; k < N; k++) begin
        check(z == z_ref, "output toggled before all feedback nets arrived");
        in[order[k]] = ~z_ref;
        #($urandom_range(5, 1));
      end
      z_ref = ~z_ref;
      check(z == z_ref, "output did not toggle after the last feedback net");
    end

    // Reset while the inputs disagree.
    in = 4'b1010;
    r  = 1'b1;
    #2;
    check(z == 1'b0, "reset ignored");
    r = 1'b0;
    #2;
    check(z == 1'b0, "state changed after reset with mixed inputs");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
