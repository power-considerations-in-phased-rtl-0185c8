// tb_lut4: self-checking testbench for the compute element.
//
// With protect = 0 the output must always equal init[{d,c,b,a}] for the
// current inputs.  With protect = 1 it must hold the value for the inputs
// present when en (or r) was last high, and follow the inputs while en is
// high.  init and the inputs are random; the reference is computed here.
module tb_lut4;

  logic [15:0] init;
  logic        a, b, c, d;
  logic        protect, en, r;
  logic        new_v;

  int checks = 0;
  int failures = 0;

  lut4 dut (.*);

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
    logic [3:0] held;
    int holds = 0;

    init = 16'($urandom);
    {d, c, b, a} = 4'($urandom);
    protect = 1'b0;
    en = 1'b0;
    r = 1'b1;
    #2;
    check(new_v == init[{d, c, b, a}], "reset does not open the LUT inputs");
    r = 1'b0;

    // Unprotected: combinational.
    for (int n = 0; n < 200; n++) begin
      {d, c, b, a} = 4'($urandom);
      if (n % 16 == 0) init = 16'($urandom);
      en = 1'($urandom);
      #1;
      check(new_v == init[{d, c, b, a}], "unprotected LUT output wrong");
    end

    // Protected: inputs pass only while en is high.
    protect = 1'b1;
    en = 1'b1;
    {d, c, b, a} = 4'($urandom);
    #1;
    held = {d, c, b, a};
    en = 1'b0;
    for (int n = 0; n < 300; n++) begin
      if ($urandom_range(4, 0) == 0) begin
        en = 1'b1;
        {d, c, b, a} = 4'($urandom);
        #1;
        held = {d, c, b, a};
        check(new_v == init[held], "protected LUT does not follow while enabled");
        en = 1'b0;
        #1;
      end else begin
        {d, c, b, a} = 4'($urandom);
        #1;
        if ({d, c, b, a} != held) holds++;
        check(new_v == init[held], "protected LUT followed its inputs while disabled");
      end
    end
    check(holds > 0, "no input change was held off");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
