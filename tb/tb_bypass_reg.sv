// tb_bypass_reg: self-checking test of the one-bit bypass register.
//
// Checks that Capture-DR loads 0, that each shift delays TDI by exactly one
// rising TCK, and that the flop holds while clock_dr is low.
module tb_bypass_reg;

  logic tck = 1'b0;
  logic tdi = 1'b0;
  logic clock_dr = 1'b0, shift_dr = 1'b0;
  logic tdo_byp;

  int checks = 0;
  int failures = 0;

  bypass_reg dut (.tck(tck), .tdi(tdi), .clock_dr(clock_dr), .shift_dr(shift_dr), .tdo_byp(tdo_byp));

  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic prev;

  initial begin : main
    repeat (100) begin
      // Capture-DR with TDI high: must still load 0.
      clock_dr = 1'b1; shift_dr = 1'b0; tdi = 1'b1;
      @(posedge tck); #1;
      check(tdo_byp == 1'b0, "capture loads 0");
      prev = 1'b0;
      repeat ($urandom_range(1, 12)) begin
        shift_dr = 1'b1; tdi = 1'($urandom);
        check(tdo_byp == prev, "one-cycle delay");
        prev = tdi;
        @(posedge tck); #1;
      end
      check(tdo_byp == prev, "last shifted bit");
      clock_dr = 1'b0; shift_dr = 1'b0; tdi = ~prev;
      repeat (3) @(posedge tck);
      #1 check(tdo_byp == prev, "hold while not selected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
