// tb_tdo_driver: self-checking test of the TDO selection and retiming.
//
// Random register outputs, bypass, shift_dr and enable are applied just after
// each rising TCK. After the following falling edge TDO must equal the
// selected source (instruction register unless shift_dr; otherwise bypass
// flop if bypass, else boundary scan register) and must hold that value
// through the next rising edge even when the sources change. TDO must be
// released (tdo_oe low) whenever enable is low.
module tb_tdo_driver;

  logic tck = 1'b0;
  logic trstn = 1'b1;
  logic tdo_bs = 1'b0, tdo_byp = 1'b0, tdo_ir = 1'b0;
  logic bypass = 1'b0, shift_dr = 1'b0, enable = 1'b0;
  tri   tdo;
  logic tdo_oe;

  int checks = 0;
  int failures = 0;

  tdo_driver dut (
    .tck(tck), .trstn(trstn), .tdo_bs(tdo_bs), .tdo_byp(tdo_byp),
    .tdo_ir(tdo_ir), .bypass(bypass), .shift_dr(shift_dr), .enable(enable),
    .tdo(tdo), .tdo_oe(tdo_oe)
  );

  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: tdo=%b oe=%b", what, $time, tdo, tdo_oe);
    end
  endtask

  logic expected;
  int seen_ir = 0, seen_byp = 0, seen_bs = 0;

  initial begin : main
    #2 trstn = 1'b0;
    #1 trstn = 1'b1;
    @(posedge tck); #1;
    repeat (2000) begin
      {tdo_bs, tdo_byp, tdo_ir, bypass, shift_dr} = 5'($urandom);
      enable = ($urandom_range(0, 3) != 0);
      expected = !shift_dr ? tdo_ir : (bypass ? tdo_byp : tdo_bs);
      if (!shift_dr) seen_ir++; else if (bypass) seen_byp++; else seen_bs++;
      @(negedge tck); #1;
      check(tdo_oe == enable, "output enable");
      if (enable) check(tdo == expected, "selected bit on falling edge");
      // Sources change during the high phase; TDO must not follow.
      {tdo_bs, tdo_byp, tdo_ir} = ~{tdo_bs, tdo_byp, tdo_ir};
      @(posedge tck); #1;
      if (enable) check(tdo == expected, "held through rising edge");
    end
    check(seen_ir > 0 && seen_byp > 0 && seen_bs > 0, "all sources selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
