// tb_jtag_chain: two controllers daisy-chained on one JTAG port.
//
// TDI feeds device 0, device 0's TDO feeds device 1, and device 1's TDO goes
// back to the host. The host loads BYPASS into device 0 and EXTEST into
// device 1 with a single 4-bit IR scan, then sets device 1's bias lines with
// a 9-bit DR scan (8 boundary-scan bits plus device 0's bypass bit). Checked:
// both IR capture patterns come back in chain order, device 1's lines take
// every configuration while device 0 keeps its pins on its core, and the
// bypass bit of device 0 adds exactly one bit to the DR chain.
module tb_jtag_chain;
  import jtag_pkg::*;

  logic tck = 1'b0;
  logic tms = 1'b1;
  logic tdi = 1'b0;
  logic trstn = 1'b1;
  logic [3:0] a0 = 4'b0011, a1 = 4'b1110;
  logic [3:0] from0, from1, to0, to1, y0, y1;
  tri   tdo0, tdo1;
  logic oe0, oe1;

  int checks = 0;
  int failures = 0;

  jtag_top dev0 (.tck(tck), .tms(tms), .tdi(tdi), .trstn(trstn), .a(a0),
                 .fromlogic(from0), .tologic(to0), .y(y0), .tdo(tdo0), .tdo_oe(oe0));
  jtag_top dev1 (.tck(tck), .tms(tms), .tdi(tdo0), .trstn(trstn), .a(a1),
                 .fromlogic(from1), .tologic(to1), .y(y1), .tdo(tdo1), .tdo_oe(oe1));

  // Pass-through cores, inverted in device 0 so its pins are recognisable.
  assign from0 = ~to0;
  assign from1 = to1;

  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: y0=%b y1=%b", what, $time, y0, y1);
    end
  endtask

  task automatic step(input logic tms_v, input logic tdi_v, output logic tdo_v);
    @(negedge tck);
    tms = tms_v;
    tdi = tdi_v;
    @(posedge tck);
    tdo_v = tdo1;
  endtask

  task automatic move(input logic tms_v);
    logic unused;
    step(tms_v, 1'b0, unused);
  endtask

  // Shift n bits from Run-Test/Idle through the IR (ir=1) or DR path.
  task automatic scan(input bit ir, input int n, input logic [31:0] din,
                      output logic [31:0] dout);
    logic t;
    dout = '0;
    move(1);
    if (ir) move(1);
    move(0); move(0);
    for (int i = 0; i < n; i++) begin
      step(i == n - 1, din[i], t);
      dout[i] = t;
    end
    move(1); move(0);
  endtask

  logic [31:0] rd;
  int n_bypassed = 0;

  initial begin : main
    #2 trstn = 1'b0;
    #20 trstn = 1'b1;
    move(0);
    // IR chain: device 1's bits are shifted first, device 0's last.
    scan(1'b1, 4, {28'd0, INSTR_BYPASS, INSTR_EXTEST}, rd);
    check(rd[3:0] == {IR_CAPTURE, IR_CAPTURE}, "both IR capture patterns in chain order");
    check(dev0.u_ir.instr == INSTR_BYPASS, "device 0 in BYPASS");
    check(dev1.u_ir.instr == INSTR_EXTEST, "device 1 in EXTEST");
    for (int v = 0; v < 16; v++) begin
      // 8 bits for device 1, then the bypass bit of device 0.
      scan(1'b0, 9, {23'd0, 1'b1, 4'b0000, 4'(v)}, rd);
      check(y1 == 4'(v), "device 1 bias lines");
      check(y0 == from0 && to0 == a0, "device 0 pins stay on its core");
      // First bit out is device 1's captured bit 0 (core output of device 1).
      if (v > 0) check(rd[3:0] == from1, "device 1 capture read through the chain");
      n_bypassed++;
    end
    check(n_bypassed > 0, "bypass used");
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
