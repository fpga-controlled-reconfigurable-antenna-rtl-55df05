// tb_inst_reg: self-checking test of the instruction register.
//
// The TAP strobes are driven directly, one TCK cycle at a time (changed just
// after the rising edge, so clock/shift act on the next rising edge and
// update on the falling edge in between). Checked: reset to BYPASS, the
// capture pattern appearing at tdo_ir, shifting an instruction in with bit 0
// first, the instruction changing only on update, and the decode of all four
// codes into bypass / mode_in / mode_out against a table written here.
module tb_inst_reg;
  import jtag_pkg::*;

  logic tck = 1'b0;
  logic tdi = 1'b0;
  logic resetn = 1'b1;
  logic clock_ir = 1'b0, shift_ir = 1'b0, update_ir = 1'b0;
  logic tdo_ir, mode_in, mode_out, bypass;
  logic [1:0] instr;

  int checks = 0;
  int failures = 0;

  inst_reg dut (
    .tck(tck), .tdi(tdi), .resetn(resetn), .clock_ir(clock_ir),
    .shift_ir(shift_ir), .update_ir(update_ir), .tdo_ir(tdo_ir),
    .instr(instr), .mode_in(mode_in), .mode_out(mode_out), .bypass(bypass)
  );

  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: instr=%b tdo_ir=%b", what, $time, instr, tdo_ir);
    end
  endtask

  // One TCK cycle with the given strobes.
  task automatic cycle(input logic c, input logic s, input logic u, input logic d);
    clock_ir = c; shift_ir = s; update_ir = u; tdi = d;
    @(posedge tck); #1;
    clock_ir = 1'b0; shift_ir = 1'b0; update_ir = 1'b0;
  endtask

  // Expected decode: {bypass, mode_in, mode_out}
  function automatic logic [2:0] decode(input logic [1:0] code);
    case (code)
      2'b11:   return 3'b100;
      2'b10:   return 3'b011;
      2'b00:   return 3'b001;
      default: return 3'b000;
    endcase
  endfunction

  logic [1:0] cur, code;

  initial begin : main
    #2 resetn = 1'b0;
    @(posedge tck); #1;
    check(instr == 2'b11 && bypass && !mode_in && !mode_out, "reset to bypass");
    resetn = 1'b1;
    cur = 2'b11;
    repeat (200) begin
      code = 2'($urandom);
      cycle(1, 0, 0, 0);                       // Capture-IR
      check(tdo_ir == 1'b0, "capture bit 0 is 0");
      cycle(1, 1, 0, code[0]);                 // Shift-IR, first bit
      check(tdo_ir == 1'b1, "capture bit 1 is 1");
      cycle(1, 1, 0, code[1]);                 // Shift-IR, last bit
      check(tdo_ir == code[0], "shifted bit 0 at tdo_ir");
      check(instr == cur, "instruction unchanged before update");
      cycle(0, 0, 0, 0);                       // Exit1-IR
      check(instr == cur, "instruction unchanged in exit");
      cycle(0, 0, 1, 0);                       // Update-IR
      cur = code;
      check(instr == code, "instruction updated");
      check({bypass, mode_in, mode_out} == decode(code), "decode");
      cycle(0, 0, 0, 0);
    end
    resetn = 1'b0;
    #1 check(instr == 2'b11 && bypass, "asynchronous reset to bypass");
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
