// tb_boundary_scan_reg: self-checking test of the 8-cell boundary scan
// register (4 input cells, 4 output cells).
//
// Each round: random pin and core values are captured, the 8 captured bits
// are read from tdo_bs one per shift (bit 0 first) while a random new value
// is shifted in, and after the update the parallel outputs are compared with
// the expected multiplexing: tologic = mode_in ? new[7:4] : a and
// y = mode_out ? new[3:0] : fromlogic, for random modes. The outputs must
// not change before the update, and the update stage must clear on reset.
module tb_boundary_scan_reg;

  localparam int N_IN = 4;
  localparam int N_OUT = 4;
  localparam int N = N_IN + N_OUT;

  logic tck = 1'b0;
  logic resetn = 1'b1;
  logic tdi = 1'b0;
  logic clock_dr = 1'b0, shift_dr = 1'b0, update_dr = 1'b0;
  logic mode_in = 1'b0, mode_out = 1'b0;
  logic [N_IN-1:0] a = '0;
  logic [N_OUT-1:0] fromlogic = '0;
  logic [N_IN-1:0] tologic;
  logic [N_OUT-1:0] y;
  logic tdo_bs;

  int checks = 0;
  int failures = 0;

  boundary_scan_reg dut (
    .tck(tck), .resetn(resetn), .tdi(tdi), .clock_dr(clock_dr),
    .shift_dr(shift_dr), .update_dr(update_dr), .mode_in(mode_in),
    .mode_out(mode_out), .a(a), .fromlogic(fromlogic), .tologic(tologic),
    .y(y), .tdo_bs(tdo_bs)
  );

  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: tologic=%b y=%b tdo_bs=%b", what, $time, tologic, y, tdo_bs);
    end
  endtask

  task automatic cycle(input logic c, input logic s, input logic u, input logic d);
    clock_dr = c; shift_dr = s; update_dr = u; tdi = d;
    @(posedge tck); #1;
    clock_dr = 1'b0; shift_dr = 1'b0; update_dr = 1'b0;
  endtask

  logic [N-1:0] captured, newval, applied;

  initial begin : main
    #2 resetn = 1'b0;
    #2 resetn = 1'b1;
    mode_in = 1'b1; mode_out = 1'b1;
    #1 check(tologic == '0 && y == '0, "update stage cleared by reset");
    applied = '0;
    repeat (300) begin
      a = N_IN'($urandom); fromlogic = N_OUT'($urandom);
      captured = {a, fromlogic};
      newval = N'($urandom);
      cycle(1, 0, 0, 0);                                  // Capture-DR
      for (int i = 0; i < N; i++) begin
        check(tdo_bs == captured[i], "captured bit at tdo_bs");
        cycle(1, 1, 0, newval[i]);                        // Shift-DR
      end
      // Before the update the test outputs still hold the previous value.
      mode_in = 1'b1; mode_out = 1'b1;
      #1 check({tologic, y} == applied, "outputs hold until update");
      cycle(0, 0, 0, 0);                                  // Exit1-DR
      cycle(0, 0, 1, 0);                                  // Update-DR
      applied = newval;
      mode_in = 1'($urandom); mode_out = 1'($urandom);
      a = N_IN'($urandom); fromlogic = N_OUT'($urandom);
      #1;
      check(tologic == (mode_in ? newval[N-1:N_OUT] : a), "tologic mux");
      check(y == (mode_out ? newval[N_OUT-1:0] : fromlogic), "y mux");
      cycle(0, 0, 0, 0);
    end
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
