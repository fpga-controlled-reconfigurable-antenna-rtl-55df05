// tb_jtag_top: end-to-end test of the JTAG antenna-bias controller at its
// default size (4 input pins, 4 output pins, 2-bit instruction register).
//
// The testbench plays the host: it drives TMS and TDI on the falling TCK,
// samples TDO on the rising TCK and walks the TAP through complete IR and DR
// scans. The device core is modelled as in the original bring-up, a circuit
// that sends its four inputs straight to its four outputs, here with an
// optional XOR mask so that core outputs differ from the test values.
// Sequence: TRSTN reset; reading the IR capture pattern; a BYPASS scan
// (one-bit delay, leading 0); SAMPLE/PRELOAD reading the pins and preloading
// the output cells; EXTEST writing the antenna configurations 0010, 0110,
// 1010, 1100, 1111 ("15") and 0101 ("5") to the bias lines y, with the
// lines checked to change on the falling TCK in Update-DR and not earlier;
// a DR scan interrupted by Pause-DR; an IR scan through Pause-IR; INTEST
// driving the core inputs; a TMS-only reset in the middle of a scan; and
// TDO high impedance outside the shift states. Every mechanism is counted
// and a mechanism that never happened counts as a failure.
module tb_jtag_top;
  import jtag_pkg::*;

  localparam int N_IN = 4;
  localparam int N_OUT = 4;
  localparam int N = N_IN + N_OUT;

  logic tck = 1'b0;
  logic tms = 1'b1;
  logic tdi = 1'b0;
  logic trstn = 1'b1;
  logic [N_IN-1:0] a = '0;
  logic [N_OUT-1:0] fromlogic;
  logic [N_IN-1:0] tologic;
  logic [N_OUT-1:0] y;
  tri   tdo;
  logic tdo_oe;
  logic [N_OUT-1:0] core_mask = '0;

  int checks = 0;
  int failures = 0;

  // Mechanism counters.
  int n_trst_reset = 0, n_tms_reset = 0, n_ir_capture = 0, n_bypass_scan = 0;
  int n_sample = 0, n_preload = 0, n_extest = 0, n_intest = 0;
  int n_pause_dr = 0, n_pause_ir = 0, n_tdo_hiz = 0, n_update_edge = 0;

  jtag_top dut (
    .tck(tck), .tms(tms), .tdi(tdi), .trstn(trstn), .a(a),
    .fromlogic(fromlogic), .tologic(tologic), .y(y), .tdo(tdo), .tdo_oe(tdo_oe)
  );

  // Device core of the bring-up test: inputs straight to outputs.
  assign fromlogic = tologic ^ core_mask;

  always #5 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: y=%b tologic=%b tdo=%b oe=%b", what, $time, y, tologic, tdo, tdo_oe);
    end
  endtask

  // One TCK: drive TMS/TDI on the falling edge, return TDO seen at the rising edge.
  // last_oe is the TDO enable seen at that rising edge (set on the falling edge before).
  logic last_oe;
  task automatic step(input logic tms_v, input logic tdi_v, output logic tdo_v);
    @(negedge tck);
    tms = tms_v;
    tdi = tdi_v;
    @(posedge tck);
    tdo_v = tdo;
    last_oe = tdo_oe;
  endtask

  task automatic step_n(input logic tms_v);
    logic unused;
    step(tms_v, 1'b0, unused);
  endtask

  // From Run-Test/Idle: load an instruction, return the captured IR bits.
  task automatic ir_scan(input logic [IR_WIDTH-1:0] code, input bit pause,
                         output logic [IR_WIDTH-1:0] cap);
    logic t;
    step_n(1); step_n(1); step_n(0); step_n(0);   // Select-DR, Select-IR, Capture-IR, Shift-IR
    for (int i = 0; i < IR_WIDTH; i++) begin
      step((i == IR_WIDTH - 1) || (pause && i == 0), code[i], t);
      check(last_oe, "TDO driven in Shift-IR");
      cap[i] = t;
      if (pause && i == 0 && IR_WIDTH > 1) begin
        step_n(0); step_n(0);                        // Pause-IR, stay
        check(!last_oe, "TDO released in Pause-IR");
        check(dut.u_tap.state == PAUSE_IR, "Pause-IR");
        step_n(1); step_n(0);                        // Exit2-IR, Shift-IR
        n_pause_ir++;
      end
    end
    step_n(1); step_n(0);                            // Update-IR, Run-Test/Idle
  endtask

  // From Run-Test/Idle: one DR scan of nbits; returns the bits read on TDO.
  // With pause set, the scan is interrupted in Pause-DR after pause_at bits.
  task automatic dr_scan(input int nbits, input logic [31:0] din, input bit pause,
                         input int pause_at, output logic [31:0] dout,
                         input bit check_update);
    logic t;
    logic [N_OUT-1:0] y_before;
    logic [N_OUT-1:0] y_at_fall;
    dout = '0;
    step_n(1); step_n(0); step_n(0);                 // Select-DR, Capture-DR, Shift-DR
    for (int i = 0; i < nbits; i++) begin
      step((i == nbits - 1) || (pause && i == pause_at - 1), din[i], t);
      dout[i] = t;
      if (pause && i == pause_at - 1 && i != nbits - 1) begin
        step_n(0); step_n(0); step_n(0);             // Pause-DR for a while
        check(!last_oe, "TDO released in Pause-DR");
        check(dut.u_tap.state == PAUSE_DR, "Pause-DR");
        step_n(1); step_n(0);                        // Exit2-DR, Shift-DR
        n_pause_dr++;
      end
    end
    y_before = y;
    step_n(1);                                       // Update-DR
    if (check_update) begin
      #1 check(y == y_before, "bias lines unchanged at rising edge into Update-DR");
      fork
        begin @(negedge tck); #1; y_at_fall = y; end
      join_none
    end
    step_n(0);                                       // Run-Test/Idle
    if (check_update) begin
      check(y_at_fall == y, "bias lines change on the falling TCK in Update-DR");
      if (y_at_fall != y_before) n_update_edge++;
    end
  endtask

  // Host command "write value v to the bias lines", EXTEST assumed loaded.
  task automatic write_lines(input logic [N_OUT-1:0] v);
    logic [31:0] rd;
    dr_scan(N, {24'd0, 4'b0000, v}, 1'b0, 0, rd, 1'b1);
    check(y == v, $sformatf("bias lines after writing %b", v));
    n_extest++;
  endtask

  logic [IR_WIDTH-1:0] cap;
  logic [31:0] rd, pattern;
  logic [N-1:0] preload;

  initial begin : main
    // ---- TRSTN reset --------------------------------------------------
    #2 trstn = 1'b0;
    #20 trstn = 1'b1;
    a = 4'b1001;
    #1;
    check(dut.u_tap.state == TLR, "TRSTN puts TAP in Test-Logic-Reset");
    check(dut.u_ir.instr == INSTR_BYPASS, "reset instruction is BYPASS");
    check(y == fromlogic && tologic == a, "pins follow the core after reset");
    check(!tdo_oe, "TDO released after reset");
    n_trst_reset++;
    step_n(0);                                       // Run-Test/Idle
    step_n(0);
    #1 check(dut.u_tap.state == RTI, "Run-Test/Idle");
    if (!tdo_oe) n_tdo_hiz++;

    // ---- IR capture pattern and BYPASS scan ---------------------------
    ir_scan(INSTR_BYPASS, 1'b0, cap);
    check(cap == IR_CAPTURE, "IR capture pattern read on TDO");
    n_ir_capture++;
    pattern = $urandom;
    dr_scan(16, pattern, 1'b0, 0, rd, 1'b0);
    check(rd[0] == 1'b0, "bypass register starts with 0");
    check(rd[15:1] == pattern[14:0], "bypass delays TDI by one TCK");
    n_bypass_scan++;

    // ---- SAMPLE/PRELOAD ----------------------------------------------
    ir_scan(INSTR_SAMPLE, 1'b1, cap);                // through Pause-IR
    check(cap == IR_CAPTURE, "IR capture pattern (paused scan)");
    check(dut.u_ir.instr == INSTR_SAMPLE, "SAMPLE/PRELOAD loaded");
    a = 4'b0110;
    core_mask = 4'b0011;
    preload = 8'b1010_0111;
    #1;
    dr_scan(N, {24'd0, preload}, 1'b0, 0, rd, 1'b0);
    check(rd[N-1:0] == {4'b0110, 4'b0110 ^ 4'b0011}, "SAMPLE reads pins and core outputs");
    check(y == fromlogic && tologic == a, "SAMPLE does not disturb the pins");
    n_sample++;
    n_preload++;

    // ---- EXTEST: preloaded value appears at once ----------------------
    ir_scan(INSTR_EXTEST, 1'b0, cap);
    check(y == preload[N_OUT-1:0], "EXTEST drives the preloaded value");
    check(tologic == a, "EXTEST leaves core inputs alone");
    n_extest++;

    // ---- Antenna configurations --------------------------------------
    write_lines(4'b0010);
    write_lines(4'b0110);
    write_lines(4'b1010);
    write_lines(4'b1100);
    write_lines(4'd15);
    write_lines(4'd5);
    check(y[3] == 1'b0 && y[2] == 1'b1 && y[1] == 1'b0 && y[0] == 1'b1,
          "value 5 biases the second and fourth lines");
    // All sixteen configurations, with a paused scan among them.
    for (int v = 0; v < 16; v++) begin
      dr_scan(N, {24'd0, 4'b0000, 4'(v)}, (v == 9), 3, rd, 1'b1);
      check(y == 4'(v), "configuration via EXTEST");
      if (v > 0) check(rd[N_OUT-1:0] == fromlogic, "EXTEST capture reads core outputs");
    end

    // ---- Bring-up example: load a 7 under EXTEST ----------------------
    write_lines(4'd7);

    // ---- INTEST: stimulus in, core response shifted out ---------------
    ir_scan(INSTR_INTEST, 1'b0, cap);
    dr_scan(N, {24'd0, 8'b1100_0101}, 1'b0, 0, rd, 1'b0);
    check(tologic == 4'b1100, "INTEST drives the core inputs");
    check(y == 4'b0101, "INTEST drives the pins");
    core_mask = 4'b0110;
    #1;
    dr_scan(N, {24'd0, 8'b0011_1000}, 1'b0, 0, rd, 1'b0);
    check(rd[N_OUT-1:0] == (4'b1100 ^ 4'b0110), "INTEST reads the core response");
    check(rd[N-1:N_OUT] == a, "INTEST reads the input pins");
    check(tologic == 4'b0011 && y == 4'b1000, "INTEST second stimulus");
    n_intest++;

    // ---- TMS reset in the middle of a DR scan -------------------------
    step_n(1); step_n(0); step_n(0);                 // into Shift-DR
    step_n(0); step_n(0);
    step_n(1); step_n(1); step_n(1); step_n(1); step_n(1);
    #1;
    check(dut.u_tap.state == TLR, "five TMS=1 reach Test-Logic-Reset");
    @(negedge tck); #1;
    check(dut.u_ir.instr == INSTR_BYPASS, "TMS reset restores BYPASS");
    check(y == fromlogic && tologic == a, "TMS reset returns pins to the core");
    n_tms_reset++;
    step_n(0);
    #1 if (!tdo_oe) n_tdo_hiz++;

    // ---- Mechanism coverage ------------------------------------------
    $display("mechanisms: trst_reset=%0d tms_reset=%0d ir_capture=%0d bypass_scan=%0d sample=%0d preload=%0d extest=%0d intest=%0d pause_dr=%0d pause_ir=%0d tdo_hiz=%0d update_on_falling_edge=%0d",
             n_trst_reset, n_tms_reset, n_ir_capture, n_bypass_scan, n_sample, n_preload,
             n_extest, n_intest, n_pause_dr, n_pause_ir, n_tdo_hiz, n_update_edge);
    check(n_trst_reset > 0, "mechanism TRSTN reset");
    check(n_tms_reset > 0, "mechanism TMS reset");
    check(n_ir_capture > 0, "mechanism IR capture");
    check(n_bypass_scan > 0, "mechanism bypass");
    check(n_sample > 0, "mechanism sample");
    check(n_preload > 0, "mechanism preload");
    check(n_extest > 0, "mechanism extest");
    check(n_intest > 0, "mechanism intest");
    check(n_pause_dr > 0, "mechanism Pause-DR");
    check(n_pause_ir > 0, "mechanism Pause-IR");
    check(n_tdo_hiz > 0, "mechanism TDO high impedance");
    check(n_update_edge > 0, "mechanism falling-edge update");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #500000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
