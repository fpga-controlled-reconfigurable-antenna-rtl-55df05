// jtag_top: FPGA controller that biases the diodes of a reconfigurable
// antenna through a JTAG boundary scan chain.
//
// A host drives the four JTAG lines (TCK, TMS, TDI, TRSTN) and reads TDO. The
// design is a standard IEEE 1149.1 test access port around a small device
// with N_IN input pins a and N_OUT output pins y:
//   tap_controller     16-state TAP state machine and its strobes
//   inst_reg           2-bit instruction register, decoded to bypass,
//                      mode_in and mode_out
//   bypass_reg         1-bit bypass register
//   boundary_scan_reg  N_IN input cells and N_OUT output cells
//   tdo_driver         TDO selection, falling-edge retiming, tristate
// The core logic of the device sits outside this module: tologic feeds it
// and fromlogic returns its outputs. With the EXTEST instruction (2'b00)
// loaded, the value last written into the output cells drives y, which are
// the four diode bias lines: writing 4'b0101 into the output cells biases
// the second and fourth lines. With INTEST (2'b10) the input cells also
// drive tologic; with SAMPLE/PRELOAD (2'b01) and BYPASS (2'b11, the reset
// instruction) the pins follow the core (y = fromlogic, tologic = a).
// All logic runs on TCK: capture/shift on the rising edge, update, reset
// and TDO on the falling edge. TRSTN resets asynchronously.
// Two assertions guard the protocol: the instruction changes only in
// Update-IR, and TDO is enabled exactly in the Shift states. Masking the
// boundary scan register's enables under BYPASS, and these assertions, are
// choices of this design; the structure and the codes follow the original.
module jtag_top
  import jtag_pkg::*;
#(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 4
) (
  input  logic             tck,
  input  logic             tms,
  input  logic             tdi,
  input  logic             trstn,
  input  logic [N_IN-1:0]  a,
  input  logic [N_OUT-1:0] fromlogic,
  output logic [N_IN-1:0]  tologic,
  output logic [N_OUT-1:0] y,
  output tri               tdo,
  output logic             tdo_oe
);

  tap_state_e            state;
  tap_ctrl_t             ctrl;
  logic                  tdo_ir;
  logic [IR_WIDTH-1:0]   instr;
  logic                  mode_in;
  logic                  mode_out;
  logic                  bypass;
  logic                  tdo_byp;
  logic                  tdo_bs;

  tap_controller u_tap (
    .tck   (tck),
    .tms   (tms),
    .trstn (trstn),
    .state (state),
    .ctrl  (ctrl)
  );

  inst_reg u_ir (
    .tck       (tck),
    .tdi       (tdi),
    .resetn    (ctrl.resetn),
    .clock_ir  (ctrl.clock_ir),
    .shift_ir  (ctrl.shift_ir),
    .update_ir (ctrl.update_ir),
    .tdo_ir    (tdo_ir),
    .instr     (instr),
    .mode_in   (mode_in),
    .mode_out  (mode_out),
    .bypass    (bypass)
  );

  bypass_reg u_byp (
    .tck      (tck),
    .tdi      (tdi),
    .clock_dr (ctrl.clock_dr),
    .shift_dr (ctrl.shift_dr),
    .tdo_byp  (tdo_byp)
  );

  boundary_scan_reg #(
    .N_IN  (N_IN),
    .N_OUT (N_OUT)
  ) u_bsr (
    .tck       (tck),
    .resetn    (ctrl.resetn),
    .tdi       (tdi),
    // The boundary scan register only shifts when it is the selected data
    // register; under BYPASS it keeps its contents.
    .clock_dr  (ctrl.clock_dr & ~bypass),
    .shift_dr  (ctrl.shift_dr),
    .update_dr (ctrl.update_dr & ~bypass),
    .mode_in   (mode_in),
    .mode_out  (mode_out),
    .a         (a),
    .fromlogic (fromlogic),
    .tologic   (tologic),
    .y         (y),
    .tdo_bs    (tdo_bs)
  );

  tdo_driver u_tdo (
    .tck      (tck),
    .trstn    (trstn),
    .tdo_bs   (tdo_bs),
    .tdo_byp  (tdo_byp),
    .tdo_ir   (tdo_ir),
    .bypass   (bypass),
    .shift_dr (ctrl.shift_dr),
    .enable   (ctrl.enable),
    .tdo      (tdo),
    .tdo_oe   (tdo_oe)
  );

  // The instruction changes only on the falling TCK in Update-IR (or on reset),
  // so the pins never see a half-shifted instruction.
  assert property (@(negedge tck) disable iff (!ctrl.resetn)
                   !ctrl.update_ir |=> $stable(instr))
    else $error("instruction changed outside Update-IR");

  // TDO is driven exactly while the TAP is in Shift-IR or Shift-DR (the
  // enable follows the state by half a TCK, so it agrees at every rising edge).
  assert property (@(posedge tck)
                   tdo_oe == (state inside {SHIFT_IR, SHIFT_DR}))
    else $error("TDO enable does not match the TAP state");

endmodule
