// tap_controller: the 16-state IEEE 1149.1 Test Access Port state machine.
//
// The state advances on every rising TCK according to TMS, with the standard
// transitions (Test-Logic-Reset -> Run-Test/Idle on TMS=0, two TMS=1 steps to
// reach Select-IR-Scan, and so on). An active-low TRSTN forces
// Test-Logic-Reset asynchronously; five TCKs with TMS high reach it too.
//
// The state is decoded into the strobes of tap_ctrl_t:
//   * clock_ir / clock_dr are high in Capture-xR and Shift-xR. The original
//     design gated TCK with this condition to form ClockIR / ClockDR; here it
//     is a clock enable, and the registers load on the same rising TCK edge
//     that the gated clock would have produced (the one leaving the state).
//   * shift_ir / shift_dr are high in Shift-IR / Shift-DR; update_ir /
//     update_dr in Update-IR / Update-DR. The registers apply the update on
//     the falling TCK inside the Update state, which is the edge on which the
//     original registered UpdateIR / UpdateDR pulses rose.
//   * resetn (low in Test-Logic-Reset) and enable (high in either Shift
//     state) are registered on the falling TCK edge, as in the original,
//     so that the TDO output and the register resets change half a cycle
//     after the state. Both are cleared asynchronously by TRSTN.
// The state encoding is the one of IEEE 1149.1, see jtag_pkg.
module tap_controller
  import jtag_pkg::*;
(
  input  logic       tck,
  input  logic       tms,
  input  logic       trstn,
  output tap_state_e state,
  output tap_ctrl_t  ctrl
);

  tap_state_e state_next;

  always_comb begin
    unique case (state)
      TLR:        state_next = tms ? TLR       : RTI;
      RTI:        state_next = tms ? SELECT_DR : RTI;
      SELECT_DR:  state_next = tms ? SELECT_IR : CAPTURE_DR;
      CAPTURE_DR: state_next = tms ? EXIT1_DR  : SHIFT_DR;
      SHIFT_DR:   state_next = tms ? EXIT1_DR  : SHIFT_DR;
      EXIT1_DR:   state_next = tms ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:   state_next = tms ? EXIT2_DR  : PAUSE_DR;
      EXIT2_DR:   state_next = tms ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:  state_next = tms ? SELECT_DR : RTI;
      SELECT_IR:  state_next = tms ? TLR       : CAPTURE_IR;
      CAPTURE_IR: state_next = tms ? EXIT1_IR  : SHIFT_IR;
      SHIFT_IR:   state_next = tms ? EXIT1_IR  : SHIFT_IR;
      EXIT1_IR:   state_next = tms ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:   state_next = tms ? EXIT2_IR  : PAUSE_IR;
      EXIT2_IR:   state_next = tms ? UPDATE_IR : SHIFT_IR;
      UPDATE_IR:  state_next = tms ? SELECT_DR : RTI;
      default:    state_next = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trstn) begin
    if (!trstn) state <= TLR;
    else        state <= state_next;
  end

  logic resetn_q, enable_q;

  // Decodes retimed to the falling edge.
  always_ff @(negedge tck or negedge trstn) begin
    if (!trstn) begin
      resetn_q <= 1'b0;
      enable_q <= 1'b0;
    end else begin
      resetn_q <= (state != TLR);
      enable_q <= (state == SHIFT_IR) || (state == SHIFT_DR);
    end
  end

  // Decodes taken straight from the state.
  always_comb begin
    ctrl.clock_ir  = (state == CAPTURE_IR) || (state == SHIFT_IR);
    ctrl.shift_ir  = (state == SHIFT_IR);
    ctrl.update_ir = (state == UPDATE_IR);
    ctrl.clock_dr  = (state == CAPTURE_DR) || (state == SHIFT_DR);
    ctrl.shift_dr  = (state == SHIFT_DR);
    ctrl.update_dr = (state == UPDATE_DR);
    ctrl.resetn    = resetn_q;
    ctrl.enable    = enable_q;
  end

endmodule
