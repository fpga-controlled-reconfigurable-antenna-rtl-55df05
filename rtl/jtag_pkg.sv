// jtag_pkg: shared types and constants of the JTAG antenna-bias controller.
//
// The TAP state encoding is the 4-bit code of IEEE 1149.1, which is also the
// code the original controller used (Test-Logic-Reset = 4'hF, Run-Test/Idle =
// 4'hC, ...). The instruction codes follow the original instruction-register
// decode: 2'b11 bypass, 2'b00 EXTEST (mode_out), 2'b10 both modes (used as
// INTEST), 2'b01 SAMPLE/PRELOAD (neither mode). tap_ctrl_t bundles the
// strobes that the TAP controller sends to the instruction and data registers.
package jtag_pkg;

  typedef enum logic [3:0] {
    TLR        = 4'hF,  // Test-Logic-Reset
    RTI        = 4'hC,  // Run-Test/Idle
    SELECT_DR  = 4'h7,
    CAPTURE_DR = 4'h6,
    SHIFT_DR   = 4'h2,
    EXIT1_DR   = 4'h1,
    PAUSE_DR   = 4'h3,
    EXIT2_DR   = 4'h0,
    UPDATE_DR  = 4'h5,
    SELECT_IR  = 4'h4,
    CAPTURE_IR = 4'hE,
    SHIFT_IR   = 4'hA,
    EXIT1_IR   = 4'h9,
    PAUSE_IR   = 4'hB,
    EXIT2_IR   = 4'h8,
    UPDATE_IR  = 4'hD
  } tap_state_e;

  // Instruction codes of the 2-bit instruction register.
  localparam int unsigned IR_WIDTH = 2;
  localparam logic [IR_WIDTH-1:0] INSTR_EXTEST  = 2'b00;
  localparam logic [IR_WIDTH-1:0] INSTR_SAMPLE  = 2'b01;
  localparam logic [IR_WIDTH-1:0] INSTR_INTEST  = 2'b10;
  localparam logic [IR_WIDTH-1:0] INSTR_BYPASS  = 2'b11;
  // Value loaded into the instruction shift register in Capture-IR.
  localparam logic [IR_WIDTH-1:0] IR_CAPTURE    = 2'b10;

  // Strobes from the TAP controller to the registers.
  //   clock_ir / clock_dr : capture or shift this register at the next rising TCK
  //   shift_ir / shift_dr : the TAP is in Shift-IR / Shift-DR (shift, not capture)
  //   update_ir/ update_dr: copy shift stage to the parallel stage at falling TCK
  //   resetn              : low while in Test-Logic-Reset (changes on falling TCK)
  //   enable              : TDO driven (changes on falling TCK)
  typedef struct packed {
    logic clock_ir;
    logic shift_ir;
    logic update_ir;
    logic clock_dr;
    logic shift_dr;
    logic update_dr;
    logic resetn;
    logic enable;
  } tap_ctrl_t;

endpackage
