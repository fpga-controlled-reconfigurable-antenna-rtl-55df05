// inst_reg: the JTAG instruction register and its instruction decoder.
//
// Each bit is the cell of a typical IR bit: a capture/shift flop fed by a
// multiplexer (parallel capture value when not shifting, the next bit toward
// TDI when shifting) followed by an update flop that is set to 1 by reset.
// In Capture-IR the shift stage loads IR_CAPTURE; in Shift-IR it shifts one
// bit per rising TCK, TDI entering at the top bit and bit 0 leaving on tdo_ir.
// On the falling TCK in Update-IR the shift stage is copied to the
// instruction stage, so a half-shifted pattern never becomes the instruction.
// Reset (the TAP's resetn, low in Test-Logic-Reset) loads all ones, BYPASS,
// which leaves the device working normally.
//
// Decode of the instruction, as in the original design:
//   2'b11 bypass=1                    BYPASS
//   2'b10 mode_in=1, mode_out=1       INTEST (core driven from the register)
//   2'b00 mode_out=1                  EXTEST (pins driven from the register)
//   2'b01 neither                     SAMPLE/PRELOAD
// Timing: clock_ir / shift_ir are sampled on rising TCK, update_ir on
// falling TCK; the decoded outputs follow the instruction stage directly.
module inst_reg
  import jtag_pkg::*;
#(
  parameter logic [IR_WIDTH-1:0] CAPTURE = IR_CAPTURE
) (
  input  logic             tck,
  input  logic             tdi,
  input  logic             resetn,
  input  logic             clock_ir,
  input  logic             shift_ir,
  input  logic             update_ir,
  output logic             tdo_ir,
  output logic [IR_WIDTH-1:0] instr,
  output logic             mode_in,
  output logic             mode_out,
  output logic             bypass
);

  logic [IR_WIDTH-1:0] shift_q;
  logic [IR_WIDTH-1:0] shift_d;

  // Per-bit input multiplexer: capture value or previous bit of the chain.
  always_comb begin
    shift_d = shift_ir ? {tdi, shift_q[IR_WIDTH-1:1]} : CAPTURE;
  end

  always_ff @(posedge tck) begin
    if (clock_ir) shift_q <= shift_d;
  end

  always_ff @(negedge tck or negedge resetn) begin
    if (!resetn)        instr <= INSTR_BYPASS;
    else if (update_ir) instr <= shift_q;
  end

  assign tdo_ir   = shift_q[0];
  assign bypass   = (instr == INSTR_BYPASS);
  assign mode_in  = (instr == INSTR_INTEST);
  assign mode_out = (instr == INSTR_INTEST) || (instr == INSTR_EXTEST);

endmodule
