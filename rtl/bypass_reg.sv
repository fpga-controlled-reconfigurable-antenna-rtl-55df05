// bypass_reg: the one-bit JTAG bypass register.
//
// On each rising TCK with clock_dr high it loads TDI while shifting and 0 in
// Capture-DR, so a device under BYPASS adds exactly one TCK of delay between
// TDI and TDO and a scan through it starts with a 0. This matches the
// original "tdi AND ShiftDR" load.
module bypass_reg (
  input  logic tck,
  input  logic tdi,
  input  logic clock_dr,
  input  logic shift_dr,
  output logic tdo_byp
);

  always_ff @(posedge tck) begin
    if (clock_dr) tdo_byp <= tdi & shift_dr;
  end

endmodule
