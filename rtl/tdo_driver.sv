// tdo_driver: chooses which register drives TDO and retimes it.
//
// The multiplexer chain is: the boundary scan register (the only data
// register here; no alternative internal register is fitted), replaced by
// the bypass flop when the BYPASS instruction is active, and then the
// instruction register unless the TAP is in Shift-DR. The selected bit is
// registered on the falling TCK, so TDO changes half a cycle after the rising
// edge that shifted the chain, and it is driven only while enable (Shift-IR
// or Shift-DR, from the TAP controller) is high; otherwise it is high
// impedance so several devices may share the line. tdo_oe exposes the enable.
// The flop is cleared by TRSTN.
module tdo_driver (
  input  logic tck,
  input  logic trstn,
  input  logic tdo_bs,
  input  logic tdo_byp,
  input  logic tdo_ir,
  input  logic bypass,
  input  logic shift_dr,
  input  logic enable,
  output tri   tdo,
  output logic tdo_oe
);

  logic tdo_dr;
  logic tdo_sel;
  logic tdo_q;

  assign tdo_dr  = bypass   ? tdo_byp : tdo_bs;
  assign tdo_sel = shift_dr ? tdo_dr  : tdo_ir;

  always_ff @(negedge tck or negedge trstn) begin
    if (!trstn) tdo_q <= 1'b0;
    else        tdo_q <= tdo_sel;
  end

  assign tdo_oe = enable;
  assign tdo    = enable ? tdo_q : 1'bz;

endmodule
