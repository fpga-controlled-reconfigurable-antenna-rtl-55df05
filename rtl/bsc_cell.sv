// bsc_cell: one boundary scan cell (used for both input and output pins).
//
// A multiplexer picks the parallel value data_in (capture) or the serial
// value shift_in from the neighbouring cell (shift); the result is loaded
// into the capture/shift flop on rising TCK when clock_dr is high. Its
// output is the serial output shift_out toward TDO. On the falling TCK in
// Update-DR the update flop copies the shift flop, and a mode multiplexer
// sends either data_in (mode=0, normal operation) or the update flop
// (mode=1, test value) to qout.
// For an input cell data_in is the pin and qout goes to the core; for an
// output cell data_in comes from the core and qout drives the pin.
// The update flop is cleared by resetn (Test-Logic-Reset or TRSTN) so that
// a pin under test control starts from 0; the original cell has no reset.
module bsc_cell (
  input  logic tck,
  input  logic resetn,
  input  logic clock_dr,
  input  logic shift_dr,
  input  logic update_dr,
  input  logic mode,
  input  logic data_in,
  input  logic shift_in,
  output logic shift_out,
  output logic qout
);

  logic cap_q;
  logic upd_q;

  always_ff @(posedge tck) begin
    if (clock_dr) cap_q <= shift_dr ? shift_in : data_in;
  end

  always_ff @(negedge tck or negedge resetn) begin
    if (!resetn)        upd_q <= 1'b0;
    else if (update_dr) upd_q <= cap_q;
  end

  assign shift_out = cap_q;
  assign qout      = mode ? upd_q : data_in;

endmodule
