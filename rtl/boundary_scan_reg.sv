// boundary_scan_reg: the boundary scan register of a device with N_IN input
// pins and N_OUT output pins (4 and 4 in the antenna controller, 8 cells).
//
// The cells form one shift chain. TDI enters the highest cell and bit 0
// leaves on tdo_bs. Cells [N_IN+N_OUT-1:N_OUT] are input cells: they capture
// the pins a and, when mode_in is high, drive the core inputs tologic from
// their update flops. Cells [N_OUT-1:0] are output cells: they capture the
// core outputs fromlogic and, when mode_out is high, drive the pins y from
// their update flops. So a Capture-DR samples {a, fromlogic}, and a value
// shifted in with bit 0 first and applied by Update-DR sets
// {tologic, y} under test control.
// Timing: capture and shift on rising TCK while clock_dr is high, update on
// falling TCK while update_dr is high (see bsc_cell).
module boundary_scan_reg #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 4
) (
  input  logic             tck,
  input  logic             resetn,
  input  logic             tdi,
  input  logic             clock_dr,
  input  logic             shift_dr,
  input  logic             update_dr,
  input  logic             mode_in,
  input  logic             mode_out,
  input  logic [N_IN-1:0]  a,
  input  logic [N_OUT-1:0] fromlogic,
  output logic [N_IN-1:0]  tologic,
  output logic [N_OUT-1:0] y,
  output logic             tdo_bs
);

  localparam int unsigned N = N_IN + N_OUT;

  logic [N-1:0] data_in;   // parallel input of each cell
  logic [N-1:0] qout;      // parallel output of each cell
  logic [N:0]   chain;     // chain[i+1] feeds cell i, chain[0] is the end
  logic [N-1:0] mode;

  assign data_in = {a, fromlogic};
  assign mode    = {{N_IN{mode_in}}, {N_OUT{mode_out}}};
  assign chain[N] = tdi;

  for (genvar i = 0; i < N; i++) begin : g_cell
    bsc_cell u_cell (
      .tck       (tck),
      .resetn    (resetn),
      .clock_dr  (clock_dr),
      .shift_dr  (shift_dr),
      .update_dr (update_dr),
      .mode      (mode[i]),
      .data_in   (data_in[i]),
      .shift_in  (chain[i+1]),
      .shift_out (chain[i]),
      .qout      (qout[i])
    );
  end

  assign tologic = qout[N-1:N_OUT];
  assign y       = qout[N_OUT-1:0];
  assign tdo_bs  = chain[0];

endmodule
