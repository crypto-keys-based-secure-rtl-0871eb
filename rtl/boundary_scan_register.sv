// boundary_scan_register: boundary cells around the core's pins.
//
// One cell per core input pin and per core output pin (4 and 1 for the s27
// benchmark). The chain order from TDI is output cells first, then input
// cells, with TDO taken from input cell 0. Capture-DR samples the pin values
// (inputs) and the core's outputs; Shift-DR shifts; Update-DR loads the
// update latches. With extest high the output pins are driven from the update
// latches; otherwise the core's outputs pass to the pins. The core always sees
// the input pins (INTEST is not provided). Capture, shift and update are on
// TCK; the cell structure is the standard one.
module boundary_scan_register
  import sjtag_pkg::*;
#(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 1
) (
  input  logic             tck,
  input  logic             trst_n,
  input  dr_ctrl_t         ctrl,
  input  logic             extest,
  input  logic             tdi,
  output logic             tdo,
  input  logic [N_IN-1:0]  pin_in,
  output logic [N_IN-1:0]  core_in,
  input  logic [N_OUT-1:0] core_out,
  output logic [N_OUT-1:0] pin_out
);

  localparam int unsigned N = N_IN + N_OUT;

  logic [N-1:0] sr, upd;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      sr  <= '0;
      upd <= '0;
    end else begin
      if (ctrl.capture)    sr <= {core_out, pin_in};
      else if (ctrl.shift) sr <= {tdi, sr[N-1:1]};
      if (ctrl.update)     upd <= sr;
    end
  end

  assign tdo     = sr[0];
  assign core_in = pin_in;
  assign pin_out = extest ? upd[N-1:N_IN] : core_out;

endmodule
