// bypass_register: the one-bit BYPASS data register of IEEE 1149.1.
//
// Captures 0 in Capture-DR and delays TDI by one TCK cycle in Shift-DR. Every
// instruction the present privilege level does not allow is routed here.
module bypass_register
  import sjtag_pkg::*;
(
  input  logic     tck,
  input  dr_ctrl_t ctrl,
  input  logic     tdi,
  output logic     tdo
);

  always_ff @(posedge tck) begin
    if (ctrl.capture)    tdo <= 1'b0;
    else if (ctrl.shift) tdo <= tdi;
  end

endmodule
