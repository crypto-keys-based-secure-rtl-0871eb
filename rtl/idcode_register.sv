// idcode_register: 32-bit device identification register, writable by a
// designer.
//
// Capture-DR loads the stored identification code, Shift-DR shifts it out LSB
// first. On Update-DR, if write_ok is high (designer or architect level), the
// shifted value replaces the stored code, as the source allows a designer to
// modify the IDCODE register; a user can only read it. The stored code resets
// to the IDCODE parameter, whose bit 0 is 1 as the standard requires; the
// value itself is a placeholder.
module idcode_register
  import sjtag_pkg::*;
#(
  parameter logic [31:0] IDCODE = 32'h1000_563F
) (
  input  logic     tck,
  input  logic     trst_n,
  input  dr_ctrl_t ctrl,
  input  logic     write_ok,
  input  logic     tdi,
  output logic     tdo,
  output logic [31:0] id
);

  logic [31:0] sr;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      sr <= '0;
      id <= IDCODE;
    end else begin
      if (ctrl.capture)    sr <= id;
      else if (ctrl.shift) sr <= {tdi, sr[31:1]};
      if (ctrl.update && write_ok) id <= sr;
    end
  end

  assign tdo = sr[0];

endmodule
