// instruction_register: JTAG instruction shift stage and update latch.
//
// In Capture-IR the shift stage loads the fixed pattern ...01 the standard
// asks for; in Shift-IR it shifts LSB first from TDI towards TDO; in
// Update-IR the shifted value becomes the current instruction. The current
// instruction resets to IDCODE (asynchronously on TRST_N and synchronously in
// Test-Logic-Reset). The opcode width and values are this design's own.
module instruction_register
  import sjtag_pkg::*;
(
  input  logic            tck,
  input  logic            trst_n,
  input  logic            tlr,
  input  dr_ctrl_t        ctrl,
  input  logic            tdi,
  output logic            tdo,
  output logic [IR_W-1:0] instr
);

  logic [IR_W-1:0] sr;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      sr    <= '0;
      instr <= I_IDCODE;
    end else if (tlr) begin
      instr <= I_IDCODE;
    end else begin
      if (ctrl.capture)    sr <= IR_W'(1);
      else if (ctrl.shift) sr <= {tdi, sr[IR_W-1:1]};
      if (ctrl.update)     instr <= sr;
    end
  end

  assign tdo = sr[0];

endmodule
