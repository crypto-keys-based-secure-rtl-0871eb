// jtag_secret_key_module: first security stage, JTAG lock/unlock and level
// selection.
//
// Parts, after the block diagram of the password-key access system:
//   key/lock shift register  KEY_W-bit data register used by UNLOCK and SECCODE
//   key register             the secret unlock key
//   lock register            1 = TAP locked (all but UNLOCK go to BYPASS)
//   comparator               shift register against key or level codes
//   level registers X, Y, Z  embedded codes for user, designer, architect
// Operation: the device comes out of reset locked at level 1. While LOCK is
// the current instruction the lock register is set and the level drops to 1.
// UNLOCK followed by a DR scan of the key clears the lock register on
// Update-DR if the key matches; the level stays 1 until SECCODE followed by a
// DR scan of a security code matching X, Y or Z grants level 2, 3 or 4. A wrong
// key or a wrong code locks the device again. Test-Logic-Reset and TRST_N
// also lock it. Capture-DR loads the status {level, unlocked} into the low bits
// of the shift register so a tester can read where it stands. ctrl must be
// qualified by the decoder's selection of the key register.
// Key width, reset values, the relock on a wrong entry and the status capture
// are this design's own choices; the key and codes come from parameters and
// stand for values that would be programmed into the silicon.
module jtag_secret_key_module
  import sjtag_pkg::*;
#(
  parameter int unsigned       KEY_W  = 32,
  parameter logic [KEY_W-1:0]  KEY    = KEY_W'(32'hC0DE_5EC1),
  parameter logic [KEY_W-1:0]  CODE_X = KEY_W'(32'h1111_2222),  // user
  parameter logic [KEY_W-1:0]  CODE_Y = KEY_W'(32'h3333_4444),  // designer
  parameter logic [KEY_W-1:0]  CODE_Z = KEY_W'(32'h5555_6666)   // architect
) (
  input  logic            tck,
  input  logic            trst_n,
  input  logic            tlr,
  input  logic [IR_W-1:0] instr,
  input  dr_ctrl_t        ctrl,
  input  logic            tdi,
  output logic            tdo,
  output logic            unlocked,
  output sec_level_t      level
);

  logic [KEY_W-1:0] ksr;        // key/lock shift register
  logic [KEY_W-1:0] key_reg;    // key register
  logic [KEY_W-1:0] reg_x, reg_y, reg_z;
  logic             lock_reg;   // lock register

  logic key_match, x_match, y_match, z_match;
  assign key_match = (ksr == key_reg);
  assign x_match   = (ksr == reg_x);
  assign y_match   = (ksr == reg_y);
  assign z_match   = (ksr == reg_z);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ksr      <= '0;
      key_reg  <= KEY;
      reg_x    <= CODE_X;
      reg_y    <= CODE_Y;
      reg_z    <= CODE_Z;
      lock_reg <= 1'b1;
      level    <= LVL_LOCKED;
    end else begin
      if (ctrl.capture)    ksr <= KEY_W'({level, ~lock_reg});
      else if (ctrl.shift) ksr <= {tdi, ksr[KEY_W-1:1]};

      if (tlr || instr == I_LOCK) begin
        lock_reg <= 1'b1;
        level    <= LVL_LOCKED;
      end else if (ctrl.update && instr == I_UNLOCK) begin
        lock_reg <= ~key_match;
        level    <= LVL_LOCKED;
      end else if (ctrl.update && instr == I_SECCODE && !lock_reg) begin
        if (x_match)      level <= LVL_USER;
        else if (y_match) level <= LVL_DESIGNER;
        else if (z_match) level <= LVL_ARCHITECT;
        else begin
          level    <= LVL_LOCKED;
          lock_reg <= 1'b1;
        end
      end
    end
  end

  assign tdo      = ksr[0];
  assign unlocked = ~lock_reg;

endmodule
