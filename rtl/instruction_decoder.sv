// instruction_decoder: instruction decode with privilege filtering.
//
// Combinational. Given the current instruction and the security state from
// the secret-key module it chooses the data register between TDI and TDO.
// Whatever the present level does not permit is mapped to BYPASS, so a locked
// device shows only a one-bit bypass path except for UNLOCK. Following the
// four protection levels of the source:
//   locked (level 1)  : UNLOCK only; SECCODE and LOCK once the key was accepted
//   user (level 2)    : boundary scan (EXTEST, SAMPLE/PRELOAD), IDCODE and the
//                       private register readable, Logic BIST access
//   designer (level 3): as level 2, and IDCODE / private register writable
//   architect (level 4): as level 3, and the private register size and the
//                       crypto key storage programmable
// write_ok qualifies the update stage of IDCODE and the private register.
// extest is high while EXTEST is the effective instruction, so the boundary
// cells drive the pins. The exact instruction-to-level table is this design's
// reading of the level descriptions.
module instruction_decoder
  import sjtag_pkg::*;
(
  input  logic [IR_W-1:0] instr,
  input  logic            unlocked,  // key accepted by UNLOCK
  input  sec_level_t      level,
  output dr_sel_t         sel,
  output logic            write_ok,
  output logic            extest,
  output logic            lbist_run  // LBIST_RUN is the effective instruction
);

  logic lvl2, lvl3, lvl4;
  assign lvl2 = unlocked && (level >= LVL_USER);
  assign lvl3 = unlocked && (level >= LVL_DESIGNER);
  assign lvl4 = unlocked && (level == LVL_ARCHITECT);

  always_comb begin
    sel = DR_BYPASS;
    unique case (instr)
      I_UNLOCK:      sel = DR_KEY;
      I_SECCODE:     if (unlocked) sel = DR_KEY;
      I_LOCK:        sel = DR_BYPASS;  // LOCK acts on Update-IR, its DR is bypass
      I_EXTEST,
      I_SAMPLE:      if (lvl2) sel = DR_BSR;
      I_IDCODE:      if (lvl2) sel = DR_IDCODE;
      I_PRIVATE:     if (lvl2) sel = DR_PRIVATE;
      I_PRIVSIZE:    if (lvl4) sel = DR_PRIVSIZE;
      I_LBIST_CFG:   if (lvl2) sel = DR_LBIST_CFG;
      I_LBIST_RESP:  if (lvl2) sel = DR_LBIST_RESP;
      I_LBIST_STORE: if (lvl4) sel = DR_LBIST_STORE;
      I_LBIST_RUN:   if (lvl2) sel = DR_LBIST_STAT;
      default:       sel = DR_BYPASS;
    endcase
  end

  assign write_ok  = lvl3;
  assign extest    = lvl2 && (instr == I_EXTEST);
  assign lbist_run = lvl2 && (instr == I_LBIST_RUN);

endmodule
