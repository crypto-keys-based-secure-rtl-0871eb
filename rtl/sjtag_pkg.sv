// sjtag_pkg: types and constants shared by the secure JTAG / Logic BIST design.
//
// Holds the IEEE 1149.1 TAP state encoding, the capture/shift/update strobe
// bundle that the TAP controller hands to every scan register, the instruction
// opcodes, the four privilege levels, the data-register selector and the
// fields of the LBIST security configuration byte. The level names and the
// configuration field layout follow the source description; the opcode values
// and the TAP state encoding are this design's own choice.
package sjtag_pkg;

  // IEEE 1149.1 TAP controller states
  typedef enum logic [3:0] {
    TLR        = 4'h0,  // Test-Logic-Reset
    RTI        = 4'h1,  // Run-Test/Idle
    SEL_DR     = 4'h2,
    CAPTURE_DR = 4'h3,
    SHIFT_DR   = 4'h4,
    EXIT1_DR   = 4'h5,
    PAUSE_DR   = 4'h6,
    EXIT2_DR   = 4'h7,
    UPDATE_DR  = 4'h8,
    SEL_IR     = 4'h9,
    CAPTURE_IR = 4'hA,
    SHIFT_IR   = 4'hB,
    EXIT1_IR   = 4'hC,
    PAUSE_IR   = 4'hD,
    EXIT2_IR   = 4'hE,
    UPDATE_IR  = 4'hF
  } tap_state_t;

  // Strobes for one scan register; each is high for the whole TCK cycle the
  // TAP spends in the matching state, and the register acts on the rising
  // TCK edge that ends that cycle.
  typedef struct packed {
    logic capture;
    logic shift;
    logic update;
  } dr_ctrl_t;

  localparam int unsigned IR_W = 4;

  typedef enum logic [IR_W-1:0] {
    I_EXTEST      = 4'h0,
    I_SAMPLE      = 4'h1,  // SAMPLE/PRELOAD
    I_IDCODE      = 4'h2,
    I_LOCK        = 4'h3,
    I_UNLOCK      = 4'h4,
    I_SECCODE     = 4'h5,  // security code that selects the privilege level
    I_PRIVATE     = 4'h6,  // private register of programmable size
    I_PRIVSIZE    = 4'h7,  // length of the private register (architect)
    I_LBIST_CFG   = 4'h8,  // 128-bit security configuration register
    I_LBIST_RESP  = 4'h9,  // 128-bit encrypted response
    I_LBIST_STORE = 4'hA,  // program one entry of the key storage (architect)
    I_LBIST_RUN   = 4'hB,  // start Logic BIST / read its status
    I_BYPASS      = 4'hF
  } instr_t;

  // Privilege levels (Table of protection levels): locked, user, designer, architect
  typedef enum logic [1:0] {
    LVL_LOCKED    = 2'd0,  // level 1
    LVL_USER      = 2'd1,  // level 2
    LVL_DESIGNER  = 2'd2,  // level 3
    LVL_ARCHITECT = 2'd3   // level 4
  } sec_level_t;

  // Which data register sits between TDI and TDO
  typedef enum logic [3:0] {
    DR_BYPASS,
    DR_BSR,
    DR_IDCODE,
    DR_KEY,       // key/lock shift register (UNLOCK and SECCODE)
    DR_PRIVATE,
    DR_PRIVSIZE,
    DR_LBIST_CFG,
    DR_LBIST_RESP,
    DR_LBIST_STORE,
    DR_LBIST_STAT
  } dr_sel_t;

  // Crypto algorithm codes of the configuration register (3 bits)
  typedef enum logic [2:0] {
    ALG_AES      = 3'd0,
    ALG_RC6      = 3'd1,
    ALG_TWOFISH  = 3'd2,
    ALG_BLOWFISH = 3'd3,
    ALG_3DES     = 3'd4,
    ALG_DES      = 3'd5,
    ALG_RC2      = 3'd6,
    ALG_RSVD     = 3'd7
  } crypto_alg_t;

  // Decoded security byte of the configuration register
  typedef struct packed {
    sec_level_t  level;    // bits 7:6
    crypto_alg_t alg;      // bits 5:3
    logic [2:0]  keysel;   // bits 2:0, key length choice
  } sec_byte_t;

  // Algorithm/level rule of the supported-algorithm table. Levels in that
  // table are counted 1..4, so LVL_LOCKED is "level 1".
  function automatic logic alg_level_ok(crypto_alg_t alg, sec_level_t lvl);
    unique case (alg)
      ALG_AES, ALG_RC6, ALG_TWOFISH: return 1'b1;
      ALG_BLOWFISH:                  return (lvl == LVL_USER) || (lvl == LVL_DESIGNER);
      ALG_3DES, ALG_DES, ALG_RC2:    return (lvl == LVL_LOCKED) || (lvl == LVL_USER);
      default:                       return 1'b0;
    endcase
  endfunction

endpackage
