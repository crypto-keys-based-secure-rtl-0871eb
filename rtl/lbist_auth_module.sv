// lbist_auth_module: second security stage, challenge-response authentication
// in front of the Logic BIST.
//
// Holds the 128-bit crypto key security register (the challenge, also the seed
// of the pattern generator), the 128-bit security configuration register, the
// decoder, the crypto key storage and a 128-bit comparator. Steps:
//   1. LBIST_CFG: Capture-DR loads the challenge, so shifting the new
//      configuration in through TDI shifts the challenge out on TDO;
//      Update-DR stores the configuration and clears any earlier verdict.
//   2. The user encrypts the challenge off chip with the private key and
//      algorithm belonging to that configuration.
//   3. LBIST_RESP: the encrypted value is shifted in; on Update-DR it is
//      compared with the storage entry the configuration byte selects. A match
//      with a programmed entry, an algorithm the table allows for the level
//      asked for, and a level no higher than the JTAG level already granted
//      raise auth_pass with user_id; anything else raises auth_fail.
//      Capture-DR of LBIST_RESP loads {auth_fail, auth_pass} for readback.
//   4. LBIST_STORE (architect only): a 136-bit scan {data[127:0], addr[7:0]}
//      writes one storage entry on Update-DR.
// The verdict is cleared when the JTAG stage relocks or its level drops below
// the user id that passed. Each ctrl input must be
// qualified by the decoder's selection. The challenge value, the verdict
// readback and the level rule against the JTAG level are this design's own.
module lbist_auth_module
  import sjtag_pkg::*;
#(
  parameter int unsigned       CFG_W = 128,
  parameter logic [CFG_W-1:0]  SEED  = CFG_W'(128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210)
) (
  input  logic             tck,
  input  logic             trst_n,
  input  dr_ctrl_t         cfg_ctrl,
  input  dr_ctrl_t         resp_ctrl,
  input  dr_ctrl_t         store_ctrl,
  input  logic             tdi,
  output logic             cfg_tdo,
  output logic             resp_tdo,
  output logic             store_tdo,
  input  logic             unlocked,
  input  sec_level_t       jtag_level,
  output logic [CFG_W-1:0] seed,
  output logic [CFG_W-1:0] cfg,
  output logic             auth_pass,
  output logic             auth_fail,
  output sec_level_t       user_id
);

  logic [CFG_W-1:0]   sec_reg;     // crypto key security register (challenge)
  logic [CFG_W-1:0]   cfg_sr, resp_sr;
  logic [CFG_W+7:0]   store_sr;

  sec_byte_t          fields;
  logic [7:0]         index;
  logic               alg_ok, msb_mode;
  logic [CFG_W-1:0]   expected;
  logic               entry_valid;
  logic               match;

  lbist_sec_decoder #(.CFG_W(CFG_W)) u_dec (
    .cfg(cfg), .msb_mode(msb_mode), .fields(fields), .index(index), .alg_ok(alg_ok)
  );

  crypto_key_storage #(.DEPTH(256), .DATA_W(CFG_W)) u_store (
    .clk(tck), .rst_n(trst_n),
    .we(store_ctrl.update), .waddr(store_sr[7:0]), .wdata(store_sr[CFG_W+7:8]),
    .raddr(index), .rdata(expected), .rvalid(entry_valid)
  );

  // comparator
  assign match = entry_valid && (resp_sr == expected) && alg_ok && (fields.level <= jtag_level);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      sec_reg   <= SEED;
      cfg_sr    <= '0;
      resp_sr   <= '0;
      store_sr  <= '0;
      cfg       <= '0;
      auth_pass <= 1'b0;
      auth_fail <= 1'b0;
      user_id   <= LVL_LOCKED;
    end else begin
      if (cfg_ctrl.capture)    cfg_sr <= sec_reg;
      else if (cfg_ctrl.shift) cfg_sr <= {tdi, cfg_sr[CFG_W-1:1]};

      if (resp_ctrl.capture)    resp_sr <= CFG_W'({auth_fail, auth_pass});
      else if (resp_ctrl.shift) resp_sr <= {tdi, resp_sr[CFG_W-1:1]};

      if (store_ctrl.capture)    store_sr <= '0;
      else if (store_ctrl.shift) store_sr <= {tdi, store_sr[CFG_W+7:1]};

      if (!unlocked || (auth_pass && user_id > jtag_level)) begin
        auth_pass <= 1'b0;
        auth_fail <= 1'b0;
        user_id   <= LVL_LOCKED;
      end else if (cfg_ctrl.update) begin
        cfg       <= cfg_sr;
        auth_pass <= 1'b0;
        auth_fail <= 1'b0;
        user_id   <= LVL_LOCKED;
      end else if (resp_ctrl.update) begin
        auth_pass <= match;
        auth_fail <= ~match;
        user_id   <= match ? fields.level : LVL_LOCKED;
      end
    end
  end

  assign seed      = sec_reg;
  assign cfg_tdo   = cfg_sr[0];
  assign resp_tdo  = resp_sr[0];
  assign store_tdo = store_sr[0];

  // a verdict is never both pass and fail
  a_verdict : assert property (@(posedge tck) disable iff (!trst_n) !(auth_pass && auth_fail));

endmodule
