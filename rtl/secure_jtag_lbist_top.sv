// secure_jtag_lbist_top: IEEE 1149.1 test access with two-stage,
// key-based access control in front of a Logic BIST, wrapped around the
// ISCAS'89 s27 benchmark core.
//
// JTAG side (TCK domain): TAP controller, instruction register, the
// secret-key module (first stage: lock/unlock and level select), the
// instruction decoder that sends every instruction the current level does not
// allow to BYPASS, and the data registers BYPASS, IDCODE, boundary scan,
// private register (+ its size register), and the LBIST authentication module
// (second stage: configuration, challenge/response, key storage). A small
// status register for LBIST_RUN is kept here: Capture-DR loads
// {signature[MISR_W-1:0], done, auth_pass}, LSB first on TDO.
// Core side (system clock): the scan-wrapped s27 core, the LBIST controller,
// pattern generator and MISR. LBIST starts when LBIST_RUN is the effective
// instruction and the second stage has passed with a user id of level 2 or
// more; the request crosses into the system clock through a two-flop
// synchroniser and done crosses back the same way. The signature is stable
// once done is seen, so it is read without further synchronisation. While the
// BIST runs the core's inputs come from the pattern generator; otherwise from
// the input pins through the boundary cells.
// TDO changes on the falling edge of TCK; tdo_en marks Shift-IR/Shift-DR
// (no tristate in this model). Opcodes are listed in sjtag_pkg.
module secure_jtag_lbist_top
  import sjtag_pkg::*;
#(
  parameter int unsigned KEY_W      = 32,
  parameter int unsigned CFG_W      = 128,
  parameter int unsigned PRIV_MAX   = 32,
  parameter int unsigned N_PATTERNS = 256,
  parameter int unsigned MISR_W     = 32,
  parameter logic [31:0]      IDCODE = 32'h1000_563F,
  parameter logic [KEY_W-1:0] KEY    = KEY_W'(32'hC0DE_5EC1),
  parameter logic [KEY_W-1:0] CODE_X = KEY_W'(32'h1111_2222),
  parameter logic [KEY_W-1:0] CODE_Y = KEY_W'(32'h3333_4444),
  parameter logic [KEY_W-1:0] CODE_Z = KEY_W'(32'h5555_6666),
  parameter logic [CFG_W-1:0] SEED   = CFG_W'(128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210)
) (
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  input  logic       tdi,
  output logic       tdo,
  output logic       tdo_en,
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] pin_in,
  output logic       pin_out,
  // observation of the security state, for the system
  output sec_level_t jtag_level,
  output logic       jtag_unlocked,
  output logic       lbist_auth_pass,
  output logic       lbist_auth_fail,
  output logic       lbist_done
);

  localparam int unsigned CHAIN_LEN = 3;
  localparam int unsigned STAT_W    = MISR_W + 2;

  // ---------------- TAP and instruction path ----------------
  tap_state_t      state;
  dr_ctrl_t        dr, irc;
  logic            tlr, rti;
  logic [IR_W-1:0] instr;
  logic            ir_tdo;

  tap_controller u_tap (
    .tck, .trst_n, .tms, .state, .dr, .ir(irc), .tlr, .rti
  );

  instruction_register u_ir (
    .tck, .trst_n, .tlr, .ctrl(irc), .tdi, .tdo(ir_tdo), .instr
  );

  sec_level_t level;
  logic       unlocked;
  dr_sel_t    sel;
  logic       write_ok, extest, lbist_run;

  instruction_decoder u_dec (
    .instr, .unlocked, .level, .sel, .write_ok, .extest, .lbist_run
  );

  function automatic dr_ctrl_t gate(dr_sel_t s);
    return (sel == s) ? dr : '0;
  endfunction

  // ---------------- first stage: secret keys ----------------
  logic key_tdo;
  jtag_secret_key_module #(
    .KEY_W(KEY_W), .KEY(KEY), .CODE_X(CODE_X), .CODE_Y(CODE_Y), .CODE_Z(CODE_Z)
  ) u_key (
    .tck, .trst_n, .tlr, .instr, .ctrl(gate(DR_KEY)), .tdi, .tdo(key_tdo),
    .unlocked, .level
  );

  // ---------------- standard data registers ----------------
  logic byp_tdo, id_tdo, bsr_tdo, priv_tdo, psize_tdo;
  logic [31:0] idcode;
  logic [3:0]  core_pi_pins;
  logic        core_po;
  logic [PRIV_MAX-1:0]             priv_value;
  logic [$clog2(PRIV_MAX + 1)-1:0] priv_size;

  bypass_register u_byp (.tck, .ctrl(gate(DR_BYPASS)), .tdi, .tdo(byp_tdo));

  idcode_register #(.IDCODE(IDCODE)) u_id (
    .tck, .trst_n, .ctrl(gate(DR_IDCODE)), .write_ok, .tdi, .tdo(id_tdo), .id(idcode)
  );

  boundary_scan_register #(.N_IN(4), .N_OUT(1)) u_bsr (
    .tck, .trst_n, .ctrl(gate(DR_BSR)), .extest, .tdi, .tdo(bsr_tdo),
    .pin_in, .core_in(core_pi_pins), .core_out(core_po), .pin_out
  );

  private_register #(.PRIV_MAX(PRIV_MAX)) u_priv (
    .tck, .trst_n, .ctrl(gate(DR_PRIVATE)), .size_ctrl(gate(DR_PRIVSIZE)), .write_ok,
    .tdi, .tdo(priv_tdo), .size_tdo(psize_tdo), .value(priv_value), .size(priv_size)
  );

  // ---------------- second stage: LBIST authentication ----------------
  logic             cfg_tdo, resp_tdo, store_tdo;
  logic [CFG_W-1:0] seed, cfg;
  logic             auth_pass, auth_fail;
  sec_level_t       user_id;

  lbist_auth_module #(.CFG_W(CFG_W), .SEED(SEED)) u_auth (
    .tck, .trst_n,
    .cfg_ctrl(gate(DR_LBIST_CFG)), .resp_ctrl(gate(DR_LBIST_RESP)), .store_ctrl(gate(DR_LBIST_STORE)),
    .tdi, .cfg_tdo, .resp_tdo, .store_tdo,
    .unlocked, .jtag_level(level), .seed, .cfg, .auth_pass, .auth_fail, .user_id
  );

  // ---------------- Logic BIST (system clock) ----------------
  logic              run_req, run_sync, done_sync, bist_done, bist_busy;
  logic              prpg_load, prpg_en, scan_en_ctl, misr_clear, misr_en;
  logic [CFG_W-1:0]  prpg_q;
  logic [MISR_W-1:0] signature;
  logic [3:0]        core_pi;
  logic              core_scan_en, core_scan_out;

  assign run_req = lbist_run && auth_pass && (user_id >= LVL_USER);

  sync_2ff u_sync_run  (.clk,      .rst_n,          .d(run_req),   .q(run_sync));
  sync_2ff u_sync_done (.clk(tck), .rst_n(trst_n),  .d(bist_done), .q(done_sync));

  lbist_controller #(.N_PATTERNS(N_PATTERNS), .CHAIN_LEN(CHAIN_LEN)) u_lbc (
    .clk, .rst_n, .start(run_sync), .prpg_load, .prpg_en, .scan_en(scan_en_ctl),
    .misr_clear, .misr_en, .busy(bist_busy), .done(bist_done)
  );

  prpg_lfsr #(.W(CFG_W)) u_prpg (
    .clk, .rst_n, .load(prpg_load), .seed, .en(prpg_en), .q(prpg_q)
  );

  assign core_pi      = bist_busy ? prpg_q[3:0] : core_pi_pins;
  assign core_scan_en = bist_busy && scan_en_ctl;

  s27_scan_core u_core (
    .clk, .rst_n, .pi(core_pi), .po(core_po),
    .scan_en(core_scan_en), .scan_in(prpg_q[CFG_W-1]), .scan_out(core_scan_out)
  );

  misr #(.W(MISR_W)) u_misr (
    .clk, .rst_n, .clear(misr_clear), .en(misr_en),
    .din(MISR_W'({core_po, core_scan_out})), .sig(signature)
  );

  // the core is only ever driven by the BIST engine after a request that
  // required the second-stage pass
  a_bist_needs_request : assert property (@(posedge clk) disable iff (!rst_n)
    $rose(bist_busy) |-> run_sync);

  // ---------------- LBIST status register (LBIST_RUN) ----------------
  logic     [STAT_W-1:0] stat_sr;
  dr_ctrl_t              stat_ctrl;
  assign stat_ctrl = gate(DR_LBIST_STAT);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                stat_sr <= '0;
    else if (stat_ctrl.capture) stat_sr <= {done_sync ? signature : MISR_W'(0), done_sync, auth_pass};
    else if (stat_ctrl.shift)   stat_sr <= {tdi, stat_sr[STAT_W-1:1]};
  end

  // ---------------- TDO ----------------
  logic dr_tdo;
  always_comb begin
    unique case (sel)
      DR_BYPASS:      dr_tdo = byp_tdo;
      DR_BSR:         dr_tdo = bsr_tdo;
      DR_IDCODE:      dr_tdo = id_tdo;
      DR_KEY:         dr_tdo = key_tdo;
      DR_PRIVATE:     dr_tdo = priv_tdo;
      DR_PRIVSIZE:    dr_tdo = psize_tdo;
      DR_LBIST_CFG:   dr_tdo = cfg_tdo;
      DR_LBIST_RESP:  dr_tdo = resp_tdo;
      DR_LBIST_STORE: dr_tdo = store_tdo;
      DR_LBIST_STAT:  dr_tdo = stat_sr[0];
      default:        dr_tdo = byp_tdo;
    endcase
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_en <= 1'b0;
    end else begin
      tdo    <= irc.shift ? ir_tdo : (dr.shift ? dr_tdo : 1'b0);
      tdo_en <= irc.shift || dr.shift;
    end
  end

  assign jtag_level      = level;
  assign jtag_unlocked   = unlocked;
  assign lbist_auth_pass = auth_pass;
  assign lbist_auth_fail = auth_fail;
  assign lbist_done      = done_sync;

endmodule
