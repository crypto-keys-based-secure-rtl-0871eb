// tb_lbist_auth_module: challenge shifted out during configuration, storage
// programming, pass/fail verdicts including the algorithm/level rule, the
// limit set by the JTAG level, the MSB-mode byte and the clear on relock.
module tb_lbist_auth_module;
  import sjtag_pkg::*;
  localparam logic [127:0] SEED = 128'hFACE_CAFE_0000_1111_2222_3333_4444_5555;
  logic tck = 0, trst_n = 1, tdi = 0;
  logic cfg_tdo, resp_tdo, store_tdo, unlocked = 1;
  dr_ctrl_t cfg_ctrl = '0, resp_ctrl = '0, store_ctrl = '0;
  sec_level_t jtag_level = LVL_ARCHITECT, user_id;
  logic [127:0] seed, cfg;
  logic auth_pass, auth_fail;
  int checks = 0, failures = 0;

  lbist_auth_module #(.SEED(SEED)) dut (.*);
  always #5 tck = ~tck;

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (50000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum {W_CFG, W_RESP, W_STORE} which_t;

  task automatic scan(input which_t w, input int n, input logic [135:0] v, output logic [135:0] out);
    dr_ctrl_t c;
    out = '0;
    c = '{capture: 1, shift: 0, update: 0};
    for (int i = -1; i <= n; i++) begin
      if (i == -1) c = '{capture: 1, shift: 0, update: 0};
      else if (i == n) c = '{capture: 0, shift: 0, update: 1};
      else c = '{capture: 0, shift: 1, update: 0};
      cfg_ctrl   = (w == W_CFG)   ? c : '0;
      resp_ctrl  = (w == W_RESP)  ? c : '0;
      store_ctrl = (w == W_STORE) ? c : '0;
      if (i >= 0 && i < n) begin
        tdi = v[i];
        out[i] = (w == W_CFG) ? cfg_tdo : (w == W_RESP) ? resp_tdo : store_tdo;
      end
      @(posedge tck); #1;
    end
    cfg_ctrl = '0; resp_ctrl = '0; store_ctrl = '0;
  endtask

  function automatic logic [127:0] cfg_lsb(logic [7:0] b);
    return {$urandom, $urandom, $urandom, 23'($urandom), 1'b0, b};
  endfunction

  function automatic logic [127:0] cfg_msb(logic [7:0] b);
    logic [127:0] c;
    c = {$urandom, $urandom, $urandom, $urandom};
    c[8] = 1;
    for (int k = 0; k < 8; k++) c[127 - k] = b[k];
    return c;
  endfunction

  logic [135:0] o;
  logic [127:0] r_aes, r_des, r_bf;
  localparam logic [7:0] B_AES_L2 = {2'd1, 3'd0, 3'd2};  // user, AES, key 2
  localparam logic [7:0] B_DES_L3 = {2'd2, 3'd5, 3'd0};  // designer, DES (not allowed)
  localparam logic [7:0] B_BF_L3  = {2'd2, 3'd3, 3'd1};  // designer, Blowfish

  initial begin
    r_aes = {$urandom, $urandom, $urandom, $urandom};
    r_des = {$urandom, $urandom, $urandom, $urandom};
    r_bf  = {$urandom, $urandom, $urandom, $urandom};
    #2 trst_n = 0; #10 trst_n = 1; #1;
    check(seed == SEED, "seed");
    scan(W_STORE, 136, {r_aes, B_AES_L2}, o);
    scan(W_STORE, 136, {r_des, B_DES_L3}, o);
    scan(W_STORE, 136, {r_bf,  B_BF_L3},  o);

    // configuration shifts the challenge out
    scan(W_CFG, 128, 136'(cfg_lsb(B_AES_L2)), o);
    check(o[127:0] == SEED, "challenge on TDO");
    check(!auth_pass && !auth_fail, "no verdict yet");
    scan(W_RESP, 128, 136'(r_aes ^ 128'h1), o);
    check(auth_fail && !auth_pass, "wrong response fails");
    scan(W_RESP, 128, 136'(r_aes), o);
    check(o[1:0] == 2'b10, "status readback fail");
    check(auth_pass && !auth_fail && user_id == LVL_USER, "right response passes, user id");

    // algorithm not allowed at that level
    scan(W_CFG, 128, 136'(cfg_lsb(B_DES_L3)), o);
    check(!auth_pass, "new config clears verdict");
    scan(W_RESP, 128, 136'(r_des), o);
    check(auth_fail, "DES at level 3 refused");

    // MSB mode, Blowfish at level 3
    scan(W_CFG, 128, 136'(cfg_msb(B_BF_L3)), o);
    scan(W_RESP, 128, 136'(r_bf), o);
    check(auth_pass && user_id == LVL_DESIGNER, "MSB mode Blowfish passes");

    // JTAG level too low for the requested level
    jtag_level = LVL_USER;
    scan(W_CFG, 128, 136'(cfg_lsb(B_BF_L3)), o);
    scan(W_RESP, 128, 136'(r_bf), o);
    check(auth_fail, "level above JTAG level refused");
    jtag_level = LVL_ARCHITECT;

    // unprogrammed entry never passes, even with the value zero
    scan(W_CFG, 128, 136'(cfg_lsb(8'h00)), o);
    scan(W_RESP, 128, 136'(dut.u_store.mem[0]), o);
    check(auth_fail, "unprogrammed entry");

    // a pass at designer level is withdrawn when the JTAG level drops to user
    scan(W_CFG, 128, 136'(cfg_msb(B_BF_L3)), o);
    scan(W_RESP, 128, 136'(r_bf), o);
    check(auth_pass, "designer pass");
    jtag_level = LVL_USER; @(posedge tck); #1;
    check(!auth_pass, "withdrawn on level drop");
    jtag_level = LVL_ARCHITECT;

    // relock clears
    scan(W_CFG, 128, 136'(cfg_lsb(B_AES_L2)), o);
    scan(W_RESP, 128, 136'(r_aes), o);
    check(auth_pass, "pass again");
    unlocked = 0; @(posedge tck); #1; unlocked = 1;
    check(!auth_pass && !auth_fail, "cleared on relock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
