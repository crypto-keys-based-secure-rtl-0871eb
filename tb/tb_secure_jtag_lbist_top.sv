// tb_secure_jtag_lbist_top: end-to-end session through the TAP pins only,
// with every parameter of the top at its default.
//
// The tester holds the secrets a real user would have been given: the unlock
// key, the level codes X/Y/Z and, for the Logic BIST stage, the encrypted
// responses. Off-chip encryption is stood in for by enc(), a keyed mixing
// function; the chip only ever compares against what was programmed into its
// key storage, so any function serves. The session walks through: locked
// device (all bypass), wrong and right key, user/designer/architect levels,
// refused and accepted register writes, SAMPLE/PRELOAD and EXTEST, private
// register resizing, key storage programming, challenge readout, failed and
// passed authentication, a refused and an accepted Logic BIST run whose
// signature is checked against a cycle model written here, and relocking.
// Each of these mechanisms is counted; one that never happened is a failure.
module tb_secure_jtag_lbist_top;
  import sjtag_pkg::*;

  localparam logic [31:0] KEY = 32'hC0DE_5EC1;
  localparam logic [31:0] CX = 32'h1111_2222, CY = 32'h3333_4444, CZ = 32'h5555_6666;
  localparam logic [31:0] ID = 32'h1000_563F;
  localparam int NPAT = 256, CHAIN = 3;

  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo, tdo_en;
  logic clk = 0, rst_n = 1;
  logic [3:0] pin_in = 0;
  logic pin_out;
  sec_level_t jtag_level;
  logic jtag_unlocked, lbist_auth_pass, lbist_auth_fail, lbist_done;

  secure_jtag_lbist_top dut (.*);

  always #10 tck = ~tck;
  always #3 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // mechanism counters
  typedef enum int {M_BYPASS_LOCKED, M_WRONG_KEY, M_UNLOCK, M_LVL2, M_LVL3, M_LVL4, M_WRONG_CODE,
                    M_WRITE_REFUSED, M_WRITE_DONE, M_SAMPLE, M_EXTEST, M_RESIZE, M_STORE,
                    M_CHALLENGE, M_AUTH_FAIL, M_AUTH_PASS, M_RUN_REFUSED, M_BIST_RUN, M_LOCK, M_COUNT} mech_t;
  int mech [M_COUNT];

  initial begin
    repeat (200000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- JTAG pin-level driver ----------------
  task automatic clock(input logic m, input logic d = 0);
    tms = m; tdi = d;
    @(posedge tck); #1;
  endtask

  task automatic tap_reset;
    repeat (5) clock(1);
    clock(0);  // Run-Test/Idle
  endtask

  task automatic load_ir(input instr_t op);
    logic [IR_W-1:0] o;
    clock(1); clock(1); clock(0); clock(0);      // Select-DR, Select-IR, Capture-IR, Shift-IR
    for (int i = 0; i < IR_W; i++) begin
      clock(i == IR_W - 1, op[i]);
      o[i] = tdo;
    end
    check(o == IR_W'(1), "IR capture pattern");
    clock(1); clock(0);                          // Update-IR, Run-Test/Idle
  endtask

  // scan n bits (LSB first) through the selected DR from Run-Test/Idle
  task automatic scan_dr(input int n, input logic [255:0] v, output logic [255:0] o);
    o = '0;
    clock(1); clock(0); clock(0);                // Select-DR, Capture-DR, Shift-DR
    for (int i = 0; i < n; i++) begin
      clock(i == n - 1, v[i]);
      o[i] = tdo;
    end
    clock(1); clock(0);                          // Update-DR, Run-Test/Idle
  endtask

  // length of the current DR path: shift a random word and find where its
  // first 16 bits come out again
  task automatic dr_length(output int len);
    logic [255:0] o, v;
    v = {8{$urandom}};
    scan_dr(100, v, o);
    len = -1;
    for (int l = 63; l >= 0; l--) if (o[l +: 16] == v[15:0]) len = l;
  endtask

  // ---------------- stand-ins for the tester's secrets ----------------
  function automatic logic [127:0] enc(logic [127:0] challenge, logic [7:0] sel);
    logic [127:0] x;
    x = challenge;
    for (int r = 0; r < 4; r++) x = {x[126:0], x[127]} ^ {16{sel ^ 8'(r * 37 + 11)}};
    return x;
  endfunction

  function automatic logic [255:0] cfg_word(logic [7:0] b, logic msb);
    logic [127:0] c;
    c = {$urandom, $urandom, $urandom, $urandom};
    c[8] = msb;
    for (int k = 0; k < 8; k++) if (msb) c[127 - k] = b[k]; else c[k] = b[k];
    return 256'(c);
  endfunction

  // ---------------- reference Logic BIST signature ----------------
  function automatic logic [3:0] s27(logic [3:0] i, logic [2:0] s);
    logic g0, g1, g2, g3, g5, g6, g7, g8, g12, g9, g11;
    {g3, g2, g1, g0} = i; {g5, g6, g7} = s;
    g8 = !g0 && g6; g12 = !(g1 || g7);
    g9 = !((g3 || g8) && (g12 || g8));
    g11 = !(g5 || g9);
    return {g0 && !g11, g11, !g2 && !g12, !g11};
  endfunction

  function automatic logic [31:0] ref_signature(logic [127:0] seed);
    logic [127:0] p;
    logic [2:0] ff;
    logic [31:0] m;
    logic [3:0] r;
    p = seed; ff = 3'b000; m = '0;
    for (int pat = 0; pat <= NPAT; pat++) begin
      for (int c = 0; c < CHAIN; c++) begin      // shift (pat == NPAT: final unload)
        r = s27(p[3:0], ff);
        if (pat > 0) m = {m[30:0], m[31] ^ m[21] ^ m[1] ^ m[0]} ^ {30'b0, r[0], ff[0]};
        ff = {p[127], ff[2], ff[1]};
        if (pat < NPAT) p = {p[126:0], p[127] ^ p[125] ^ p[100] ^ p[98]};
      end
      if (pat < NPAT) begin                      // capture
        r = s27(p[3:0], ff);
        m = {m[30:0], m[31] ^ m[21] ^ m[1] ^ m[0]} ^ {30'b0, r[0], ff[0]};
        ff = r[3:1];
        p = {p[126:0], p[127] ^ p[125] ^ p[100] ^ p[98]};
      end
    end
    return m;
  endfunction

  // ---------------- session ----------------
  initial begin
    logic [255:0] o;
    logic [127:0] challenge;
    int len;
    localparam logic [7:0] B_AES_U  = {2'd1, 3'd0, 3'd0};  // user, AES, key 0
    localparam logic [7:0] B_TF_D   = {2'd2, 3'd2, 3'd2};  // designer, Twofish, key 2
    localparam logic [7:0] B_DES_U  = {2'd1, 3'd5, 3'd0};  // user, DES

    foreach (mech[i]) mech[i] = 0;
    #2 trst_n = 0; rst_n = 0; #30 trst_n = 1; rst_n = 1;
    @(posedge tck); #1;
    tap_reset();

    // 1. locked: IDCODE (reset instruction) is mapped to BYPASS
    check(!jtag_unlocked && jtag_level == LVL_LOCKED, "locked after reset");
    dr_length(len);
    check(len == 1, $sformatf("locked IDCODE path length %0d", len));
    load_ir(I_EXTEST);
    dr_length(len);
    check(len == 1, "locked EXTEST -> bypass");
    if (len == 1) mech[M_BYPASS_LOCKED]++;

    // 2. wrong key, then the right key
    load_ir(I_UNLOCK);
    scan_dr(32, 256'(KEY ^ 32'h0100_0000), o);
    check(!jtag_unlocked, "wrong key");
    if (!jtag_unlocked) mech[M_WRONG_KEY]++;
    scan_dr(32, 256'(KEY), o);
    check(jtag_unlocked && jtag_level == LVL_LOCKED, "key accepted");
    if (jtag_unlocked) mech[M_UNLOCK]++;
    load_ir(I_IDCODE);
    dr_length(len);
    check(len == 1, "unlocked but level 1: still bypass");

    // 3. user level
    load_ir(I_SECCODE);
    scan_dr(32, 256'(CX), o);
    check(o[2:0] == 3'b001, "status: unlocked, level 1");
    check(jtag_level == LVL_USER, "level 2");
    if (jtag_level == LVL_USER) mech[M_LVL2]++;
    load_ir(I_IDCODE);
    scan_dr(32, 256'(32'hFFFF_FFFF), o);
    check(o[31:0] == ID, $sformatf("IDCODE %h", o[31:0]));
    scan_dr(32, 256'(32'h0), o);
    check(o[31:0] == ID, "user cannot rewrite IDCODE");
    if (o[31:0] == ID) mech[M_WRITE_REFUSED]++;

    // boundary scan: SAMPLE/PRELOAD then EXTEST
    pin_in = 4'b1011;
    load_ir(I_SAMPLE);
    #1;
    scan_dr(5, 256'(5'b1_0000), o);
    check(o[3:0] == 4'b1011, "SAMPLE captured the input pins");
    check(o[4] == pin_out, "SAMPLE captured the core output");
    mech[M_SAMPLE]++;
    load_ir(I_EXTEST);
    check(pin_out == 1'b1, "EXTEST drives the preloaded 1");
    scan_dr(5, 256'(5'b0_0000), o);
    check(pin_out == 1'b0, "EXTEST drives 0");
    if (pin_out == 1'b0) mech[M_EXTEST]++;

    load_ir(I_PRIVSIZE);
    dr_length(len);
    check(len == 1, "user cannot reach PRIVSIZE");
    load_ir(I_LBIST_STORE);
    dr_length(len);
    check(len == 1, "user cannot reach LBIST_STORE");

    // 4. designer level: writes allowed
    load_ir(I_SECCODE);
    scan_dr(32, 256'(CY), o);
    check(jtag_level == LVL_DESIGNER, "level 3");
    if (jtag_level == LVL_DESIGNER) mech[M_LVL3]++;
    load_ir(I_IDCODE);
    scan_dr(32, 256'(32'hABCD_0001), o);
    scan_dr(32, 256'(32'hABCD_0001), o);
    check(o[31:0] == 32'hABCD_0001, "designer rewrote IDCODE");
    load_ir(I_PRIVATE);
    scan_dr(32, 256'(32'h5A5A_1234), o);
    scan_dr(32, 256'(32'h5A5A_1234), o);
    check(o[31:0] == 32'h5A5A_1234, "designer wrote private register");
    if (o[31:0] == 32'h5A5A_1234) mech[M_WRITE_DONE]++;

    // 5. architect level: resize the private register, program key storage
    load_ir(I_SECCODE);
    scan_dr(32, 256'(CZ), o);
    check(jtag_level == LVL_ARCHITECT, "level 4");
    if (jtag_level == LVL_ARCHITECT) mech[M_LVL4]++;
    load_ir(I_PRIVSIZE);
    scan_dr(6, 256'(6'd12), o);
    check(o[5:0] == 6'd32, "old size 32");
    load_ir(I_PRIVATE);
    dr_length(len);
    check(len == 12, $sformatf("private length now %0d", len));
    if (len == 12) mech[M_RESIZE]++;

    // challenge first (any configuration), so the responses can be programmed
    load_ir(I_LBIST_CFG);
    scan_dr(128, cfg_word(B_AES_U, 0), o);
    challenge = o[127:0];
    check(challenge == 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3210, "challenge is the LFSR seed");
    mech[M_CHALLENGE]++;
    load_ir(I_LBIST_STORE);
    scan_dr(136, {120'b0, enc(challenge, B_AES_U), B_AES_U}, o);
    scan_dr(136, {120'b0, enc(challenge, B_TF_D), B_TF_D}, o);
    scan_dr(136, {120'b0, enc(challenge, B_DES_U), B_DES_U}, o);
    mech[M_STORE]++;

    // 6. drop to user level, authenticate for LBIST
    load_ir(I_SECCODE);
    scan_dr(32, 256'(CX), o);
    check(jtag_level == LVL_USER, "back to user");
    load_ir(I_LBIST_RUN);
    repeat (600) clock(0);
    check(!lbist_done, "no BIST run without authentication");
    scan_dr(34, '0, o);
    check(o[1:0] == 2'b00, "status: not authenticated, not done");
    if (!lbist_done) mech[M_RUN_REFUSED]++;

    load_ir(I_LBIST_CFG);
    scan_dr(128, cfg_word(B_TF_D, 1), o);   // designer level asked by a user
    load_ir(I_LBIST_RESP);
    scan_dr(128, 256'(enc(challenge, B_TF_D)), o);
    check(lbist_auth_fail && !lbist_auth_pass, "level above JTAG level refused");
    load_ir(I_LBIST_CFG);
    scan_dr(128, cfg_word(B_AES_U, 1), o);
    load_ir(I_LBIST_RESP);
    scan_dr(128, 256'(enc(challenge, B_AES_U) ^ 128'h8), o);
    check(lbist_auth_fail, "wrong response refused");
    if (lbist_auth_fail) mech[M_AUTH_FAIL]++;
    scan_dr(128, 256'(enc(challenge, B_AES_U)), o);
    check(o[1:0] == 2'b10, "status readback fail");
    check(lbist_auth_pass && !lbist_auth_fail, "authenticated");
    if (lbist_auth_pass) mech[M_AUTH_PASS]++;

    // 7. Logic BIST run
    load_ir(I_LBIST_RUN);
    scan_dr(34, '0, o);
    check(o[1:0] == 2'b01, "authenticated, not yet done");
    len = 0;
    while (!lbist_done && len < 2000) begin clock(0); len++; end
    check(lbist_done, "BIST finished");
    scan_dr(34, '0, o);
    check(o[1:0] == 2'b11, "status done");
    check(o[33:2] == ref_signature(challenge),
          $sformatf("signature %h exp %h", o[33:2], ref_signature(challenge)));
    if (lbist_done) mech[M_BIST_RUN]++;
    // system clock cycles of one run: 1 + NPAT*(CHAIN+1) + CHAIN = 1028;
    // with a 6 ns system clock and 20 ns TCK the run ends within about
    // 1028*6/20 + synchroniser cycles of TCK
    check(len < 1028 * 6 / 20 + 12, $sformatf("run took %0d TCK", len));

    // 8. wrong level code relocks; LOCK relocks
    load_ir(I_SECCODE);
    scan_dr(32, 256'(32'h0BAD_C0DE), o);
    clock(0);
    check(!jtag_unlocked && !lbist_auth_pass, "wrong code relocks and clears auth");
    if (!jtag_unlocked) mech[M_WRONG_CODE]++;
    load_ir(I_UNLOCK);
    scan_dr(32, 256'(KEY), o);
    load_ir(I_SECCODE);
    scan_dr(32, 256'(CY), o);
    load_ir(I_LOCK);
    clock(0);
    check(!jtag_unlocked && jtag_level == LVL_LOCKED, "LOCK");
    load_ir(I_IDCODE);
    dr_length(len);
    check(len == 1, "locked again: bypass");
    if (len == 1) mech[M_LOCK]++;

    for (int i = 0; i < M_COUNT; i++) begin
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mech_t'(i)));
      $display("mechanism %-16s %0d", mech_t'(i), mech[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
