// tb_jtag_secret_key_module: locked after reset; wrong key stays locked;
// right key unlocks at level 1; codes X/Y/Z give levels 2/3/4; a wrong code
// and the LOCK instruction lock again; status capture.
module tb_jtag_secret_key_module;
  import sjtag_pkg::*;
  localparam logic [31:0] K = 32'hA5A5_0F0F, X = 32'h0000_1234, Y = 32'h0000_5678, Z = 32'h9ABC_DEF0;
  logic tck = 0, trst_n = 1, tlr = 0, tdi = 0, tdo, unlocked;
  logic [IR_W-1:0] instr = I_BYPASS;
  dr_ctrl_t ctrl = '0;
  sec_level_t level;
  int checks = 0, failures = 0;

  jtag_secret_key_module #(.KEY_W(32), .KEY(K), .CODE_X(X), .CODE_Y(Y), .CODE_Z(Z)) dut (.*);
  always #5 tck = ~tck;

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (5000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic scan(input instr_t op, input logic [31:0] v, output logic [31:0] out);
    instr = op;
    ctrl = '{capture: 1, shift: 0, update: 0}; @(posedge tck); #1;
    ctrl = '{capture: 0, shift: 1, update: 0};
    for (int i = 0; i < 32; i++) begin tdi = v[i]; out[i] = tdo; @(posedge tck); #1; end
    ctrl = '{capture: 0, shift: 0, update: 1}; @(posedge tck); #1;
    ctrl = '0; instr = I_BYPASS;
  endtask

  initial begin
    logic [31:0] o;
    #2 trst_n = 0; #10 trst_n = 1; #1;
    check(!unlocked && level == LVL_LOCKED, "locked after reset");
    scan(I_UNLOCK, K ^ 32'h1, o);
    check(!unlocked, "wrong key stays locked");
    check(o == 32'h0, "status locked");
    scan(I_SECCODE, Z, o);
    check(level == LVL_LOCKED, "code ignored while locked");
    scan(I_UNLOCK, K, o);
    check(unlocked && level == LVL_LOCKED, "key unlocks, level 1");
    scan(I_SECCODE, X, o);
    check(o == 32'h1, "status unlocked level1");
    check(level == LVL_USER, "X -> user");
    scan(I_SECCODE, Y, o);
    check(level == LVL_DESIGNER, "Y -> designer");
    scan(I_SECCODE, Z, o);
    check(level == LVL_ARCHITECT, "Z -> architect");
    scan(I_SECCODE, 32'h0, o);
    check(o == {29'b0, 2'd3, 1'b1}, "status architect");
    check(!unlocked && level == LVL_LOCKED, "wrong code relocks");
    scan(I_UNLOCK, K, o);
    scan(I_SECCODE, Y, o);
    check(level == LVL_DESIGNER, "designer again");
    instr = I_LOCK; @(posedge tck); #1; instr = I_BYPASS;
    check(!unlocked && level == LVL_LOCKED, "LOCK instruction");
    scan(I_UNLOCK, K, o);
    scan(I_SECCODE, X, o);
    tlr = 1; @(posedge tck); #1; tlr = 0;
    check(!unlocked, "TLR locks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
