// tb_s27_boundary_scan_workload: boundary-scan test of the s27 core through
// the secured TAP, at the top's default parameters.
//
// After unlocking to user level, 200 functional vectors are applied: the
// tester sets the input pins, gives the core one system clock and reads the
// core output back with SAMPLE/PRELOAD; the result is compared with an s27
// model. Then 50 EXTEST vectors preload the output cell and check that the
// output pin follows it whatever the core does. The TCK cycles spent are
// printed. Finally the same SAMPLE sequence after relocking must see only the
// 1-bit bypass path.
module tb_s27_boundary_scan_workload;
  import sjtag_pkg::*;

  localparam logic [31:0] KEY = 32'hC0DE_5EC1, CX = 32'h1111_2222;

  logic tck = 0, trst_n = 1, tms = 1, tdi = 0, tdo, tdo_en;
  logic clk = 0, rst_n = 1;
  logic [3:0] pin_in = 0;
  logic pin_out;
  sec_level_t jtag_level;
  logic jtag_unlocked, lbist_auth_pass, lbist_auth_fail, lbist_done;

  secure_jtag_lbist_top dut (.*);

  always #10 tck = ~tck;

  int checks = 0, failures = 0;
  longint tck_cycles = 0;
  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (100000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clock(input logic m, input logic d = 0);
    tms = m; tdi = d;
    @(posedge tck); #1;
    tck_cycles++;
  endtask

  task automatic load_ir(input instr_t op);
    clock(1); clock(1); clock(0); clock(0);
    for (int i = 0; i < IR_W; i++) clock(i == IR_W - 1, op[i]);
    clock(1); clock(0);
  endtask

  task automatic scan_dr(input int n, input logic [63:0] v, output logic [63:0] o);
    o = '0;
    clock(1); clock(0); clock(0);
    for (int i = 0; i < n; i++) begin
      clock(i == n - 1, v[i]);
      o[i] = tdo;
    end
    clock(1); clock(0);
  endtask

  task automatic sys_clock;
    #2 clk = 1; #3 clk = 0; #2;
  endtask

  // s27 next state {G5,G6,G7} and output G17
  function automatic logic [3:0] s27(logic [3:0] i, logic [2:0] s);
    logic g0, g1, g2, g3, g5, g6, g7, g8, g12, g9, g11;
    {g3, g2, g1, g0} = i; {g5, g6, g7} = s;
    g8 = !g0 && g6; g12 = !(g1 || g7);
    g9 = !((g3 || g8) && (g12 || g8));
    g11 = !(g5 || g9);
    return {g0 && !g11, g11, !g2 && !g12, !g11};
  endfunction

  initial begin
    logic [63:0] o;
    logic [2:0] st;
    logic [3:0] r;
    longint t0;
    #2 trst_n = 0; rst_n = 0; #30 trst_n = 1; rst_n = 1;
    @(posedge tck); #1;
    repeat (5) clock(1);
    clock(0);
    load_ir(I_UNLOCK);  scan_dr(32, 64'(KEY), o);
    load_ir(I_SECCODE); scan_dr(32, 64'(CX), o);
    check(jtag_level == LVL_USER, "user level");

    // functional vectors observed through SAMPLE
    load_ir(I_SAMPLE);
    st = 3'b000;
    t0 = tck_cycles;
    for (int n = 0; n < 200; n++) begin
      pin_in = 4'($urandom);
      #1;
      r = s27(pin_in, st);
      scan_dr(5, '0, o);
      check(o[3:0] == pin_in, "input cells captured the pins");
      check(o[4] == r[0], $sformatf("vector %0d: G17 %b exp %b", n, o[4], r[0]));
      check(pin_out == r[0], "output pin shows the core");
      sys_clock();
      st = r[3:1];
    end
    $display("SAMPLE workload: 200 vectors, %0d TCK cycles", tck_cycles - t0);

    // EXTEST vectors
    t0 = tck_cycles;
    load_ir(I_EXTEST);
    for (int n = 0; n < 50; n++) begin
      logic b;
      b = 1'($urandom);
      scan_dr(5, 64'({b, 4'b0}), o);
      pin_in = 4'($urandom); sys_clock();
      check(pin_out == b, "EXTEST output pin");
    end
    $display("EXTEST workload: 50 vectors, %0d TCK cycles", tck_cycles - t0);

    // relocked: SAMPLE is bypass
    load_ir(I_LOCK);
    clock(0);
    load_ir(I_SAMPLE);
    scan_dr(8, 64'hFF, o);
    check(o[7:0] == 8'hFE, $sformatf("locked: 1-bit bypass path %h", o[7:0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
