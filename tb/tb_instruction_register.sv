// tb_instruction_register: capture of 01, LSB-first shift, update, reset to
// IDCODE and return to IDCODE in Test-Logic-Reset.
module tb_instruction_register;
  import sjtag_pkg::*;
  logic tck = 0, trst_n = 1, tlr = 0, tdi = 0, tdo;
  dr_ctrl_t ctrl = '0;
  logic [IR_W-1:0] instr;
  int checks = 0, failures = 0;

  instruction_register dut (.*);
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

  task automatic load(input logic [IR_W-1:0] v, output logic [IR_W-1:0] out);
    ctrl = '{capture: 1, shift: 0, update: 0}; @(posedge tck); #1;
    ctrl = '{capture: 0, shift: 1, update: 0};
    for (int i = 0; i < IR_W; i++) begin
      tdi = v[i]; out[i] = tdo; @(posedge tck); #1;
    end
    ctrl = '{capture: 0, shift: 0, update: 1}; @(posedge tck); #1;
    ctrl = '0;
  endtask

  initial begin
    logic [IR_W-1:0] o;
    #2 trst_n = 0; #10 trst_n = 1; #1;
    check(instr == I_IDCODE, "reset IDCODE");
    for (int n = 0; n < 50; n++) begin
      logic [IR_W-1:0] v;
      v = IR_W'($urandom);
      load(v, o);
      check(o == IR_W'(1), $sformatf("captured %b", o));
      check(instr == v, $sformatf("instr %h exp %h", instr, v));
    end
    // shift without update does not change instr
    load(4'h7, o);
    ctrl = '{capture: 0, shift: 1, update: 0};
    repeat (4) begin tdi = 1; @(posedge tck); #1; end
    ctrl = '0;
    check(instr == 4'h7, "no update no change");
    tlr = 1; @(posedge tck); #1; tlr = 0;
    check(instr == I_IDCODE, "TLR -> IDCODE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
