// tb_idcode_register: reads the reset code, checks that an update without
// write permission changes nothing and that one with permission rewrites it.
module tb_idcode_register;
  import sjtag_pkg::*;
  localparam logic [31:0] ID = 32'h4BA0_0477;
  logic tck = 0, trst_n = 1, write_ok = 0, tdi = 0, tdo;
  dr_ctrl_t ctrl = '0;
  logic [31:0] id, o;
  int checks = 0, failures = 0;

  idcode_register #(.IDCODE(ID)) dut (.*);
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

  task automatic scan(input logic [31:0] v, output logic [31:0] out);
    ctrl = '{capture: 1, shift: 0, update: 0}; @(posedge tck); #1;
    ctrl = '{capture: 0, shift: 1, update: 0};
    for (int i = 0; i < 32; i++) begin tdi = v[i]; out[i] = tdo; @(posedge tck); #1; end
    ctrl = '{capture: 0, shift: 0, update: 1}; @(posedge tck); #1;
    ctrl = '0;
  endtask

  initial begin
    #2 trst_n = 0; #10 trst_n = 1; #1;
    scan(32'hDEAD_BEEF, o);
    check(o == ID, $sformatf("read %h", o));
    check(id == ID, "user cannot write");
    scan(32'h0, o);
    check(o == ID, "still reset code");
    write_ok = 1;
    scan(32'h1234_5679, o);
    check(id == 32'h1234_5679, "designer writes");
    write_ok = 0;
    scan(32'h0, o);
    check(o == 32'h1234_5679, "new code read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
