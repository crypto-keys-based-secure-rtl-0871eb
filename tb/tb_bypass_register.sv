// tb_bypass_register: capture of 0 and one-cycle delay of TDI.
module tb_bypass_register;
  import sjtag_pkg::*;
  logic tck = 0, tdi = 0, tdo;
  dr_ctrl_t ctrl = '0;
  int checks = 0, failures = 0;
  logic prev;

  bypass_register dut (.*);
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

  initial begin
    for (int n = 0; n < 20; n++) begin
      ctrl = '{capture: 1, shift: 0, update: 0}; @(posedge tck); #1;
      check(tdo == 1'b0, "capture 0");
      ctrl = '{capture: 0, shift: 1, update: 0};
      for (int i = 0; i < 16; i++) begin
        tdi = $urandom_range(0, 1); prev = tdi;
        @(posedge tck); #1;
        check(tdo == prev, "1-bit delay");
      end
      ctrl = '0; tdi = ~prev; @(posedge tck); #1;
      check(tdo == prev, "hold outside shift");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
