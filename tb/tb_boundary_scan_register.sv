// tb_boundary_scan_register: SAMPLE captures pins and core outputs, PRELOAD
// then EXTEST drives the output pins from the update latches; without EXTEST
// the core output reaches the pin.
module tb_boundary_scan_register;
  import sjtag_pkg::*;
  logic tck = 0, trst_n = 1, extest = 0, tdi = 0, tdo;
  dr_ctrl_t ctrl = '0;
  logic [3:0] pin_in, core_in;
  logic [0:0] core_out, pin_out;
  logic [4:0] o;
  int checks = 0, failures = 0;

  boundary_scan_register #(.N_IN(4), .N_OUT(1)) dut (.*);
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

  task automatic scan(input logic [4:0] v, output logic [4:0] out);
    ctrl = '{capture: 1, shift: 0, update: 0}; @(posedge tck); #1;
    ctrl = '{capture: 0, shift: 1, update: 0};
    for (int i = 0; i < 5; i++) begin tdi = v[i]; out[i] = tdo; @(posedge tck); #1; end
    ctrl = '{capture: 0, shift: 0, update: 1}; @(posedge tck); #1;
    ctrl = '0;
  endtask

  initial begin
    #2 trst_n = 0; #10 trst_n = 1; #1;
    for (int n = 0; n < 20; n++) begin
      logic [4:0] pre;
      pin_in = 4'($urandom); core_out = 1'($urandom); pre = 5'($urandom);
      extest = 0; #1;
      check(core_in == pin_in, "pins reach core");
      check(pin_out == core_out, "core reaches pin");
      scan(pre, o);   // SAMPLE/PRELOAD
      check(o == {core_out, pin_in}, $sformatf("sample %b", o));
      extest = 1; core_out = ~core_out; #1;
      check(pin_out == pre[4], "EXTEST drives preloaded value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
