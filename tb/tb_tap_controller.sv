// tb_tap_controller: random TMS streams against a reference table of the
// IEEE 1149.1 state diagram; checks the strobes and that five TMS=1 cycles
// reach Test-Logic-Reset from every state.
module tb_tap_controller;
  import sjtag_pkg::*;
  logic tck = 0, trst_n = 1, tms = 1;
  tap_state_t state;
  dr_ctrl_t dr, ir;
  logic tlr, rti;
  int checks = 0, failures = 0;

  tap_controller dut (.*);
  always #5 tck = ~tck;

  // reference: state numbering from the standard's diagram, written as a table
  // next[s] = {next if tms=1, next if tms=0}
  int ref_next1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
  int ref_next0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int model;

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (10000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    #2 trst_n = 0; #10 trst_n = 1;
    check(state == TLR, "reset to TLR");
    for (int i = 0; i < 2000; i++) begin
      tms = ($urandom_range(0, 3) == 0);
      @(posedge tck); #1;
      model = tms ? ref_next1[model] : ref_next0[model];
      check(int'(state) == model, $sformatf("state %0d exp %0d", state, model));
      check(dr.capture == (model == 3) && dr.shift == (model == 4) && dr.update == (model == 8), "dr strobes");
      check(ir.capture == (model == 10) && ir.shift == (model == 11) && ir.update == (model == 15), "ir strobes");
      check(tlr == (model == 0) && rti == (model == 1), "tlr/rti");
    end
    for (int s = 0; s < 16; s++) begin
      // go to TLR then walk to state s by a random path, then 5x TMS=1
      tms = 1; repeat (5) @(posedge tck); #1;
      model = 0;
      for (int k = 0; k < 40 && model != s; k++) begin
        tms = $urandom_range(0, 1);
        @(posedge tck); #1;
        model = tms ? ref_next1[model] : ref_next0[model];
      end
      tms = 1; repeat (5) @(posedge tck); #1;
      check(state == TLR, "5x TMS=1 -> TLR");
    end
    // asynchronous reset
    tms = 0; repeat (3) @(posedge tck); #1;
    trst_n = 0; #1;
    check(state == TLR, "async TRST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
