// tb_lbist_controller: one run with 5 patterns on a 3-bit chain: cycle count
// from start to done, number of shift, capture and compaction cycles, restart
// only on a new rising edge of start.
module tb_lbist_controller;
  localparam int N = 5, L = 3;
  logic clk = 0, rst_n = 1, start = 0;
  logic prpg_load, prpg_en, scan_en, misr_clear, misr_en, busy, done;
  int checks = 0, failures = 0;
  int cycles, n_load, n_shift, n_cap, n_misr;

  lbist_controller #(.N_PATTERNS(N), .CHAIN_LEN(L)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 rst_n = 0; #10 rst_n = 1;
    @(posedge clk); #1;
    check(!busy && !done, "idle");
    for (int run = 0; run < 2; run++) begin
      start = 1;
      cycles = 0; n_load = 0; n_shift = 0; n_cap = 0; n_misr = 0;
      @(posedge clk); #1;   // edge detect
      while (!done && cycles < 1000) begin
        n_load  += int'(prpg_load);
        n_shift += int'(scan_en);
        n_cap   += int'(prpg_en && !scan_en);
        n_misr  += int'(misr_en);
        cycles++;
        @(posedge clk); #1;
      end
      check(cycles == 1 + N * (L + 1) + L, $sformatf("cycles %0d", cycles));
      check(n_load == 1, "one load");
      check(n_shift == (N + 1) * L, "shift cycles");
      check(n_cap == N, "capture cycles");
      check(n_misr == N * L + N, "compaction cycles");
      repeat (5) @(posedge clk); #1;
      check(done, "done held");
      start = 0; @(posedge clk); #1;
      @(posedge clk); #1;
      check(!done && !busy, "back to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
