// tb_prpg_lfsr: loads the seed and follows a reference LFSR built from the
// polynomial x^128 + x^126 + x^101 + x^99 + 1; the sequence does not repeat
// within the run. A small 4-bit instance checks the period 15.
module tb_prpg_lfsr;
  logic clk = 0, rst_n = 1, load = 0, en = 0;
  logic [127:0] seed, q, m;
  logic [3:0] q4;
  int checks = 0, failures = 0;

  prpg_lfsr dut (.clk, .rst_n, .load, .seed, .en, .q);
  prpg_lfsr #(.W(4), .TAPS(4'b1100)) dut4 (.clk, .rst_n, .load, .seed(seed[3:0]), .en, .q(q4));
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
    logic [3:0] first;
    int period;
    seed = 128'h0123_4567_89AB_CDEF_FEDC_BA98_7654_3211;
    #2 rst_n = 0; #10 rst_n = 1;
    load = 1; @(posedge clk); #1; load = 0;
    check(q == seed, "seed loaded");
    m = seed;
    en = 1;
    for (int i = 0; i < 1000; i++) begin
      @(posedge clk); #1;
      m = {m[126:0], m[127] ^ m[125] ^ m[100] ^ m[98]};
      check(q == m, $sformatf("step %0d", i));
    end
    en = 0; @(posedge clk); #1;
    check(q == m, "hold when disabled");
    // period of the 4-bit x^4+x^3+1 instance
    load = 1; @(posedge clk); #1; load = 0; first = q4; en = 1; period = 0;
    do begin @(posedge clk); #1; period++; end while (q4 != first && period < 100);
    check(period == 15, $sformatf("4-bit period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
