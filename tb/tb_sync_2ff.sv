// tb_sync_2ff: the output follows the input after exactly two clock edges.
module tb_sync_2ff;
  logic clk = 0, rst_n = 1, d = 0, q;
  int checks = 0, failures = 0;
  logic [1:0] hist;

  sync_2ff dut (.*);
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
    #2 rst_n = 0; #10 rst_n = 1; #1;
    check(q == 0, "reset");
    hist = 0;
    for (int i = 0; i < 200; i++) begin
      d = $urandom_range(0, 1);
      @(posedge clk); #1;
      hist = {hist[0], d};
      if (i >= 1) check(q == hist[1], "2-cycle latency");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
