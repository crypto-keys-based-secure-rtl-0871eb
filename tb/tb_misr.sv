// tb_misr: signature against a reference MISR; a single flipped input bit
// changes the signature; clear.
module tb_misr;
  logic clk = 0, rst_n = 1, clear = 0, en = 0;
  logic [31:0] din = 0, sig, m;
  logic [31:0] stream [200];
  logic [31:0] s1;
  int checks = 0, failures = 0;

  misr dut (.*);
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

  task automatic run(output logic [31:0] s);
    clear = 1; @(posedge clk); #1; clear = 0;
    check(sig == 0, "clear");
    m = 0; en = 1;
    for (int i = 0; i < 200; i++) begin
      din = stream[i];
      @(posedge clk); #1;
      m = {m[30:0], m[31] ^ m[21] ^ m[1] ^ m[0]} ^ stream[i];
      check(sig == m, "step");
    end
    en = 0; s = sig;
  endtask

  initial begin
    logic [31:0] s2;
    for (int i = 0; i < 200; i++) stream[i] = $urandom;
    #2 rst_n = 0; #10 rst_n = 1;
    run(s1);
    stream[57][13] ^= 1'b1;
    run(s2);
    check(s1 != s2, "single-bit error detected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
