// tb_crypto_key_storage: entries are invalid after reset, a write makes one
// entry valid with its data, others are unaffected.
module tb_crypto_key_storage;
  logic clk = 0, rst_n = 1, we = 0, rvalid;
  logic [7:0] waddr = 0, raddr = 0;
  logic [127:0] wdata = 0, rdata;
  logic [127:0] model [256];
  logic         mvalid [256];
  int checks = 0, failures = 0;

  crypto_key_storage dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) mvalid[i] = 0;
    #2 rst_n = 0; #10 rst_n = 1; #1;
    for (int i = 0; i < 256; i++) begin raddr = 8'(i); #1; check(!rvalid, "invalid after reset"); end
    for (int n = 0; n < 400; n++) begin
      we = 1; waddr = 8'($urandom); wdata = {$urandom, $urandom, $urandom, $urandom};
      model[waddr] = wdata; mvalid[waddr] = 1;
      @(posedge clk); #1; we = 0;
      raddr = 8'($urandom); #1;
      check(rvalid == mvalid[raddr], "valid");
      if (mvalid[raddr]) check(rdata == model[raddr], "data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
