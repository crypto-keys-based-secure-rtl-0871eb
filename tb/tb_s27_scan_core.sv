// tb_s27_scan_core: functional next state and output against a reference
// written as sum-of-products of the s27 equations; scan shift through the
// three flip-flops.
module tb_s27_scan_core;
  logic clk = 0, rst_n = 1, po, scan_en = 0, scan_in = 0, scan_out;
  logic [3:0] pi = 0;
  logic [2:0] st;   // {G5, G6, G7}
  int checks = 0, failures = 0;

  s27_scan_core dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // reference evaluation of s27, rewritten with De Morgan forms
  function automatic logic [3:0] ref_eval(logic [3:0] i, logic [2:0] s);
    logic g0, g1, g2, g3, g5, g6, g7, g8, g12, g9, g11, g10, g13;
    {g3, g2, g1, g0} = i; {g5, g6, g7} = s;
    g8  = !g0 && g6;
    g12 = !g1 && !g7;
    g9  = !((g3 || g8) && (g12 || g8));
    g11 = !g5 && !g9;
    g10 = g0 && !g11;
    g13 = !g2 && !g12;
    return {g10, g11, g13, !g11};  // next {G5,G6,G7}, G17
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] r;
    logic [2:0] shifted;
    #2 rst_n = 0; #10 rst_n = 1; #1;
    st = 3'b000;
    for (int n = 0; n < 300; n++) begin
      pi = 4'($urandom); #1;
      r = ref_eval(pi, st);
      check(po == r[0], "G17");
      @(posedge clk); #1;
      st = r[3:1];
      check(scan_out == st[0], "next state (G7 on scan_out)");
      if (n % 10 == 0) begin
        // unload the state through the chain and load a random one
        logic [2:0] nv;
        nv = 3'($urandom);
        scan_en = 1;
        for (int k = 0; k < 3; k++) begin
          shifted[k] = scan_out;
          scan_in = nv[k];
          @(posedge clk); #1;
        end
        scan_en = 0;
        check(shifted == {st[2], st[1], st[0]}, "unload order G7, G6, G5");
        st = {nv[2], nv[1], nv[0]};
        check(scan_out == nv[0], "loaded");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
