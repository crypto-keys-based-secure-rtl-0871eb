// tb_instruction_decoder: every opcode at every security state against a
// privilege table written out independently here.
module tb_instruction_decoder;
  import sjtag_pkg::*;
  logic [IR_W-1:0] instr;
  logic unlocked;
  sec_level_t level;
  dr_sel_t sel;
  logic write_ok, extest, lbist_run;
  int checks = 0, failures = 0;

  instruction_decoder dut (.*);

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // minimum level (0..3) needed per opcode, -1 = needs only the key, 9 = never
  function automatic int need(int op);
    case (op)
      4'h0, 4'h1, 4'h2, 4'h6, 4'h8, 4'h9, 4'hB: return 1;
      4'h7, 4'hA: return 3;
      4'h5: return -1;
      default: return 9;
    endcase
  endfunction

  function automatic dr_sel_t target(int op);
    case (op)
      4'h0, 4'h1: return DR_BSR;
      4'h2: return DR_IDCODE;
      4'h4, 4'h5: return DR_KEY;
      4'h6: return DR_PRIVATE;
      4'h7: return DR_PRIVSIZE;
      4'h8: return DR_LBIST_CFG;
      4'h9: return DR_LBIST_RESP;
      4'hA: return DR_LBIST_STORE;
      4'hB: return DR_LBIST_STAT;
      default: return DR_BYPASS;
    endcase
  endfunction

  initial begin
    for (int u = 0; u < 2; u++)
      for (int l = 0; l < 4; l++)
        for (int op = 0; op < 16; op++) begin
          dr_sel_t exp;
          instr = IR_W'(op); unlocked = u[0]; level = sec_level_t'(l);
          #1;
          if (op == 4) exp = DR_KEY;
          else if (u == 0) exp = DR_BYPASS;
          else if (need(op) == -1) exp = target(op);
          else if (l >= need(op)) exp = target(op);
          else exp = DR_BYPASS;
          check(sel == exp, $sformatf("op %h u %0d l %0d sel %0d exp %0d", op, u, l, sel, exp));
          check(write_ok == (u == 1 && l >= 2), "write_ok");
          check(extest == (u == 1 && l >= 1 && op == 0), "extest");
          check(lbist_run == (u == 1 && l >= 1 && op == 11), "lbist_run");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
