// tb_lbist_sec_decoder: LSB and MSB modes place the byte at bits 7..0 or at
// bits 120..127 in reverse; the algorithm/level rule of the supported
// algorithm table.
module tb_lbist_sec_decoder;
  import sjtag_pkg::*;
  logic [127:0] cfg;
  logic msb_mode, alg_ok;
  sec_byte_t fields;
  logic [7:0] index;
  int checks = 0, failures = 0;

  lbist_sec_decoder dut (.*);

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  // table rows: algorithm -> allowed levels (1-based), as the source lists them
  function automatic logic allowed(int alg, int lvl1);
    case (alg)
      0, 1, 2: return 1;                       // AES, RC6, Twofish: all
      3:       return lvl1 == 2 || lvl1 == 3;  // Blowfish
      4, 5, 6: return lvl1 == 1 || lvl1 == 2;  // 3DES, DES, RC2
      default: return 0;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 600; n++) begin
      logic [7:0] b;
      b = 8'($urandom);
      cfg = {$urandom, $urandom, $urandom, $urandom};
      if (n % 2 == 0) begin
        cfg[8] = 0; cfg[7:0] = b;
      end else begin
        cfg[8] = 1;
        for (int k = 0; k < 8; k++) cfg[127 - k] = b[k];
      end
      #1;
      check(index == b, $sformatf("index %h exp %h", index, b));
      check(msb_mode == cfg[8], "mode");
      check(fields.level == sec_level_t'(b[7:6]), "level field");
      check(fields.alg == crypto_alg_t'(b[5:3]), "alg field");
      check(fields.keysel == b[2:0], "key field");
      check(alg_ok == allowed(b[5:3], b[7:6] + 1), "rule");
    end
    // named positions in MSB mode: level bit 7 at 120, key bit 0 at 127
    cfg = '0; cfg[8] = 1; cfg[120] = 1; cfg[127] = 1; #1;
    check(index == 8'b1000_0001, "bit 120 / 127");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
