// tb_private_register: a scan of the private register is exactly `size` bits
// long; writes need write_ok; the size register sets and clamps the length.
module tb_private_register;
  import sjtag_pkg::*;
  localparam int PM = 32;
  localparam int SW = $clog2(PM + 1);
  logic tck = 0, trst_n = 1, write_ok = 0, tdi = 0, tdo, size_tdo;
  dr_ctrl_t ctrl = '0, size_ctrl = '0;
  logic [PM-1:0] value;
  logic [SW-1:0] size;
  int checks = 0, failures = 0;

  private_register #(.PRIV_MAX(PM)) dut (.*);
  always #5 tck = ~tck;

  task automatic check(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    repeat (20000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scan n bits through the private register, returning what came out
  task automatic scan(input int n, input logic [63:0] v, output logic [63:0] out);
    out = '0;
    ctrl = '{capture: 1, shift: 0, update: 0}; @(posedge tck); #1;
    ctrl = '{capture: 0, shift: 1, update: 0};
    for (int i = 0; i < n; i++) begin tdi = v[i]; out[i] = tdo; @(posedge tck); #1; end
    ctrl = '{capture: 0, shift: 0, update: 1}; @(posedge tck); #1;
    ctrl = '0;
  endtask

  task automatic set_size(input logic [SW-1:0] s, output logic [SW-1:0] old);
    size_ctrl = '{capture: 1, shift: 0, update: 0}; @(posedge tck); #1;
    size_ctrl = '{capture: 0, shift: 1, update: 0};
    for (int i = 0; i < SW; i++) begin tdi = s[i]; old[i] = size_tdo; @(posedge tck); #1; end
    size_ctrl = '{capture: 0, shift: 0, update: 1}; @(posedge tck); #1;
    size_ctrl = '0;
  endtask

  initial begin
    logic [63:0] o;
    logic [SW-1:0] old;
    #2 trst_n = 0; #10 trst_n = 1; #1;
    check(size == SW'(PM), "reset size");
    scan(PM, 64'hFFFF_FFFF, o);
    check(value == '0, "no write without permission");
    write_ok = 1;
    for (int s = 1; s <= PM; s += 3) begin
      logic [PM-1:0] v, msk;
      set_size(SW'(s), old);
      check(size == SW'(s), $sformatf("size %0d", size));
      v = PM'({$urandom, $urandom});
      msk = (s == PM) ? '1 : ((PM'(1) << s) - 1);
      scan(s, 64'(v), o);
      check(value == (v & msk), $sformatf("len %0d write %h exp %h", s, value, v & msk));
      // a scan of s+2 bits: the first s bits are the stored value, then the
      // first two bits shifted in appear
      scan(s + 2, 64'h3, o);
      check((o & ((64'(1) << s) - 1)) == 64'(v & msk), "readback");
      check(((o >> s) & 64'h3) == 64'h3, $sformatf("length exactly %0d", s));
    end
    set_size('0, old);
    check(size == 1, "clamp 0 -> 1");
    set_size(SW'(PM + 5), old);
    check(size == SW'(PM), "clamp high");
    check(old == 1, "size capture");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
